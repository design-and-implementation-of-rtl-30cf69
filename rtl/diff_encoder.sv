// diff_encoder: byte-to-symbol conversion and differential encoding.
//
// Each byte becomes two 4-bit symbols, high nibble first. The two most
// significant bits {A,B} of a symbol give a quadrant change: with differential
// encoding enabled, the quadrant number sent is the previous one plus the Gray
// number of {A,B} (mod 4), which is the I_k/Q_k rule of the DVB cable standard;
// with it disabled {A,B} is the quadrant itself. The two low bits pass through.
// A 90-degree phase ambiguity in the receiver then only adds a constant to all
// quadrant numbers, which the differential decoder removes.
//
// Flow: the pulse shaper pulls a symbol with sym_take. The encoder holds up to
// two bytes; when it hands out the high nibble of a byte it pulses byte_req to
// ask the byte pipeline for the next one, which must arrive (in_valid) before
// the following byte is needed. If no byte is there when a symbol is taken, an
// all-zero symbol is sent and `underrun` pulses. Enabling/disabling differential
// encoding is the modem's specification; the rest is this design's choice.
module diff_encoder
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       diff_en,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       byte_req,
  input  logic       sym_take,
  output sym_t       sym,
  output logic       underrun
);
  logic [7:0] buf_q [2];
  logic [1:0] cnt_q;                 // bytes held
  logic       half_q;                // 1: low nibble of buf_q[0] is next
  logic [1:0] quad_q;                // last quadrant number sent
  logic       primed_q;
  logic [3:0] nib;
  logic [1:0] quad;

  always_comb begin
    nib  = half_q ? buf_q[0][3:0] : buf_q[0][7:4];
    if (cnt_q == 0) nib = 4'h0;
    quad = diff_en ? quad_q + quad_num(nib[3:2]) : quad_num(nib[3:2]);
    sym  = {quad_bits(quad), nib[1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q[0] <= '0;
      buf_q[1] <= '0;
      cnt_q    <= '0;
      half_q   <= 1'b0;
      quad_q   <= '0;
      primed_q <= 1'b0;
      byte_req <= 1'b0;
      underrun <= 1'b0;
    end else begin
      logic [1:0] cnt;
      cnt      = cnt_q;
      byte_req <= !primed_q;         // first request after reset
      primed_q <= 1'b1;
      underrun <= 1'b0;
      if (sym_take) begin
        quad_q <= quad;
        if (cnt_q == 0) begin
          underrun <= 1'b1;
        end else if (!half_q) begin
          half_q   <= 1'b1;
          byte_req <= 1'b1;
        end else begin
          half_q   <= 1'b0;
          buf_q[0] <= buf_q[1];
          cnt      = cnt - 2'd1;
        end
      end
      if (in_valid && cnt != 2'd2) begin
        if (cnt == 0) buf_q[0] <= in_data;
        else          buf_q[1] <= in_data;
        cnt = cnt + 2'd1;
      end
      cnt_q <= cnt;
    end
  end
endmodule
