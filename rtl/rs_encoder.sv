// rs_encoder: systematic Reed-Solomon (204,188) encoder, T = 8.
//
// The code is RS(255,239) over GF(256) shortened by 51 leading zero bytes; the
// zeros do not change the LFSR state, so 188 information bytes go straight in.
// Generator g(x) = (x+a^0)(x+a^1)...(x+a^15), field polynomial
// x^8+x^4+x^3+x^2+1 (both assumed, as in the DVB cable standard).
//
// Flow control is driven by the downstream byte clock: on every `tick` the
// encoder emits one byte. During the first 188 ticks of a codeword it takes a
// byte from the input (in_ready = tick), passes it through and feeds the LFSR;
// during the next 16 ticks it shifts out the parity, highest-order first, and
// does not accept input. A codeword starts only on an input byte with in_sop
// set; bytes offered at the start of a codeword without in_sop are dropped, so
// the encoder aligns itself to packets. Output is registered: out_valid comes
// one cycle after the tick.
module rs_encoder
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,        // request for one output byte
  output logic       in_ready,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop
);
  typedef logic [7:0] gvec_t [RS_2T];

  function automatic gvec_t gen_poly();
    logic [7:0] g [RS_2T+1];
    logic [7:0] root;
    gvec_t r;
    for (int k = 0; k <= RS_2T; k++) g[k] = (k == 0) ? 8'd1 : 8'd0;
    for (int i = 0; i < RS_2T; i++) begin           // multiply by (x + a^i)
      root = gf_pow_alpha(i);
      for (int k = RS_2T; k > 0; k--) g[k] = g[k-1] ^ gf_mul(g[k], root);
      g[0] = gf_mul(g[0], root);
    end
    for (int k = 0; k < RS_2T; k++) r[k] = g[k];
    return r;
  endfunction

  localparam gvec_t G = gen_poly();

  logic [7:0] par_q [RS_2T];
  logic [7:0] cnt_q;                 // byte index within the codeword
  logic       data_phase;
  logic       take;
  logic [7:0] fb;

  assign data_phase = cnt_q < 8'(RS_K);
  assign in_ready   = tick && data_phase;
  assign take       = in_ready && in_valid && (cnt_q != 0 || in_sop);
  assign fb         = in_data ^ par_q[RS_2T-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      for (int k = 0; k < RS_2T; k++) par_q[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_data  <= in_data;
        out_sop   <= (cnt_q == 0);
        cnt_q     <= cnt_q + 8'd1;
        for (int k = RS_2T - 1; k > 0; k--) par_q[k] <= par_q[k-1] ^ gf_mul(fb, G[k]);
        par_q[0]  <= gf_mul(fb, G[0]);
      end else if (tick && !data_phase) begin
        out_valid <= 1'b1;
        out_data  <= par_q[RS_2T-1];
        for (int k = RS_2T - 1; k > 0; k--) par_q[k] <= par_q[k-1];
        par_q[0]  <= '0;
        cnt_q     <= (cnt_q == 8'(RS_N - 1)) ? 8'd0 : cnt_q + 8'd1;
      end
    end
  end
endmodule
