// diff_decoder: differential decoding of the quadrant bits.
//
// With diff_en set, the quadrant change between consecutive received symbols,
// (quadrant number now - quadrant number before) mod 4, is turned back into the
// two most significant bits {A,B} (Gray numbered as in the encoder); a constant
// 90-degree rotation of the received constellation cancels out. With diff_en
// clear, symbols pass unchanged. The two low bits always pass. Registered, one
// cycle after in_valid. Enable/disable is the modem's; the rest mirrors
// diff_encoder.
module diff_decoder
  import modem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic diff_en,
  input  logic in_valid,
  input  sym_t in_sym,
  output logic out_valid,
  output sym_t out_sym
);
  logic [1:0] prev_q;
  logic [1:0] n;

  assign n = quad_num(in_sym[3:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q    <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev_q  <= n;
        out_sym <= diff_en ? {quad_bits(n - prev_q), in_sym[1:0]} : in_sym;
      end
    end
  end
endmodule
