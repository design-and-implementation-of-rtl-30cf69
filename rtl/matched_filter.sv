// matched_filter: receive square-root raised-cosine filter.
//
// 41-tap FIR with 7-bit signed coefficients for roll-off 0.35 at 4 samples per
// symbol, applied to I and Q separately (real coefficients). Direct form: a
// 41-sample delay line per rail, and for each new sample the full convolution
// sum_k h[k] x[n-k] is formed, shifted right by OUT_SH and saturated to OUT_W
// bits. One output per input sample, registered, one cycle after in_valid.
// Roll-off, tap count, coefficient width and oversampling are the modem's
// specification; the structure, scaling and widths are this design's choice.
module matched_filter
  import modem_pkg::*;
#(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned OUT_SH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);
  logic signed [IN_W-1:0] di_q [SRRC_TAPS-1];
  logic signed [IN_W-1:0] dq_q [SRRC_TAPS-1];

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [47:0] v);
    longint s;
    s = longint'(v) >>> OUT_SH;
    if (s >  2**(OUT_W-1) - 1) s =  2**(OUT_W-1) - 1;
    if (s < -2**(OUT_W-1))     s = -2**(OUT_W-1);
    return OUT_W'(s);
  endfunction

  logic signed [47:0] ai;
  logic signed [47:0] aq;

  // convolution sum over the new sample and the 40 stored ones
  always_comb begin
    ai = 48'(longint'(SRRC_H[0]) * longint'(in_i));
    aq = 48'(longint'(SRRC_H[0]) * longint'(in_q));
    for (int k = 1; k < SRRC_TAPS; k++) begin
      ai += 48'(longint'(SRRC_H[k]) * longint'(di_q[k-1]));
      aq += 48'(longint'(SRRC_H[k]) * longint'(dq_q[k-1]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      for (int k = 0; k < SRRC_TAPS - 1; k++) begin
        di_q[k] <= '0;
        dq_q[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i   <= sat(ai);
        out_q   <= sat(aq);
        di_q[0] <= in_i;
        dq_q[0] <= in_q;
        for (int k = 1; k < SRRC_TAPS - 1; k++) begin
          di_q[k] <= di_q[k-1];
          dq_q[k] <= dq_q[k-1];
        end
      end
    end
  end
endmodule
