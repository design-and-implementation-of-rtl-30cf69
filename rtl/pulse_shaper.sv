// pulse_shaper: transmit square-root raised-cosine filter, roll-off 0.35.
//
// Interpolating FIR with 41 taps of 7 bits (the same response as the receive
// matched filter) producing 4 samples per symbol. It is built as a polyphase
// filter: the last 11 symbols sit in a shift register and output phase p
// (0..3) is sum_m h[4m+p] * s[n-m], so no multiplications by stuffed zeros are
// done. On each sample_tick the next phase is computed; at phase 0 a new symbol
// is shifted in and sym_take asks the symbol source for the one after it. The
// output (valid one cycle after sample_tick) is the raw sum, in units of the
// 7-bit coefficients times the symbol levels (+-3 max).
//
// Roll-off, tap count and coefficient width are from the modem's description
// (given there for the matched filter, reused here); the polyphase structure is
// this design's choice.
module pulse_shaper
  import modem_pkg::*;
#(
  parameter int unsigned OUT_W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample_tick,
  input  qam_pt_t                 in_pt,       // symbol presented by the source
  output logic                    sym_take,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);
  localparam int NSYM = (SRRC_TAPS + SRRC_SPS - 1) / SRRC_SPS;   // 11

  lvl_t       si_q [NSYM];
  lvl_t       sq_q [NSYM];
  logic [1:0] ph_q;

  logic signed [31:0] acc_i;
  logic signed [31:0] acc_q;

  assign sym_take = sample_tick && ph_q == 2'd0;

  // output phase ph_q; at phase 0 the incoming symbol takes slot 0
  always_comb begin
    lvl_t vi;
    lvl_t vq;
    acc_i = '0;
    acc_q = '0;
    for (int m = 0; m < NSYM; m++) begin
      vi = (m == 0 && ph_q == 0) ? in_pt.i : ((ph_q == 0) ? si_q[m-1 < 0 ? 0 : m-1] : si_q[m]);
      vq = (m == 0 && ph_q == 0) ? in_pt.q : ((ph_q == 0) ? sq_q[m-1 < 0 ? 0 : m-1] : sq_q[m]);
      if (SRRC_SPS * m + int'(ph_q) < SRRC_TAPS) begin
        acc_i += 32'(int'(SRRC_H[SRRC_SPS * m + int'(ph_q)]) * int'(vi));
        acc_q += 32'(int'(SRRC_H[SRRC_SPS * m + int'(ph_q)]) * int'(vq));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q      <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      for (int m = 0; m < NSYM; m++) begin
        si_q[m] <= '0;
        sq_q[m] <= '0;
      end
    end else begin
      out_valid <= sample_tick;
      if (sample_tick) begin
        out_i <= OUT_W'(acc_i);
        out_q <= OUT_W'(acc_q);
        ph_q  <= ph_q + 2'd1;
        if (ph_q == 0) begin
          si_q[0] <= in_pt.i;
          sq_q[0] <= in_pt.q;
          for (int m = 1; m < NSYM; m++) begin
            si_q[m] <= si_q[m-1];
            sq_q[m] <= sq_q[m-1];
          end
        end
      end
    end
  end
endmodule
