// agc: automatic gain control loop.
//
// The complex input r(k) is multiplied by the gain g (first multiplier); the
// gain detector forms r_c(k) = (|I| + |Q|)/sqrt(2) of the scaled output, with
// 1/sqrt(2) approximated by 181/256. The difference between the reference
// level X_REF and r_c is weighted by beta (second multiplier) and integrated;
// the gain is the integrator plus the fixed offset LAMBDA_REF:
//     acc(k+1) = acc(k) + beta*(X_REF - r_c(k)),   g(k) = LAMBDA_REF + acc(k).
// The gain has GAIN_FB fractional bits; beta is BETA / 2^BETA_SH. The loop
// settles where the mean of r_c equals X_REF. Output is registered, one cycle
// after in_valid, and saturated to W bits; `gain` shows the current gain.
//
// The structure (gain detector of Eq. 1, integrator, two multipliers, two
// references) follows the modem's AGC block diagram; the signs, widths, constants and
// the choice to control the digital gain only (no output to the analog gain of
// the IF unit) are this design's assumptions.
module agc #(
  parameter int unsigned W          = 12,
  parameter int unsigned GAIN_W     = 14,
  parameter int unsigned GAIN_FB    = 8,
  parameter int          X_REF      = 330,
  parameter int          LAMBDA_REF = 256,
  parameter int          BETA       = 1,
  parameter int unsigned BETA_SH    = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [W-1:0]      in_i,
  input  logic signed [W-1:0]      in_q,
  output logic                     out_valid,
  output logic signed [W-1:0]      out_i,
  output logic signed [W-1:0]      out_q,
  output logic [GAIN_W-1:0]        gain
);
  localparam int ACC_FB = BETA_SH;  // extra fraction bits in the integrator

  logic signed [31:0] acc_q;                      // gain - LAMBDA_REF, GAIN_FB+ACC_FB frac bits
  logic signed [31:0] g;
  logic signed [31:0] yi;
  logic signed [31:0] yq;
  logic signed [31:0] rc;

  function automatic int sat_w(input int v);
    if (v >  2**(W-1) - 1) return 2**(W-1) - 1;
    if (v < -2**(W-1))     return -2**(W-1);
    return v;
  endfunction

  always_comb begin
    g = LAMBDA_REF + (acc_q >>> ACC_FB);
    if (g < 0) g = 0;
    if (g > 2**GAIN_W - 1) g = 2**GAIN_W - 1;
    yi = sat_w((int'(in_i) * g) >>> GAIN_FB);
    yq = sat_w((int'(in_q) * g) >>> GAIN_FB);
    rc = (((yi < 0) ? -yi : yi) + ((yq < 0) ? -yq : yq)) * 181 >>> 8;
  end

  assign gain = GAIN_W'(g);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= 0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= W'(yi);
        out_q <= W'(yq);
        acc_q <= acc_q + BETA * (X_REF - rc);
      end
    end
  end
endmodule
