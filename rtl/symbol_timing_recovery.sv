// symbol_timing_recovery: Gardner timing recovery with a 4-point interpolator.
//
// Input: complex samples at 4 per symbol (in_valid). Output: one complex sample
// per recovered symbol (out_valid), taken at the estimated symbol centre.
//
// Interpolator: the last four input samples x(m-1..m+2) feed four cubic
// (Lagrange) interpolators in parallel, with fixed coefficients for the
// fractional positions mu = 0, 1/4, 1/2, 3/4 between x(m) and x(m+1), in
// 1/128 units:  mu=0: (0,128,0,0)  1/4: (-7,105,35,-5)  1/2: (-8,72,72,-8)
// 3/4: (-5,35,105,-7). The time resolution is therefore a quarter of the
// sample spacing, T/16, and the residual timing error is at most +-T/32.
//
// Interpolator controller: a modulo-1 NCO eta (16 bits) is decremented by
// W = 1/2 + v every input sample; when it would underflow, an interpolant is
// due (a strobe, two per symbol) and mu = eta/W, about 2*eta, is rounded to
// the nearest of the four positions (mu rounding up to 1 selects x(m+1)
// itself); the down-sampler selects that interpolator's output. Strobes alternate between mid-symbol and on-time samples.
//
// Timing error estimator (Gardner): at each on-time strobe
//     e(n) = I_mid*(I(n) - I(n-1)) + Q_mid*(Q(n) - Q(n-1)),
// positive when the strobes are late. Loop filter: proportional-integral,
// v = e/2^KP_SH + acc, acc += e/2^KI_SH. A positive v shortens the strobe period.
// Rate matching: the on-time samples leave with out_valid, so the output rate
// follows the transmitter's symbol clock (on average one symbol per 4 inputs).
//
// The structure (interpolator, Gardner estimator, loop filter, controller, 4
// fixed coefficient sets, T/32 residual error) is the modem's; the cubic
// coefficients, the NCO controller and the loop constants are assumptions.
// All state updates happen on in_valid; the output is registered.
module symbol_timing_recovery #(
  parameter int unsigned W     = 12,
  parameter int unsigned KP_SH = 4,
  parameter int unsigned KI_SH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output logic signed [15:0]  timing_ctl     // loop filter output v, for observation
);
  typedef int coef4_t [4];
  localparam coef4_t C0 = '{0, 128, 0, 0};
  localparam coef4_t C1 = '{-7, 105, 35, -5};
  localparam coef4_t C2 = '{-8, 72, 72, -8};
  localparam coef4_t C3 = '{-5, 35, 105, -7};
  localparam coef4_t C4 = '{0, 0, 128, 0};      // mu = 1: the next sample

  logic signed [W-1:0] xi_q [4];     // [0] newest
  logic signed [W-1:0] xq_q [4];
  logic [15:0]         eta_q;
  logic                mid_q;        // next strobe is a mid-symbol one
  logic signed [31:0] acc_q;
  logic signed [31:0] err_q;
  logic signed [W-1:0] midi_q;
  logic signed [W-1:0] midq_q;
  logic signed [W-1:0] oni_q;
  logic signed [W-1:0] onq_q;

  logic signed [31:0] v;
  logic signed [31:0] wstep;
  logic        strobe;
  logic [2:0]  mu;
  logic signed [31:0] yi;
  logic signed [31:0] yq;
  logic signed [31:0] err;

  function automatic int interp(input logic signed [W-1:0] x3, input logic signed [W-1:0] x2,
                                input logic signed [W-1:0] x1, input logic signed [W-1:0] x0,
                                input coef4_t c);
    return (c[0] * int'(x3) + c[1] * int'(x2) + c[2] * int'(x1) + c[3] * int'(x0)) >>> 7;
  endfunction

  function automatic int sat_w(input int x);
    if (x >  2**(W-1) - 1) return 2**(W-1) - 1;
    if (x < -2**(W-1))     return -2**(W-1);
    return x;
  endfunction

  always_comb begin
    v      = (err_q >>> KP_SH) + (acc_q >>> KI_SH);
    if (v >  8192) v =  8192;
    if (v < -8192) v = -8192;
    wstep  = 32768 + v;
    strobe = int'(eta_q) < wstep;
    // round(4*eta/W) with W taken as 1/2; eta can reach W > 1/2, hence the clamp
    mu     = ((int'(eta_q) + 4096) >> 13) > 4 ? 3'd4 : 3'((int'(eta_q) + 4096) >> 13);
    // x3..x0 = oldest..newest; interpolate between xi_q[2] and xi_q[1]
    unique case (mu)
      3'd0: begin yi = interp(xi_q[3], xi_q[2], xi_q[1], xi_q[0], C0);
                  yq = interp(xq_q[3], xq_q[2], xq_q[1], xq_q[0], C0); end
      3'd1: begin yi = interp(xi_q[3], xi_q[2], xi_q[1], xi_q[0], C1);
                  yq = interp(xq_q[3], xq_q[2], xq_q[1], xq_q[0], C1); end
      3'd2: begin yi = interp(xi_q[3], xi_q[2], xi_q[1], xi_q[0], C2);
                  yq = interp(xq_q[3], xq_q[2], xq_q[1], xq_q[0], C2); end
      3'd3: begin yi = interp(xi_q[3], xi_q[2], xi_q[1], xi_q[0], C3);
                  yq = interp(xq_q[3], xq_q[2], xq_q[1], xq_q[0], C3); end
      default: begin yi = interp(xi_q[3], xi_q[2], xi_q[1], xi_q[0], C4);
                  yq = interp(xq_q[3], xq_q[2], xq_q[1], xq_q[0], C4); end
    endcase
    yi  = sat_w(yi);
    yq  = sat_w(yq);
    err = (int'(midi_q) * (yi - int'(oni_q)) + int'(midq_q) * (yq - int'(onq_q))) >>> 6;
  end

  assign timing_ctl = 16'(v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin
        xi_q[k] <= '0;
        xq_q[k] <= '0;
      end
      eta_q     <= 16'hFFFF;
      mid_q     <= 1'b1;
      acc_q     <= 0;
      err_q     <= 0;
      midi_q    <= '0;
      midq_q    <= '0;
      oni_q     <= '0;
      onq_q     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        xi_q[0] <= in_i;
        xq_q[0] <= in_q;
        for (int k = 1; k < 4; k++) begin
          xi_q[k] <= xi_q[k-1];
          xq_q[k] <= xq_q[k-1];
        end
        eta_q <= 16'(int'(eta_q) - wstep);
        if (strobe) begin
          mid_q <= ~mid_q;
          if (mid_q) begin
            midi_q <= W'(yi);
            midq_q <= W'(yq);
          end else begin
            oni_q     <= W'(yi);
            onq_q     <= W'(yq);
            out_valid <= 1'b1;
            out_i     <= W'(yi);
            out_q     <= W'(yq);
            err_q     <= err;
            acc_q     <= acc_q + err;
          end
        end
      end
    end
  end
endmodule
