// phase_recovery: decision-directed carrier phase recovery.
//
// Phase error detector: the input is rotated by the synthesizer output,
// Z_k = x_k e^{-j theta}; a complex decision d_k is taken on Z_k; the error
//     e_k = Im{ Z_k d_k^* } / |d_k|^2  (~ alpha * theta, Eq. 3)
// is formed, with the normalisation 1/|d_k|^2 (|d|^2 = 2, 10 or 18 for the
// 16-QAM points) done by a small reciprocal table (128, 26, 14 in 1/256).
// Loop filter (second order): v_k = (K1*e_k + i_k/2^K2_SH) / 2^K_SH,
// i_{k+1} = i_k + K2*e_k. Direct digital synthesizer: a phase error
// accumulator theta += v and a SIN/COS ROM addressed by its 8 most significant
// bits, so the synthesized phase has a resolution of 2*pi/256 = pi/128
// (1.4 degrees). The accumulator carries PH_FB further fraction bits below
// those 8 so that small loop corrections add up.
//
// Output: Z_k (registered, one cycle after in_valid) and the decision d_k as a
// 16-QAM point. Levels are in units where level 1 equals UNIT.
//
// The detector, normalisation, loop filter with K1/K2 and the 8-bit phase with
// a SIN/COS ROM follow the modem's phase recovery block diagram and text; the
// fractional accumulator bits, the table amplitude and the constants are this
// design's assumptions.
module phase_recovery
  import modem_pkg::*;
#(
  parameter int unsigned W     = 12,
  parameter int          UNIT  = 128,
  parameter int unsigned ROM_W = 8,
  parameter int unsigned PH_FB = 8,
  parameter int          K1    = 8,
  parameter int          K2    = 1,
  parameter int unsigned K_SH  = 4,
  parameter int unsigned K2_SH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output qam_pt_t             out_dec,
  output logic [7:0]          phase           // synthesized phase, 2*pi/256 units
);
  localparam int PH_AW = 8;
  typedef logic signed [ROM_W-1:0] rom_t [2**PH_AW];
  function automatic rom_t mk_sin();
    rom_t t;
    for (int k = 0; k < 2**PH_AW; k++) t[k] = ROM_W'(sin_q(k, PH_AW, 2**(ROM_W-1) - 1));
    return t;
  endfunction
  localparam rom_t SIN = mk_sin();
  localparam int   SH  = ROM_W - 1;

  logic [PH_AW+PH_FB-1:0] th_q;
  logic signed [31:0] integ_q;
  logic [PH_AW-1:0]       a;
  logic signed [31:0] c;
  logic signed [31:0] s;
  logic signed [31:0] zi;
  logic signed [31:0] zq;
  lvl_t di;
  lvl_t dq;
  logic signed [31:0] im;
  logic signed [31:0] rcp;
  logic signed [31:0] e;
  logic signed [31:0] v;

  function automatic int sat_w(input int x);
    if (x >  2**(W-1) - 1) return 2**(W-1) - 1;
    if (x < -2**(W-1))     return -2**(W-1);
    return x;
  endfunction

  always_comb begin
    a  = th_q[PH_AW+PH_FB-1 -: PH_AW];
    c  = int'(SIN[a + 8'd64]);
    s  = int'(SIN[a]);
    zi = sat_w((int'(in_i) * c + int'(in_q) * s) >>> SH);
    zq = sat_w((int'(in_q) * c - int'(in_i) * s) >>> SH);
    di = slice_lvl(zi, UNIT);
    dq = slice_lvl(zq, UNIT);
    // Im{Z d*} = zq*di - zi*dq
    im = zq * int'(di) - zi * int'(dq);
    unique case (int'(di) * int'(di) + int'(dq) * int'(dq))
      2:       rcp = 128;
      10:      rcp = 26;
      default: rcp = 14;
    endcase
    e  = (im * rcp) >>> 8;            // ~ UNIT * theta (radians)
    v  = (K1 * e + (integ_q >>> K2_SH)) >>> K_SH;
  end

  assign phase = th_q[PH_AW+PH_FB-1 -: PH_AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_q      <= '0;
      integ_q   <= 0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      out_dec   <= '{i: 3'sd1, q: 3'sd1};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i   <= W'(zi);
        out_q   <= W'(zq);
        out_dec <= '{i: di, q: dq};
        integ_q <= integ_q + K2 * e;
        th_q    <= th_q + (PH_AW+PH_FB)'(v);
      end
    end
  end
endmodule
