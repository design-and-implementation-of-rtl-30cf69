// freq_recovery: carrier frequency recovery, one sample per symbol.
//
// The symbol-rate input Z(n) (from timing recovery) is derotated by the
// synthesizer phase phi: Y(n) = Z(n) e^{-j phi}, using a sine/cosine ROM of
// 2^ROM_AW entries. The data modulation is removed with the modulo nonlinearity:
// the slicer takes the quadrant of Y(n) (the sign of each rail), the product
// Y(n) times the conjugate of that quadrant's 45-degree point is formed, and its
// angle (CORDIC), which is the carrier angle modulo pi/2 centred on zero, is the
// error Omega(n). For the corner and inner points of 16-QAM this is the exact
// phase error; the middle-ring points add +-26.6 degrees of zero-mean noise
// that the narrow loop averages out. The loop filter is proportional-integral,
// phi += Omega*2^8/2^KP_SH + I*2^8/2^KI_SH with I += Omega, so the integrator
// holds the frequency offset and the accumulator phi follows it. A rotation of
// up to pi/4 per symbol, i.e. an offset of f_R/8, can be measured by the
// detector; the loop constants are set for the tens of kHz (up to about
// 0.01 turn per symbol) the modem expects, which it pulls in within a few
// thousand symbols.
//
// Units: angles are 16 bits for 2*pi; phi carries 8 more fraction bits and
// its top ROM_AW bits address the ROM. One output per in_valid, registered;
// `freq_word` is the integral branch, I*2^8/2^KI_SH: the estimated carrier
// rotation per symbol in units of 2^-24 turns (KI_SH >= 8).
//
// The chain slicer, conjugate, multiplier, angle, modulo pi/2, loop filter,
// accumulator, ROM and derotator follows the modem's frequency recovery block diagram,
// and one sample per symbol is used as the text says. The text's modulo
// 2*pi/M with M = 16 conflicts with the pi/2 of the block diagram and with the
// stated f_R/8 range; pi/2 is used. Closing the loop at the derotator output,
// reading the slicer as a quadrant slicer, the PI loop filter and its
// constants are this design's assumptions. The residual static phase (a
// multiple of 90 degrees is ambiguous) is left to phase_recovery.
module freq_recovery
  import modem_pkg::*;
#(
  parameter int unsigned W      = 12,
  parameter int unsigned ROM_AW = 10,
  parameter int unsigned ROM_W  = 10,
  parameter int unsigned KP_SH  = 3,
  parameter int unsigned KI_SH  = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output logic signed [23:0]  freq_word
);
  typedef logic signed [ROM_W-1:0] rom_t [2**ROM_AW];
  function automatic rom_t mk_sin();
    rom_t t;
    for (int k = 0; k < 2**ROM_AW; k++) t[k] = ROM_W'(sin_q(k, ROM_AW, 2**(ROM_W-1) - 1));
    return t;
  endfunction
  localparam rom_t SIN = mk_sin();
  localparam int   SH  = ROM_W - 1;

  logic [23:0]       phi_q;          // 16 angle bits + 8 fraction bits
  logic signed [31:0] integ_q;        // sum of Omega
  logic [ROM_AW-1:0] a;
  logic signed [31:0] c;
  logic signed [31:0] s;
  logic signed [31:0] yi;
  logic signed [31:0] yq;
  logic signed [31:0] si;
  logic signed [31:0] sq;
  logic signed [31:0] om;

  function automatic int sat_w(input int x);
    if (x >  2**(W-1) - 1) return 2**(W-1) - 1;
    if (x < -2**(W-1))     return -2**(W-1);
    return x;
  endfunction

  always_comb begin
    a  = phi_q[23 -: ROM_AW];
    c  = int'(SIN[a + ROM_AW'(2**ROM_AW / 4)]);
    s  = int'(SIN[a]);
    // Y = Z * (cos - j sin)
    yi = sat_w((int'(in_i) * c + int'(in_q) * s) >>> SH);
    yq = sat_w((int'(in_q) * c - int'(in_i) * s) >>> SH);
    // quadrant slicer: d = (+-1, +-1)
    si = (yi < 0) ? -1 : 1;
    sq = (yq < 0) ? -1 : 1;
    // Omega = angle(Y * conj(d)), within -pi/4..pi/4 (+-8192) for |I| and |Q| > 0
    om = cordic_angle(yi * si + yq * sq, yq * si - yi * sq);
  end

  assign freq_word = 24'(integ_q >>> (KI_SH - 8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi_q     <= '0;
      integ_q   <= 0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i   <= W'(yi);
        out_q   <= W'(yq);
        integ_q <= integ_q + om;
        phi_q   <= phi_q + 24'((om <<< 8) >>> KP_SH) + 24'(freq_word);
      end
    end
  end
endmodule
