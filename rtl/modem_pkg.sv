// modem_pkg: constants, types and elaboration-time table generators shared by the
// 16-QAM downlink modem.
//
// What lives here:
//  * stream constants of the MPEG-2 / Reed-Solomon framing (188-byte packets,
//    204-byte codewords, sync byte 0x47 and its inversion 0xB8, 8-packet
//    randomizer super-frame, interleaver depth 12 with branch step 17);
//  * the 16-QAM level convention used between the mapper and the slicers
//    (levels -3,-1,+1,+3, carried in 3-bit two's complement);
//  * GF(256) arithmetic for the Reed-Solomon coder (field polynomial
//    x^8+x^4+x^3+x^2+1, primitive element alpha = 2);
//  * constant functions that build the square-root raised-cosine taps
//    (roll-off 0.35, 41 taps, 4 samples per symbol, 7-bit signed coefficients)
//    and the sine look-up tables of the carrier synthesizers. They are
//    evaluated at elaboration and end up as constant arrays (ROMs).
//
// The roll-off, tap count, oversampling, coefficient width, RS code, interleaver
// depth and PRBS are the modem's specification; the field polynomial, the RS
// generator roots (alpha^0..alpha^15), the interleaver branch step and the
// sync-inversion scheme are those of the DVB-C cable standard that this
// specification follows, and are this design's reading of it.
package modem_pkg;

  // ---------------------------------------------------------------- framing
  localparam int unsigned PKT_LEN      = 188;   // MPEG-2 transport packet
  localparam int unsigned RS_N         = 204;   // codeword length
  localparam int unsigned RS_K         = 188;   // information bytes
  localparam int unsigned RS_2T        = RS_N - RS_K; // 16 parity bytes, T=8
  localparam logic [7:0]  SYNC_BYTE    = 8'h47;
  localparam logic [7:0]  SYNC_INV     = 8'hB8;
  localparam int unsigned SUPERFRAME   = 8;     // packets per PRBS period
  localparam int unsigned IL_DEPTH     = 12;    // interleaver branches I
  localparam int unsigned IL_STEP      = RS_N / IL_DEPTH; // M = 17 bytes

  // Energy-dispersal PRBS 1 + X^14 + X^15, register bits 1..15 loaded with
  // 100101010000000 (bit 1 first).
  localparam logic [15:1] PRBS_INIT    = 15'b000000010101001;

  typedef struct packed {
    logic [15:1] state;
    logic [7:0]  bits;                  // next 8 PRBS bits, first bit in [7]
  } prbs_step_t;

  // Eight steps of the generator: each step emits r14 ^ r15 and shifts it in at r1.
  function automatic prbs_step_t prbs_step8(input logic [15:1] st);
    prbs_step_t r;
    logic fb;
    r.state = st;
    for (int k = 7; k >= 0; k--) begin
      fb         = r.state[14] ^ r.state[15];
      r.bits[k]  = fb;
      r.state    = {r.state[14:1], fb};
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- 16-QAM
  typedef logic [3:0]        sym_t;     // {A, B, b1, b0}: A,B select quadrant
  typedef logic signed [2:0] lvl_t;     // -3, -1, +1, +3

  typedef struct packed {
    lvl_t i;
    lvl_t q;
  } qam_pt_t;

  // Quadrant bits {A,B} (= {I_k,Q_k}) are Gray-coded quadrant numbers:
  // 00 -> 0 (I>0,Q>0), 10 -> 1 (I<0,Q>0), 11 -> 2 (I<0,Q<0), 01 -> 3 (I>0,Q<0).
  // Each quadrant is the first one rotated by 90 degrees times its number, so a
  // 90-degree rotation of the constellation changes only {A,B}.
  function automatic logic [1:0] quad_num(input logic [1:0] ab);
    unique case (ab)
      2'b00: return 2'd0;
      2'b10: return 2'd1;
      2'b11: return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  function automatic logic [1:0] quad_bits(input logic [1:0] n);
    unique case (n)
      2'd0: return 2'b00;
      2'd1: return 2'b10;
      2'd2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  // 4-bit symbol to constellation point. In the first quadrant the two low
  // bits pick 00 -> (1,1), 01 -> (3,1), 10 -> (1,3), 11 -> (3,3).
  function automatic qam_pt_t qam_map(input sym_t s);
    lvl_t x;
    lvl_t y;
    lvl_t t;
    x = s[0] ? 3'sd3 : 3'sd1;
    y = s[1] ? 3'sd3 : 3'sd1;
    for (int k = 0; k < 3; k++)
      if (int'(quad_num(s[3:2])) > k) begin   // rotate by +90 degrees
        t = x;
        x = -y;
        y = t;
      end
    return '{i: x, q: y};
  endfunction

  // Inverse of qam_map for a point on the grid.
  function automatic sym_t qam_demap(input qam_pt_t p);
    logic [1:0] n;
    lvl_t x;
    lvl_t y;
    lvl_t t;
    if (p.i > 0) n = (p.q > 0) ? 2'd0 : 2'd3;
    else         n = (p.q > 0) ? 2'd1 : 2'd2;
    x = p.i;
    y = p.q;
    for (int k = 0; k < 3; k++)
      if (int'(n) > k) begin                  // rotate by -90 degrees
        t = x;
        x = y;
        y = -t;
      end
    return {quad_bits(n), (y == 3'sd3), (x == 3'sd3)};
  endfunction

  // Hard decision of one rail: v in units where level 1 = `unit`.
  function automatic lvl_t slice_lvl(input int v, input int unit);
    if (v < -2 * unit) return -3'sd3;
    if (v < 0)         return -3'sd1;
    if (v < 2 * unit)  return 3'sd1;
    return 3'sd3;
  endfunction

  // ---------------------------------------------------------------- GF(256)
  localparam logic [8:0] GF_POLY = 9'h11D;

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ GF_POLY[7:0]) : (aa << 1);
    end
    return p;
  endfunction

  // alpha^e for 0 <= e < 255
  function automatic logic [7:0] gf_pow_alpha(input int e);
    logic [7:0] r;
    r = 8'd1;
    for (int i = 0; i < (e % 255); i++) r = gf_mul(r, 8'd2);
    return r;
  endfunction

  // a^-1 = a^254 (a != 0), by square-and-multiply
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'd1;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- SRRC
  localparam int    SRRC_TAPS = 41;
  localparam int    SRRC_SPS  = 4;
  localparam real   SRRC_ROLL = 0.35;
  localparam int    SRRC_CW   = 7;      // coefficient width, signed
  localparam real   M_PI      = 3.14159265358979323846;

  typedef logic signed [SRRC_CW-1:0] coef_t;
  typedef coef_t srrc_tab_t [SRRC_TAPS];

  function automatic real srrc_at(input real t);   // t in symbol periods
    real a;
    a = SRRC_ROLL;
    if (t < 1.0e-9 && t > -1.0e-9)
      return 1.0 - a + 4.0 * a / M_PI;
    if ((t * 4.0 * a - 1.0) < 1.0e-9 && (t * 4.0 * a - 1.0) > -1.0e-9 ||
        (t * 4.0 * a + 1.0) < 1.0e-9 && (t * 4.0 * a + 1.0) > -1.0e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / M_PI) * $sin(M_PI / (4.0 * a)) +
                               (1.0 - 2.0 / M_PI) * $cos(M_PI / (4.0 * a)));
    return ($sin(M_PI * t * (1.0 - a)) + 4.0 * a * t * $cos(M_PI * t * (1.0 + a))) /
           (M_PI * t * (1.0 - (4.0 * a * t) * (4.0 * a * t)));
  endfunction

  // h[n] = round(63 * p((n-20)/4) / p(0)), p the SRRC impulse response
  function automatic srrc_tab_t srrc_taps();
    srrc_tab_t h;
    real peak;
    real v;
    peak = srrc_at(0.0);
    for (int n = 0; n < SRRC_TAPS; n++) begin
      v = srrc_at(real'(n - (SRRC_TAPS - 1) / 2) / real'(SRRC_SPS));
      h[n] = coef_t'($rtoi($floor(v / peak * real'(2 ** (SRRC_CW - 1) - 1) + 0.5)));
    end
    return h;
  endfunction

  localparam srrc_tab_t SRRC_H = srrc_taps();
  localparam int SRRC_SUM = 227;        // sum of SRRC_H, DC gain of the filter

  // ---------------------------------------------------------------- sine ROM
  // round(amp * sin(2*pi*k / 2^N)) for k = idx
  function automatic int sin_q(input int idx, input int n_bits, input int amp);
    return $rtoi($floor(real'(amp) * $sin(2.0 * M_PI * real'(idx) / real'(2 ** n_bits)) + 0.5));
  endfunction

  // ---------------------------------------------------------------- angle
  // atan2(y, x) by 14 CORDIC vectoring iterations; result in units where
  // 2^16 = 2*pi (so +-32768 = +-pi). Inputs up to +-2^20.
  typedef int atan_tab_t [14];
  function automatic atan_tab_t mk_atan();
    atan_tab_t t;
    for (int k = 0; k < 14; k++)
      t[k] = $rtoi($floor($atan(1.0 / real'(2 ** k)) / (2.0 * M_PI) * 65536.0 + 0.5));
    return t;
  endfunction
  localparam atan_tab_t CORDIC_ATAN = mk_atan();

  function automatic int cordic_angle(input int x, input int y);
    int xx;
    int yy;
    int a;
    int t;
    a  = 0;
    xx = x <<< 4;
    yy = y <<< 4;
    if (xx < 0) begin                        // move to the right half-plane
      xx = -xx;
      yy = -yy;
      a  = 32768;
    end
    for (int k = 0; k < 14; k++) begin
      t = xx;
      if (yy > 0) begin
        xx = xx + (yy >>> k);
        yy = yy - (t >>> k);
        a  = a + CORDIC_ATAN[k];
      end else begin
        xx = xx - (yy >>> k);
        yy = yy + (t >>> k);
        a  = a - CORDIC_ATAN[k];
      end
    end
    // wrap to -32768 .. 32767
    return int'($signed(16'(a)));
  endfunction

endpackage
