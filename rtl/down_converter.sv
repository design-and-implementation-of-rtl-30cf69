// down_converter: digital quadrature demodulator from the IF samples.
//
// Every clock the ADC sample is multiplied by cos(phi) and -sin(phi) of a
// numerically controlled oscillator (phi += phase_inc), and R consecutive
// products are summed (a boxcar decimator, first-order CIC) to give one complex
// baseband sample at 4 samples per symbol. With the carrier at a quarter of the
// clock, the double-frequency term at fs/2 falls exactly in a null of the
// R-sample boxcar. The sum is shifted right by OUT_SH and saturated to OUT_W bits;
// out_valid pulses once every R clocks.
//
// The conversion to baseband is the modem's; the NCO, the boxcar decimator, the
// clock (32x symbol rate) and widths are this design's assumptions. phase_inc is
// a run-time input, so a receiver-side carrier offset can be set.
module down_converter
  import modem_pkg::*;
#(
  parameter int unsigned ADC_W  = 10,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned R      = 8,
  parameter int unsigned OUT_SH = 7,
  parameter int unsigned PH_W   = 32,
  parameter int unsigned ROM_AW = 8,
  parameter int unsigned ROM_W  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PH_W-1:0]         phase_inc,
  input  logic signed [ADC_W-1:0] adc,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q
);
  typedef logic signed [ROM_W-1:0] rom_t [2**ROM_AW];
  function automatic rom_t mk_sin();
    rom_t t;
    for (int k = 0; k < 2**ROM_AW; k++) t[k] = ROM_W'(sin_q(k, ROM_AW, 2**(ROM_W-1) - 1));
    return t;
  endfunction
  localparam rom_t SIN = mk_sin();

  logic [$clog2(R)-1:0] cnt_q;
  logic [PH_W-1:0]      ph_q;
  logic signed [31:0] acc_i_q;
  logic signed [31:0] acc_q_q;
  logic [ROM_AW-1:0]    a;
  logic signed [31:0] pi_s;
  logic signed [31:0] pq_s;

  function automatic logic signed [OUT_W-1:0] sat(input int v);
    int s;
    s = v >>> OUT_SH;
    if (s >  2**(OUT_W-1) - 1) s =  2**(OUT_W-1) - 1;
    if (s < -2**(OUT_W-1))     s = -2**(OUT_W-1);
    return OUT_W'(s);
  endfunction

  assign a = ph_q[PH_W-1 -: ROM_AW];
  always_comb begin
    pi_s =  int'(adc) * int'(SIN[a + ROM_AW'(2**ROM_AW / 4)]);
    pq_s = -int'(adc) * int'(SIN[a]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      ph_q      <= '0;
      acc_i_q   <= 0;
      acc_q_q   <= 0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      ph_q      <= ph_q + phase_inc;
      out_valid <= 1'b0;
      if (int'(cnt_q) == R - 1) begin
        cnt_q     <= '0;
        out_valid <= 1'b1;
        out_i     <= sat(acc_i_q + pi_s);
        out_q     <= sat(acc_q_q + pq_s);
        acc_i_q   <= 0;
        acc_q_q   <= 0;
      end else begin
        cnt_q   <= cnt_q + 1'b1;
        acc_i_q <= acc_i_q + pi_s;
        acc_q_q <= acc_q_q + pq_s;
      end
    end
  end
endmodule
