// up_converter: digital quadrature modulator to the IF carrier.
//
// The baseband I/Q from the pulse shaper (4 samples per symbol) is held for R
// clock cycles (zero-order-hold interpolation) and mixed with a numerically
// controlled oscillator running at the clock rate:
//     dac = I*cos(phi) - Q*sin(phi),   phi += phase_inc every clock.
// The module also generates sample_tick, one pulse every R clocks, which paces
// the pulse shaper and through it the whole transmitter. The sine table has
// 2^ROM_AW entries of amplitude 2^(ROM_W-1)-1 built at elaboration; the phase
// accumulator is PH_W bits and its top ROM_AW bits address the table.
//
// Timing assumption: with R = 8 and 4 samples per symbol the clock is 32 times
// the symbol rate, i.e. 163.84 MHz for 5.12 Msymbol/s (20.48 Mbit/s), and the
// 40.96 MHz carrier of the modem is exactly a quarter of it (phase_inc =
// 2^PH_W/4). The carrier frequency and data rate are the modem's; the clock,
// the hold interpolation and the widths are this design's choice. The output is
// saturated to DAC_W bits, two's complement, registered.
module up_converter
  import modem_pkg::*;
#(
  parameter int unsigned IN_W   = 11,
  parameter int unsigned DAC_W  = 10,
  parameter int unsigned R      = 8,
  parameter int unsigned PH_W   = 32,
  parameter int unsigned ROM_AW = 8,
  parameter int unsigned ROM_W  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PH_W-1:0]         phase_inc,
  output logic                    sample_tick,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic signed [DAC_W-1:0] dac
);
  typedef logic signed [ROM_W-1:0] rom_t [2**ROM_AW];
  function automatic rom_t mk_sin();
    rom_t t;
    for (int k = 0; k < 2**ROM_AW; k++) t[k] = ROM_W'(sin_q(k, ROM_AW, 2**(ROM_W-1) - 1));
    return t;
  endfunction
  localparam rom_t SIN = mk_sin();
  localparam int   SH  = ROM_W - 1;

  logic [$clog2(R)-1:0]   div_q;
  logic [PH_W-1:0]        ph_q;
  logic signed [IN_W-1:0] hi_q;
  logic signed [IN_W-1:0] hq_q;
  logic [ROM_AW-1:0]      a;
  logic signed [31:0] mix;

  assign sample_tick = (div_q == 0);
  assign a = ph_q[PH_W-1 -: ROM_AW];

  always_comb begin
    mix = (int'(hi_q) * int'(SIN[a + ROM_AW'(2**ROM_AW / 4)]) -
           int'(hq_q) * int'(SIN[a])) >>> SH;
    if (mix >  2**(DAC_W-1) - 1) mix =  2**(DAC_W-1) - 1;
    if (mix < -2**(DAC_W-1))     mix = -2**(DAC_W-1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0;
      ph_q  <= '0;
      hi_q  <= '0;
      hq_q  <= '0;
      dac   <= '0;
    end else begin
      div_q <= (int'(div_q) == R - 1) ? '0 : div_q + 1'b1;
      ph_q  <= ph_q + phase_inc;
      if (in_valid) begin
        hi_q <= in_i;
        hq_q <= in_q;
      end
      dac <= DAC_W'(mix);
    end
  end
endmodule
