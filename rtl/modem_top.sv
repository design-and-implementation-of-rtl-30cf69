// modem_top: 16-QAM downlink modem, transmitter and receiver in one device.
//
// Transmitter (base station): MPEG-2 packets from the MAC (tx_data/tx_valid/
// tx_sop, accepted when tx_ready) are scrambled (sync_randomizer), RS(204,188)
// encoded (rs_encoder), convolutionally interleaved (conv_interleaver), cut into
// 4-bit symbols and differentially encoded (diff_encoder), mapped onto 16-QAM
// (qam_mapper), shaped by a square-root raised-cosine filter at 4 samples per
// symbol (pulse_shaper) and modulated onto the IF carrier (up_converter) for
// the DAC. The transmitter is paced from the DAC end: the up-converter's sample
// tick drives the pulse shaper, which pulls symbols, which pull bytes.
//
// Receiver (subscriber): ADC samples are brought to baseband (down_converter),
// matched filtered (matched_filter), gain controlled (agc), timing recovered
// (symbol_timing_recovery), frequency and phase corrected (freq_recovery,
// phase_recovery), sliced (qam_demapper), differentially decoded
// (diff_decoder), aligned to bytes and codewords (frame_sync), deinterleaved
// (conv_deinterleaver), RS decoded (rs_decoder) and descrambled (derandomizer)
// into rx_data packets with rx_sop and rx_err.
//
// One clock, CLK = 32 x symbol rate (163.84 MHz for 20.48 Mbit/s), for both
// directions; the DAC and ADC run at that rate. Analog parts (DAC, ADC,
// filters, IF/RF units) are outside: dac_out and adc_in are their digital
// sides. tx_nco_inc / rx_nco_inc set the carrier (2^30 = a quarter of the
// clock = 40.96 MHz). The adaptive equalizer the document names is not part of
// this design. Widths, clocking and loop constants are this design's choices.
// A few block outputs have no use at this level and stay open: the
// interleaver's start-of-packet flag and the mapper's valid (the transmit path
// runs continuously), the timing loop's control word and the phase loop's own
// decision (the demapper slices again).
module modem_top
  import modem_pkg::*;
#(
  parameter int unsigned R     = 8,     // clocks per baseband sample
  parameter int unsigned DAC_W = 10,
  parameter int unsigned ADC_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              diff_en,
  // transmitter
  input  logic [31:0]       tx_nco_inc,
  input  logic [7:0]        tx_data,
  input  logic              tx_valid,
  input  logic              tx_sop,
  output logic              tx_ready,
  output logic [DAC_W-1:0]  dac_out,
  output logic              tx_underrun,
  // receiver
  input  logic [31:0]       rx_nco_inc,
  input  logic [ADC_W-1:0]  adc_in,
  output logic [7:0]        rx_data,
  output logic              rx_valid,
  output logic              rx_sop,
  output logic              rx_err,
  output logic              rx_frame_lock,
  output logic              rx_cw_done,
  output logic [3:0]        rx_cw_nerr,
  output logic              rx_rs_overrun,
  output logic [13:0]       rx_agc_gain,
  output logic signed [23:0] rx_freq_word,
  output logic [7:0]        rx_phase
);
  localparam int unsigned BB_W = 11;    // transmit baseband width
  localparam int unsigned W    = 12;    // receive baseband width

  // ================================================================ transmitter
  logic       rnd_valid;
  logic [7:0] rnd_data;
  logic       rnd_sop;
  logic       rs_ready;
  logic       enc_valid;
  logic [7:0] enc_data;
  logic       enc_sop;
  logic       il_valid;
  logic [7:0] il_data;
  logic       il_sop;
  logic       byte_req;
  logic       sym_take;
  sym_t       tx_sym;
  logic       map_valid;
  qam_pt_t    tx_pt;
  logic       sample_tick;
  logic       ps_valid;
  logic signed [BB_W-1:0] ps_i;
  logic signed [BB_W-1:0] ps_q;
  logic signed [DAC_W-1:0] dac_s;

  assign tx_ready = rs_ready;

  sync_randomizer u_rand (
    .clk, .rst_n,
    .in_valid (tx_valid && rs_ready), .in_data (tx_data), .in_sop (tx_sop),
    .out_valid(rnd_valid), .out_data(rnd_data), .out_sop(rnd_sop)
  );

  rs_encoder u_rsenc (
    .clk, .rst_n, .tick(byte_req), .in_ready(rs_ready),
    .in_valid(rnd_valid), .in_data(rnd_data), .in_sop(rnd_sop),
    .out_valid(enc_valid), .out_data(enc_data), .out_sop(enc_sop)
  );

  conv_interleaver u_il (
    .clk, .rst_n,
    .in_valid(enc_valid), .in_data(enc_data), .in_sop(enc_sop),
    .out_valid(il_valid), .out_data(il_data), .out_sop(il_sop)
  );

  diff_encoder u_denc (
    .clk, .rst_n, .diff_en,
    .in_valid(il_valid), .in_data(il_data), .byte_req,
    .sym_take, .sym(tx_sym), .underrun(tx_underrun)
  );

  qam_mapper u_map (
    .clk, .rst_n, .in_valid(1'b1), .in_sym(tx_sym),
    .out_valid(map_valid), .out_pt(tx_pt)
  );

  pulse_shaper #(.OUT_W(BB_W)) u_ps (
    .clk, .rst_n, .sample_tick, .in_pt(tx_pt), .sym_take,
    .out_valid(ps_valid), .out_i(ps_i), .out_q(ps_q)
  );

  up_converter #(.IN_W(BB_W), .DAC_W(DAC_W), .R(R)) u_up (
    .clk, .rst_n, .phase_inc(tx_nco_inc), .sample_tick,
    .in_valid(ps_valid), .in_i(ps_i), .in_q(ps_q), .dac(dac_s)
  );
  assign dac_out = dac_s;

  // ================================================================ receiver
  logic                dc_valid;
  logic signed [W-1:0] dc_i, dc_q;
  logic                mf_valid;
  logic signed [W-1:0] mf_i, mf_q;
  logic                agc_valid;
  logic signed [W-1:0] agc_i, agc_q;
  logic                str_valid;
  logic signed [W-1:0] str_i, str_q;
  logic signed [15:0]  str_ctl;
  logic                fr_valid;
  logic signed [W-1:0] fr_i, fr_q;
  logic                pr_valid;
  logic signed [W-1:0] pr_i, pr_q;
  qam_pt_t             pr_dec;
  logic                dm_valid;
  sym_t                dm_sym;
  logic                dd_valid;
  sym_t                dd_sym;
  logic                fs_valid;
  logic [7:0]          fs_data;
  logic                fs_sop;
  logic                di_valid;
  logic [7:0]          di_data;
  logic                di_sop;
  logic                rd_valid;
  logic [7:0]          rd_data;
  logic                rd_sop;
  logic                rd_err;

  down_converter #(.ADC_W(ADC_W), .OUT_W(W), .R(R)) u_dc (
    .clk, .rst_n, .phase_inc(rx_nco_inc), .adc(adc_in),
    .out_valid(dc_valid), .out_i(dc_i), .out_q(dc_q)
  );

  matched_filter #(.IN_W(W), .OUT_W(W)) u_mf (
    .clk, .rst_n, .in_valid(dc_valid), .in_i(dc_i), .in_q(dc_q),
    .out_valid(mf_valid), .out_i(mf_i), .out_q(mf_q)
  );

  agc #(.W(W)) u_agc (
    .clk, .rst_n, .in_valid(mf_valid), .in_i(mf_i), .in_q(mf_q),
    .out_valid(agc_valid), .out_i(agc_i), .out_q(agc_q), .gain(rx_agc_gain)
  );

  symbol_timing_recovery #(.W(W)) u_str (
    .clk, .rst_n, .in_valid(agc_valid), .in_i(agc_i), .in_q(agc_q),
    .out_valid(str_valid), .out_i(str_i), .out_q(str_q), .timing_ctl(str_ctl)
  );

  freq_recovery #(.W(W)) u_fr (
    .clk, .rst_n, .in_valid(str_valid), .in_i(str_i), .in_q(str_q),
    .out_valid(fr_valid), .out_i(fr_i), .out_q(fr_q), .freq_word(rx_freq_word)
  );

  phase_recovery #(.W(W)) u_pr (
    .clk, .rst_n, .in_valid(fr_valid), .in_i(fr_i), .in_q(fr_q),
    .out_valid(pr_valid), .out_i(pr_i), .out_q(pr_q), .out_dec(pr_dec),
    .phase(rx_phase)
  );

  qam_demapper #(.W(W)) u_dm (
    .clk, .rst_n, .in_valid(pr_valid), .in_i(pr_i), .in_q(pr_q),
    .out_valid(dm_valid), .out_sym(dm_sym)
  );

  diff_decoder u_ddec (
    .clk, .rst_n, .diff_en, .in_valid(dm_valid), .in_sym(dm_sym),
    .out_valid(dd_valid), .out_sym(dd_sym)
  );

  frame_sync u_fs (
    .clk, .rst_n, .in_valid(dd_valid), .in_sym(dd_sym),
    .out_valid(fs_valid), .out_data(fs_data), .out_sop(fs_sop), .locked(rx_frame_lock)
  );

  conv_deinterleaver u_dil (
    .clk, .rst_n, .in_valid(fs_valid), .in_data(fs_data), .in_sop(fs_sop),
    .out_valid(di_valid), .out_data(di_data), .out_sop(di_sop)
  );

  rs_decoder u_rsdec (
    .clk, .rst_n, .in_valid(di_valid), .in_data(di_data), .in_sop(di_sop),
    .out_valid(rd_valid), .out_data(rd_data), .out_sop(rd_sop), .out_err(rd_err),
    .cw_done(rx_cw_done), .cw_nerr(rx_cw_nerr), .overrun(rx_rs_overrun)
  );

  derandomizer u_derand (
    .clk, .rst_n, .in_valid(rd_valid), .in_data(rd_data), .in_sop(rd_sop), .in_err(rd_err),
    .out_valid(rx_valid), .out_data(rx_data), .out_sop(rx_sop), .out_err(rx_err)
  );
endmodule
