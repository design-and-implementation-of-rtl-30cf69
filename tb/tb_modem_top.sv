// tb_modem_top: end-to-end test of the modem, transmitter looped into receiver.
//
// A packet source sends NPKT MPEG-2 packets (0x47 followed by 187 pseudo-random
// bytes) into the transmitter. The DAC output is attenuated, delayed by a
// number of clocks that is not a multiple of the 32-clock symbol (a fractional
// symbol timing offset) and fed to the receiver ADC, whose carrier NCO is set
// a little off the transmitter's (a carrier frequency offset). Short impulse
// bursts hit the channel now and then to create byte errors for the
// Reed-Solomon decoder. The received packets are compared byte for byte with
// the sent ones, and each mechanism is counted: frame lock, inverted sync
// bytes (PRBS groups), RS corrections, AGC gain adaptation, timing and
// frequency loop activity. All parameters of the modem are at their defaults.
module tb_modem_top;
  import modem_pkg::*;

  localparam int NPKT      = 64;
  localparam int DELAY     = 13;           // clocks; 13/32 of a symbol
  localparam int FOFS      = 1048576;      // NCO increment offset, 2^20: 40 kHz
  localparam int MAXCYC    = 1200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #3 clk = ~clk;

  logic [7:0]  tx_data;
  logic        tx_valid;
  logic        tx_sop;
  logic        tx_ready;
  logic [9:0]  dac_out;
  logic        tx_underrun;
  logic [9:0]  adc_in;
  logic [7:0]  rx_data;
  logic        rx_valid, rx_sop, rx_err, rx_frame_lock, rx_cw_done, rx_rs_overrun;
  logic [3:0]  rx_cw_nerr;
  logic [13:0] rx_agc_gain;
  logic signed [23:0] rx_freq_word;
  logic [7:0]  rx_phase;

  modem_top dut (
    .clk, .rst_n, .diff_en(1'b1),
    .tx_nco_inc(32'h4000_0000), .tx_data, .tx_valid, .tx_sop, .tx_ready,
    .dac_out, .tx_underrun,
    .rx_nco_inc(32'h4000_0000 + FOFS), .adc_in,
    .rx_data, .rx_valid, .rx_sop, .rx_err, .rx_frame_lock, .rx_cw_done,
    .rx_cw_nerr, .rx_rs_overrun, .rx_agc_gain, .rx_freq_word, .rx_phase
  );

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  // ---------------------------------------------------------------- source
  logic [7:0] sent [NPKT][188];
  int         src_pkt = 0;
  int         src_byte = 0;
  int unsigned lfsr = 32'h1234_5678;

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      sent[p][0] = SYNC_BYTE;
      for (int b = 1; b < 188; b++) begin
        lfsr = lfsr * 1103515245 + 12345;
        sent[p][b] = lfsr[23:16];
      end
    end
  end

  assign tx_valid = src_pkt < NPKT;
  assign tx_data  = (src_pkt < NPKT) ? sent[src_pkt % NPKT][src_byte] : 8'h00;
  assign tx_sop   = (src_byte == 0);

  always_ff @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (src_byte == 187) begin
      src_byte <= 0;
      src_pkt  <= src_pkt + 1;
    end else src_byte <= src_byte + 1;
  end

  // ---------------------------------------------------------------- channel
  logic signed [9:0] dline [DELAY];
  int burst = 0;
  int n_bursts = 0;
  always_ff @(posedge clk) begin
    int v;
    dline[0] <= dac_out;
    for (int k = 1; k < DELAY; k++) dline[k] <= dline[k-1];
    v = (int'(dline[DELAY-1]) * 13) / 16;
    if (cyc % 200000 == 150000) begin
      burst    <= 24;
      n_bursts <= n_bursts + 1;
    end else if (burst > 0) burst <= burst - 1;
    if (burst > 0) v = (burst % 2 == 0) ? 400 : -400;
    adc_in <= 10'(v);
  end

  // ---------------------------------------------------------------- sink
  int rx_pkt_ok = 0, rx_pkt_err = 0, rx_pkt_bad = 0;
  int rx_byte = 0;
  int match_pkt = -1;
  logic [7:0] rx_buf [188];
  logic       rx_buf_err;
  int n_lock = 0, n_inv_sync = 0, n_rs_corr = 0, n_underrun = 0, n_overrun = 0;
  logic lock_d = 1'b0;

  always_ff @(posedge clk) if (rst_n) begin
    if (rx_frame_lock && !lock_d) n_lock <= n_lock + 1;
    lock_d <= rx_frame_lock;
    if (dut.rd_valid && dut.rd_sop && dut.rd_data == SYNC_INV) n_inv_sync <= n_inv_sync + 1;
    if (rx_cw_done && rx_cw_nerr != 0) n_rs_corr <= n_rs_corr + 1;
    if (tx_underrun && src_pkt > 0 && src_pkt < NPKT) n_underrun <= n_underrun + 1;
    if (rx_rs_overrun) n_overrun <= n_overrun + 1;
    if (rx_valid) begin
      int idx;
      idx = rx_sop ? 0 : rx_byte;
      rx_buf[idx] = rx_data;
      if (rx_sop) rx_buf_err = rx_err;
      rx_byte <= idx + 1;
      if (idx == 187) begin
        if (rx_buf_err) rx_pkt_err <= rx_pkt_err + 1;
        else begin
          // find the packet: the first good packet fixes the alignment
          int m;
          int ok;
          m = -1;
          for (int p = 0; p < NPKT; p++) begin
            ok = 1;
            for (int b = 0; b < 188; b++) if (rx_buf[b] != sent[p][b]) ok = 0;
            if (ok == 1 && m < 0) m = p;
          end
          checks = checks + 1;
          if (m < 0 || (match_pkt >= 0 && m != match_pkt + 1)) begin
            failures = failures + 1;
            rx_pkt_bad <= rx_pkt_bad + 1;
            $display("bad packet at cycle %0d (matched %0d, expected %0d)", cyc, m, match_pkt + 1);
          end else rx_pkt_ok <= rx_pkt_ok + 1;
          if (m >= 0) match_pkt <= m;
        end
      end
    end
  end

  task automatic expect_cnt(string what, int n, int min);
    checks = checks + 1;
    if (n < min) begin
      failures = failures + 1;
      $display("FAIL: %s happened %0d times, expected at least %0d", what, n, min);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (cyc < MAXCYC && src_pkt < NPKT) @(posedge clk);
    repeat (40000) @(posedge clk);
    expect_cnt("good packets received", rx_pkt_ok, NPKT - 40);
    expect_cnt("frame lock acquired", n_lock, 1);
    expect_cnt("inverted sync bytes (PRBS groups)", n_inv_sync, 2);
    expect_cnt("codewords with RS corrections", n_rs_corr, 1);
    expect_cnt("impulse bursts", n_bursts, 1);
    expect_cnt("AGC gain moved off 1.0", (rx_agc_gain != 14'd256) ? 1 : 0, 1);
    // the receiver NCO runs FOFS/2^32 turns per clock fast, 32 clocks per symbol, so the
    // loop must report -FOFS*32/2^32 turns per symbol = -FOFS/8 in 2^-24 turns (2% allowed)
    expect_cnt("frequency estimate within 2% of the offset",
               (int'(rx_freq_word) + FOFS / 8 < FOFS / 400 &&
                int'(rx_freq_word) + FOFS / 8 > -FOFS / 400) ? 1 : 0, 1);
    checks = checks + 2;
    if (n_underrun != 0) begin failures++; $display("FAIL: %0d transmitter underruns", n_underrun); end
    if (n_overrun != 0)  begin failures++; $display("FAIL: %0d RS decoder overruns", n_overrun); end
    $display("packets: ok=%0d err=%0d bad=%0d, agc gain=%0d freq=%0d phase=%0d",
             rx_pkt_ok, rx_pkt_err, rx_pkt_bad, rx_agc_gain, rx_freq_word, rx_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == MAXCYC + 100000) begin
      failures = failures + 1;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
