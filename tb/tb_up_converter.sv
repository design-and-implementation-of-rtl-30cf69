// tb_up_converter: drives random baseband samples into the up-converter with
// the nominal quarter-rate carrier and with a random carrier word, and compares
// every DAC sample against a reference built from real-valued sine/cosine
// (rounded to the same 8-bit table). Checks sample_tick comes every R clocks
// and, at the quarter-rate carrier, that the output cycles through I, -Q, -I, Q
// (scaled by 127/128, saturated to 10 bits) while the input is held.
module tb_up_converter;
  import modem_pkg::*;
  localparam int R = 8;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic [31:0] phase_inc = 32'h4000_0000;
  logic sample_tick, in_valid = 0;
  logic signed [10:0] in_i = 0, in_q = 0;
  logic signed [9:0] dac;
  int checks = 0, failures = 0;

  up_converter #(.R(R)) dut (.*);

  function automatic int tsin(int a);   // 256-entry table, amplitude 127
    return $rtoi($floor(127.0 * $sin(2.0 * 3.14159265358979 * a / 256.0) + 0.5));
  endfunction

  logic [31:0] ph = 0;
  int hi = 0, hq = 0, exp_dac = 0, cyc = 0, last_tick = -1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) phase_inc = $urandom;
      in_valid = sample_tick;
      in_i = 11'($urandom % 1400) - 11'sd700;
      in_q = 11'($urandom % 1400) - 11'sd700;
      if (sample_tick) begin
        checks++;
        if (last_tick >= 0 && n - last_tick != R) failures++;
        last_tick = n;
      end
      // model of the register update at the coming edge
      begin
        int a, m;
        a = ph[31:24];
        m = (hi * tsin((a + 64) % 256) - hq * tsin(a)) >>> 7;
        if (m > 511) m = 511;
        if (m < -512) m = -512;
        exp_dac = m;
      end
      if (in_valid) begin
        hi = in_i;
        hq = in_q;
      end
      ph = ph + phase_inc;
      @(negedge clk);
      checks++;
      if (int'(dac) != exp_dac) begin
        failures++;
        if (failures < 5) $display("n=%0d dac=%0d expected %0d", n, dac, exp_dac);
      end
      // I, -Q, -I, Q pattern: held sample and quarter-rate carrier
      if (n < 2000 && n > 16 && n - last_tick >= 2 && ph[29:0] == 0) begin
        int want;
        case (ph[31:30] - 2'd1)
          2'd0: want = (hi * 127) >>> 7;
          2'd1: want = (-hq * 127) >>> 7;
          2'd2: want = (-hi * 127) >>> 7;
          default: want = (hq * 127) >>> 7;
        endcase
        if (want > 511) want = 511;
        if (want < -512) want = -512;
        checks++;
        if (int'(dac) != want) begin failures++; if (failures < 5) $display("pat n=%0d q=%0d dac=%0d want=%0d hi=%0d hq=%0d", n, ph[31:30], dac, want, hi, hq); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
