// tb_agc: drives random 16-QAM points at three input amplitudes (level 1 = 40,
// 128 and 300) and checks that (1) each output equals the input times the
// reported gain, shifted right by 8 and saturated; (2) after settling, the mean
// of (|I|+|Q|)*181/256 of the output is within 2% of the reference 330; (3) the
// gain moves in the right direction after each step of the input level.
module tb_agc;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_i = 0, in_q = 0, out_i, out_q;
  logic [13:0] gain;
  int checks = 0, failures = 0;

  agc dut (.*);

  function automatic int sat12(int v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  int scales [3] = '{40, 128, 300};
  int prev_gain = 256;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (scales[s]) begin
      real sum;
      int cnt;
      sum = 0.0; cnt = 0;
      for (int n = 0; n < 60000; n++) begin
        int g, ei, eq;
        in_valid = 1;
        in_i = 12'((2 * int'($urandom % 4) - 3) * scales[s]);
        in_q = 12'((2 * int'($urandom % 4) - 3) * scales[s]);
        #1;
        g = int'(gain);
        ei = sat12((int'(in_i) * g) >>> 8);
        eq = sat12((int'(in_q) * g) >>> 8);
        @(negedge clk);
        in_valid = n % 3 == 0;              // also run with gaps
        checks++;
        if (!out_valid || int'(out_i) != ei || int'(out_q) != eq) failures++;
        if (n >= 50000) begin
          sum += real'((((out_i < 0) ? -int'(out_i) : int'(out_i)) +
                        ((out_q < 0) ? -int'(out_q) : int'(out_q))) * 181 / 256);
          cnt++;
        end
        if (n == 100) begin
          checks++;
          if (s != 1 && !((scales[s] < 128) ? (int'(gain) > prev_gain) : (int'(gain) < prev_gain)))
            failures++;
        end
        if (in_valid == 0) @(negedge clk);
        in_valid = 0;
      end
      $display("level %0d: gain %0d, mean r_c %0.1f", scales[s], gain, sum / cnt);
      checks++;
      if (sum / cnt < 330.0 * 0.98 || sum / cnt > 330.0 * 1.02) failures++;
      prev_gain = int'(gain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
