// tb_matched_filter: checks the receive filter against a reference convolution
// with the package taps. Part 1 sends an impulse of 200 on I and -100 on Q and
// checks the 41 outputs equal (200*h[k])>>8 and (-100*h[k])>>8. Part 2 sends
// 3000 random samples, with in_valid gaps, and compares each output to the
// saturated, shifted convolution sum; out_valid must follow in_valid by one
// cycle.
module tb_matched_filter;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_i = 0, in_q = 0, out_i, out_q;
  int checks = 0, failures = 0;

  matched_filter dut (.*);

  int xi [$];
  int xq [$];

  function automatic int sat12(longint v);
    longint s;
    s = v >>> 8;
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return int'(s);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3100; n++) begin
      int vi, vq;
      if (n < 100) begin
        vi = (n == 10) ? 200 : 0;
        vq = (n == 10) ? -100 : 0;
      end else if (n < 2000) begin
        vi = int'($urandom % 1600) - 800;
        vq = int'($urandom % 1600) - 800;
      end else begin                         // full scale: exercises saturation
        vi = ($urandom % 2) ? 2047 : -2048;
        vq = ($urandom % 2) ? 2047 : -2048;
      end
      while ($urandom % 4 == 0) begin        // idle cycle
        in_valid = 0;
        @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
      in_valid = 1;
      in_i = 12'(vi);
      in_q = 12'(vq);
      xi.push_back(vi);
      xq.push_back(vq);
      @(negedge clk);
      in_valid = 0;
      begin
        longint ai, aq;
        ai = 0; aq = 0;
        for (int k = 0; k < SRRC_TAPS; k++)
          if (n - k >= 0) begin
            ai += longint'(SRRC_H[k]) * xi[n-k];
            aq += longint'(SRRC_H[k]) * xq[n-k];
          end
        checks++;
        if (!out_valid || int'(out_i) != sat12(ai) || int'(out_q) != sat12(aq)) begin
          failures++;
          if (failures < 5) $display("n=%0d (%0d,%0d) expected (%0d,%0d)", n, out_i, out_q, sat12(ai), sat12(aq));
        end
        if (n >= 10 && n <= 50) begin
          checks++;
          if (int'(out_i) != (200 * int'(SRRC_H[n-10])) >>> 8 ||
              int'(out_q) != (-100 * int'(SRRC_H[n-10])) >>> 8) failures++;
        end
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
