// tb_phase_recovery: random 16-QAM symbols (level 1 = 128) with a carrier phase
// offset, one symbol every 4 clocks. Runs: static offsets of +12 and -15
// degrees, and +10 degrees plus a residual drift of 0.0002 turn per symbol
// (left over by the frequency loop; the second-order loop must follow it).
// Checks: (1) after 3000 symbols the synthesized 8-bit phase equals the
// applied phase within 2 steps of 1.4 degrees; (2) from then on every decision
// out_dec equals the transmitted point; (3) out_valid follows in_valid by one
// clock.
module tb_phase_recovery;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_i = 0, in_q = 0, out_i, out_q;
  qam_pt_t out_dec;
  logic [7:0] phase;
  int checks = 0, failures = 0;

  phase_recovery dut (.*);

  localparam real PI = 3.14159265358979;
  real ph0 [3] = '{12.0 / 360.0, -15.0 / 360.0, 10.0 / 360.0};
  real drift [3] = '{0.0, 0.0, 0.0002};

  initial begin
    foreach (ph0[r]) begin
      real ph;
      int wrong;
      ph = ph0[r];
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      wrong = 0;
      for (int n = 0; n < 5000; n++) begin
        int ti, tq;
        real c, s;
        ti = 2 * int'($urandom % 4) - 3;
        tq = 2 * int'($urandom % 4) - 3;
        c = $cos(2.0 * PI * ph);
        s = $sin(2.0 * PI * ph);
        in_valid = 1;
        in_i = 12'($rtoi($floor(128.0 * (ti * c - tq * s) + 0.5)));
        in_q = 12'($rtoi($floor(128.0 * (ti * s + tq * c) + 0.5)));
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid) failures++;
        if (n >= 3000) begin
          int d, want;
          checks++;
          if (int'(out_dec.i) != ti || int'(out_dec.q) != tq) wrong++;
          want = $rtoi($floor((ph - $floor(ph)) * 256.0 + 0.5)) % 256;
          d = (int'(phase) - want + 256) % 256;
          if (d > 128) d -= 256;
          checks++;
          if (d > 2 || d < -2) begin
            failures++;
            if (failures < 5) $display("run %0d n=%0d phase %0d expected %0d", r, n, phase, want);
          end
        end
        ph = ph + drift[r];
        repeat (3) @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
      $display("run %0d: phase %0d, %0d wrong decisions", r, phase, wrong);
      failures += wrong;
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
