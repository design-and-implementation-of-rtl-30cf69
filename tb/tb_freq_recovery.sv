// tb_freq_recovery: random 16-QAM symbols (level 1 = 128) rotated by a
// constant carrier step per symbol plus a random start phase, one symbol every
// 4 clocks, for three offsets: +0.002, -0.006 and +0.01 turn per symbol (10,
// 31 and 51 kHz at 5.12 Msymbol/s, the tens of kHz the modem is specified
// for). Checks for each run: (1) after 6000 symbols the frequency word equals
// the applied step (in 2^-24 turns) within 2%, and
// (2) over the last 1000 symbols the output, sliced to 16-QAM, equals the
// transmitted symbols rotated by one fixed multiple of 90 degrees (the
// residual static phase is inside the slicer margin, the 90-degree ambiguity
// is expected). Each output must come one clock after its input.
module tb_freq_recovery;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_i = 0, in_q = 0, out_i, out_q;
  logic signed [23:0] freq_word;
  int checks = 0, failures = 0;

  freq_recovery dut (.*);

  localparam real PI = 3.14159265358979;
  real steps [3] = '{0.002, -0.006, 0.01};

  initial begin
    foreach (steps[r]) begin
      real ph;
      int rot_k, good, tot;
      ph = real'($urandom % 1000) / 1000.0;
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      rot_k = -1; good = 0; tot = 0;
      for (int n = 0; n < 7000; n++) begin
        int ti, tq;
        real c, s;
        ti = 128 * (2 * int'($urandom % 4) - 3);
        tq = 128 * (2 * int'($urandom % 4) - 3);
        c = $cos(2.0 * PI * ph);
        s = $sin(2.0 * PI * ph);
        ph = ph + steps[r];
        ph = ph - $floor(ph);
        in_valid = 1;
        in_i = 12'($rtoi($floor(ti * c - tq * s + 0.5)));
        in_q = 12'($rtoi($floor(ti * s + tq * c + 0.5)));
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid) failures++;
        if (n >= 6000) begin
          int oi, oq, ri, rq;
          oi = 128 * int'(slice_lvl(int'(out_i), 128));
          oq = 128 * int'(slice_lvl(int'(out_q), 128));
          if (rot_k < 0)
            for (int k = 0; k < 4; k++) begin
              ri = ti; rq = tq;
              for (int j = 0; j < k; j++) begin int t; t = ri; ri = -rq; rq = t; end
              if (ri == oi && rq == oq) rot_k = k;
            end
          ri = ti; rq = tq;
          for (int j = 0; j < rot_k; j++) begin int t; t = ri; ri = -rq; rq = t; end
          tot++;
          if (ri == oi && rq == oq) good++;
        end
        repeat (3) @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
      begin
        real want;
        want = steps[r] * 16777216.0;
        $display("step %0.3f: freq_word %0d (expected %0.0f), %0d of %0d symbols right",
                 steps[r], freq_word, want, good, tot);
        checks++;
        if (real'(freq_word) < want - 0.02 * (want < 0 ? -want : want) ||
            real'(freq_word) > want + 0.02 * (want < 0 ? -want : want)) failures++;
        checks++;
        if (good < tot * 99 / 100) failures++;
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
