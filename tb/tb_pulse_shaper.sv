// tb_pulse_shaper: the testbench computes the square-root raised-cosine taps
// itself (roll-off 0.35, 41 taps, 4 samples per symbol, peak scaled to 63,
// rounded) and checks (1) the response to a single symbol (3,-1) among zero
// symbols is 3*h[k], -1*h[k] for k = 0..40, and (2) for 200 random symbols the
// output equals the testbench convolution sum. It also checks that sym_take
// comes on every fourth sample tick.
module tb_pulse_shaper;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic sample_tick = 0, sym_take, out_valid;
  qam_pt_t in_pt = '{i: 3'sd0, q: 3'sd0};
  logic signed [10:0] out_i, out_q;
  int checks = 0, failures = 0;

  pulse_shaper dut (.*);

  int h [41];
  function automatic real p(real t);
    real a, pi;
    a = 0.35; pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if ((4.0 * a * t) ** 2 == 1.0)
      return a / $sqrt(2.0) * ((1 + 2 / pi) * $sin(pi / (4 * a)) + (1 - 2 / pi) * $cos(pi / (4 * a)));
    return ($sin(pi * t * (1 - a)) + 4 * a * t * $cos(pi * t * (1 + a))) / (pi * t * (1 - (4 * a * t) ** 2));
  endfunction

  int si [$];
  int sq [$];
  int nsamp = 0;
  int takes = 0;

  initial begin
    for (int n = 0; n < 41; n++) h[n] = $rtoi($floor(p((n - 20) / 4.0) / p(0.0) * 63.0 + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4 * 260; n++) begin
      int sym_n;
      @(negedge clk);
      sym_n = n / 4;
      // symbols: 20 zeros, one (3,-1), 20 zeros, then random
      if (sym_n == 20) in_pt = '{i: 3'sd3, q: -3'sd1};
      else if (sym_n < 60) in_pt = '{i: 3'sd0, q: 3'sd0};
      else in_pt = '{i: lvl_t'(2 * ($urandom % 4) - 3), q: lvl_t'(2 * ($urandom % 4) - 3)};
      if (n % 4 != 0) in_pt = '{i: lvl_t'(si[$]), q: lvl_t'(sq[$])};
      sample_tick = 1;
      #1;
      if (sym_take) begin
        takes++;
        si.push_back(int'(in_pt.i));
        sq.push_back(int'(in_pt.q));
      end
      checks++;
      if (sym_take !== (n % 4 == 0)) failures++;
      @(negedge clk);
      sample_tick = 0;
      begin
        int ei, eq;
        ei = 0; eq = 0;
        for (int k = 0; k < 41; k++) begin
          int idx;
          if ((n - k) >= 0 && (n - k) % 4 == 0) begin
            idx = (n - k) / 4;
            ei += h[k] * si[idx];
            eq += h[k] * sq[idx];
          end
        end
        checks++;
        if (out_valid !== 1'b1 || int'(out_i) != ei || int'(out_q) != eq) begin
          failures++;
          if (failures < 5) $display("sample %0d: (%0d,%0d) expected (%0d,%0d)", n, out_i, out_q, ei, eq);
        end
        if (n >= 80 && n <= 120) begin
          checks++;
          if (int'(out_i) != 3 * h[n - 80] || int'(out_q) != -h[n - 80]) failures++;
        end
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
