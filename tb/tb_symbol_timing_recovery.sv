// tb_symbol_timing_recovery: builds a received baseband signal in real
// arithmetic - random 16-QAM symbols (level 1 = 128) through a raised-cosine
// pulse, roll-off 0.35, truncated to +-8 symbols - sampled at 4 samples per
// symbol with a fractional start offset of 0.37 sample and a sampling clock
// 200 ppm fast, so the sampling phase drifts through more than a full symbol.
// Checks: (1) after 1500 symbols for settling, at least 99% of the output
// samples lie within 40 (0.31 of a level step) of a constellation point on both
// rails; (2) the output symbols, once aligned, equal the transmitted ones;
// (3) the number of output symbols matches the number of transmitted symbols
// covered by the input within 2 (rate matching).
module tb_symbol_timing_recovery;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_i = 0, in_q = 0, out_i, out_q;
  logic signed [15:0] timing_ctl;
  int checks = 0, failures = 0;

  symbol_timing_recovery dut (.*);

  localparam int NSYM = 9000;
  localparam real PI = 3.14159265358979;
  int si [NSYM];
  int sq [NSYM];

  function automatic real rc(real t);
    real a, x;
    a = 0.35;
    if (t > -1.0e-6 && t < 1.0e-6) return 1.0;
    x = 2.0 * a * t;
    if (x * x > 0.999999 && x * x < 1.000001) return PI / 4.0 * $sin(PI * t) / (PI * t);
    return $sin(PI * t) / (PI * t) * $cos(PI * a * t) / (1.0 - x * x);
  endfunction

  function automatic int nearest(int v);
    int l;
    l = (v < -256) ? -384 : (v < 0) ? -128 : (v < 256) ? 128 : 384;
    return v - l;
  endfunction

  int outs_i [$];
  int outs_q [$];
  int nout = 0;
  always @(posedge clk)
    if (out_valid) begin
      outs_i.push_back(int'(out_i));
      outs_q.push_back(int'(out_q));
    end

  initial begin
    int nsamp;
    real t_end;
    for (int k = 0; k < NSYM; k++) begin
      si[k] = 128 * (2 * int'($urandom % 4) - 3);
      sq[k] = 128 * (2 * int'($urandom % 4) - 3);
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    nsamp = 0;
    for (int n = 0; ; n++) begin
      real t, vi, vq;
      int k0;
      t = (real'(n) + 0.37) / 4.0 * (1.0 + 200.0e-6) + 8.0;  // symbol units
      if (t > real'(NSYM - 9)) break;
      k0 = $rtoi($floor(t));
      vi = 0.0; vq = 0.0;
      for (int k = k0 - 8; k <= k0 + 9; k++) begin
        vi += si[k] * rc(t - real'(k));
        vq += sq[k] * rc(t - real'(k));
      end
      in_valid = 1;
      in_i = 12'($rtoi($floor(vi + 0.5)));
      in_q = 12'($rtoi($floor(vq + 0.5)));
      @(negedge clk);
      in_valid = 0;
      repeat (7) @(negedge clk);
      nsamp++;
      t_end = t;
    end
    repeat (10) @(negedge clk);
    // (3) rate: symbols spanned by the input
    checks++;
    if (outs_i.size() < $rtoi(t_end - 8.0) - 2 || outs_i.size() > $rtoi(t_end - 8.0) + 2) begin
      failures++;
      $display("rate: %0d outputs for %0.1f symbols", outs_i.size(), t_end - 8.0);
    end
    // (1) eye opening
    begin
      int good, tot;
      good = 0; tot = 0;
      for (int m = 1500; m < outs_i.size(); m++) begin
        tot++;
        if (nearest(outs_i[m]) < 40 && nearest(outs_i[m]) > -40 &&
            nearest(outs_q[m]) < 40 && nearest(outs_q[m]) > -40) good++;
      end
      $display("%0d of %0d symbols within 40 of a point", good, tot);
      checks++;
      if (good < tot * 99 / 100) failures++;
    end
    // (2) symbol sequence: find the lag at output 1500, then compare
    begin
      int lag, best, hits;
      lag = -1;
      for (int l = 0; l < 40 && lag < 0; l++) begin
        hits = 0;
        for (int m = 1500; m < 1520; m++)
          if ((outs_i[m] > 0) == (si[m + l] > 0) && (outs_q[m] > 0) == (sq[m + l] > 0)) hits++;
        if (hits == 20) lag = l;
      end
      checks++;
      if (lag < 0) failures++;
      else begin
        for (int m = 1500; m < outs_i.size() - 2; m++) begin
          int li, lq;
          li = outs_i[m] - nearest(outs_i[m]);
          lq = outs_q[m] - nearest(outs_q[m]);
          checks++;
          if (li != si[m + lag] || lq != sq[m + lag]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8 * 4 * NSYM + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
