// tb_qam_demapper: for 2000 random symbols the testbench places the point of
// the mapping table (first quadrant 00->(1,1), 01->(3,1), 10->(1,3), 11->(3,3),
// other quadrants rotated by 90 degrees per Gray step 00,10,11,01) at 128 per
// level, adds noise of up to +-100 per rail, and checks the demapped symbol.
// Points pushed past a threshold (+-0, +-256) are checked against the point
// they moved into.
module tb_qam_demapper;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_i = 0, in_q = 0;
  sym_t out_sym;
  int checks = 0, failures = 0;

  qam_demapper dut (.*);

  function automatic int lvl(int v);
    if (v < -256) return -3;
    if (v < 0) return -1;
    if (v < 256) return 1;
    return 3;
  endfunction

  // testbench mapping table
  function automatic void pt(input int s, output int x, output int y);
    int t, nq;
    x = (s & 1) ? 3 : 1;
    y = (s & 2) ? 3 : 1;
    case (s >> 2)
      0: nq = 0;
      2: nq = 1;
      3: nq = 2;
      default: nq = 3;
    endcase
    for (int k = 0; k < nq; k++) begin t = x; x = -y; y = t; end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int s, x, y, ni, nq, ex, ey, es;
      s = $urandom % 16;
      pt(s, x, y);
      ni = x * 128 + int'($urandom % 201) - 100;
      nq = y * 128 + int'($urandom % 201) - 100;
      ex = lvl(ni); ey = lvl(nq);
      es = -1;
      for (int t = 0; t < 16; t++) begin
        int tx, ty;
        pt(t, tx, ty);
        if (tx == ex && ty == ey) es = t;
      end
      @(negedge clk);
      in_valid = 1; in_i = 12'(ni); in_q = 12'(nq);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid !== 1'b1 || int'(out_sym) != es) begin
        failures++;
        if (failures < 5) $display("(%0d,%0d): %0d expected %0d", ni, nq, out_sym, es);
      end
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
