// tb_qam_mapper: maps all 16 symbols and checks that (1) every point lies on
// the 4x4 grid of levels -3,-1,1,3 and all 16 are distinct, (2) the quadrant
// bits 00,10,11,01 select the quadrants (+,+), (-,+), (-,-), (+,-), (3) in the
// first quadrant the low bits give 00->(1,1), 01->(3,1), 10->(1,3), 11->(3,3),
// and (4) advancing the quadrant number rotates the point by +90 degrees
// (x,y) -> (-y,x), the property the differential code relies on.
module tb_qam_mapper;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  sym_t in_sym = 0;
  qam_pt_t out_pt;
  int checks = 0, failures = 0;

  qam_mapper dut (.*);

  int px [16];
  int py [16];
  initial begin
    int nxt [4];
    nxt[0] = 2; nxt[2] = 3; nxt[3] = 1; nxt[1] = 0;   // 00->10->11->01->00
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      in_valid = 1; in_sym = 4'(s);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid !== 1'b1) failures++;
      px[s] = int'(out_pt.i); py[s] = int'(out_pt.q);
    end
    for (int s = 0; s < 16; s++) begin
      int qs;
      checks++;
      if (!(px[s] inside {-3, -1, 1, 3}) || !(py[s] inside {-3, -1, 1, 3})) failures++;
      for (int t = 0; t < s; t++) begin
        checks++;
        if (px[s] == px[t] && py[s] == py[t]) begin failures++; $display("%0d and %0d coincide", s, t); end
      end
      qs = s >> 2;
      checks++;
      if ((qs == 0 && !(px[s] > 0 && py[s] > 0)) || (qs == 2 && !(px[s] < 0 && py[s] > 0)) ||
          (qs == 3 && !(px[s] < 0 && py[s] < 0)) || (qs == 1 && !(px[s] > 0 && py[s] < 0))) begin
        failures++; $display("symbol %0d in wrong quadrant (%0d,%0d)", s, px[s], py[s]);
      end
      checks++;
      if (px[nxt[qs] * 4 + (s & 3)] != -py[s] || py[nxt[qs] * 4 + (s & 3)] != px[s]) begin
        failures++; $display("symbol %0d: rotation property broken", s);
      end
    end
    checks += 4;
    if (px[0] != 1 || py[0] != 1) failures++;
    if (px[1] != 3 || py[1] != 1) failures++;
    if (px[2] != 1 || py[2] != 3) failures++;
    if (px[3] != 3 || py[3] != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
