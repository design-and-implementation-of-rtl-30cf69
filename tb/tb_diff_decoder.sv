// tb_diff_decoder: random symbols are differentially encoded by the testbench
// with the DVB cable Boolean rule, the quadrant bits are then rotated by a
// fixed number of 90-degree steps (a carrier phase ambiguity, changed twice
// during the run), and the decoder output must equal the original symbols
// except right after a change of rotation. With diff_en low the symbols must
// pass unchanged.
module tb_diff_decoder;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic diff_en = 1, in_valid = 0, out_valid;
  sym_t in_sym = 0, out_sym;
  int checks = 0, failures = 0;

  diff_decoder dut (.*);

  function automatic logic [1:0] rot(logic [1:0] ab, int k);   // +90 deg per step
    logic [1:0] r;
    r = ab;
    for (int i = 0; i < k; i++)
      case (r)
        2'b00: r = 2'b10;
        2'b10: r = 2'b11;
        2'b11: r = 2'b01;
        default: r = 2'b00;
      endcase
    return r;
  endfunction

  initial begin
    logic ip, qp, a, b, ik, qk;
    int k;
    ip = 0; qp = 0; k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      logic [3:0] s, tx;
      if (n == 300) k = 1;
      if (n == 600) k = 3;
      if (n == 900) diff_en = 0;
      s = 4'($urandom);
      a = s[3]; b = s[2];
      ik = (!(a ^ b) & (a ^ ip)) | ((a ^ b) & (a ^ qp));
      qk = (!(a ^ b) & (b ^ qp)) | ((a ^ b) & (b ^ ip));
      ip = ik; qp = qk;
      tx = diff_en ? {rot({ik, qk}, k), s[1:0]} : s;
      @(negedge clk);
      in_valid = 1; in_sym = tx;
      @(negedge clk);
      in_valid = 0;
      if (n != 0 && n != 300 && n != 600 && n != 900) begin
        checks++;
        if (out_valid !== 1'b1 || out_sym !== s) begin
          failures++;
          if (failures < 5) $display("symbol %0d: %b expected %b", n, out_sym, s);
        end
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
