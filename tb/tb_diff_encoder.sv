// tb_diff_encoder: feeds bytes on byte_req and pulls symbols every 6 cycles.
// Each byte must give its high nibble then its low nibble. With differential
// encoding on, the quadrant bits are checked against the Boolean rule of the
// DVB cable standard,
//   I_k = /(A^B)&(A^I_k-1) | (A^B)&(A^Q_k-1),
//   Q_k = /(A^B)&(B^Q_k-1) | (A^B)&(B^I_k-1),
// evaluated by the testbench; with it off, {A,B} must pass unchanged. The low
// two bits always pass. No underrun may occur at this pace; one is provoked
// at the end by stopping the byte supply.
module tb_diff_encoder;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic diff_en = 1, in_valid = 0, byte_req, sym_take = 0, underrun;
  logic [7:0] in_data = 0;
  sym_t sym;
  int checks = 0, failures = 0;

  diff_encoder dut (.*);

  logic [7:0] q [$];
  logic [7:0] sentq [$];
  logic       supply = 1;
  int         n_under = 0;

  // byte source: answers byte_req two cycles later
  always @(posedge clk) begin
    if (underrun) n_under++;
    in_valid <= 0;
    if (byte_req && supply) begin
      logic [7:0] b;
      b = 8'($urandom);
      q.push_back(b);
    end
    if (q.size() > 0 && !in_valid) begin
      in_valid <= 1;
      in_data  <= q[0];
      sentq.push_back(q[0]);
      void'(q.pop_front());
    end
  end

  initial begin
    logic ip, qp, a, b, ik, qk;
    logic [7:0] cur;
    ip = 0; qp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 800; n++) begin
      logic [3:0] nib;
      if (n == 400) diff_en = 0;
      repeat (5) @(negedge clk);
      if (n % 2 == 0) begin
        cur = sentq[0];
        void'(sentq.pop_front());
      end
      nib = (n % 2 == 0) ? cur[7:4] : cur[3:0];
      a = nib[3]; b = nib[2];
      if (diff_en) begin
        ik = (!(a ^ b) & (a ^ ip)) | ((a ^ b) & (a ^ qp));
        qk = (!(a ^ b) & (b ^ qp)) | ((a ^ b) & (b ^ ip));
      end else begin
        ik = a; qk = b;
      end
      checks++;
      if (sym !== {ik, qk, nib[1:0]}) begin
        failures++;
        if (failures < 5) $display("symbol %0d: %b expected %b", n, sym, {ik, qk, nib[1:0]});
      end
      ip = ik; qp = qk;
      sym_take = 1;
      @(negedge clk);
      sym_take = 0;
    end
    checks++;
    if (n_under != 0) begin failures++; $display("unexpected underrun"); end
    supply = 0;
    repeat (10) begin
      repeat (5) @(negedge clk);
      sym_take = 1;
      @(negedge clk);
      sym_take = 0;
    end
    repeat (3) @(posedge clk);
    checks++;
    if (n_under == 0) begin failures++; $display("underrun not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
