// tb_conv_interleaver: pushes 30 codewords of random bytes (in_sop every 204)
// through the interleaver with random gaps and checks, once the delay lines
// have filled, that output byte n equals input byte n - 12*17*j where j = n mod
// 12 is the branch (the convolutional interleaver rule), and that out_sop
// follows in_sop.
module tb_conv_interleaver;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, in_sop = 0, out_valid, out_sop;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  conv_interleaver dut (.*);

  localparam int N = 30 * 204;
  logic [7:0] hist [N];
  int nout = 0;

  always @(posedge clk) if (out_valid) begin
    int j;
    j = nout % 12;
    if (nout - 204 * j >= 0) begin
      checks++;
      if (out_data !== hist[nout - 204 * j] || out_sop !== (nout % 204 == 0)) begin
        failures++;
        if (failures < 5) $display("byte %0d: %h expected %h", nout, out_data, hist[nout - 204 * j]);
      end
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      hist[n] = 8'($urandom);
      in_valid = 1; in_sop = (n % 204 == 0); in_data = hist[n];
      @(negedge clk);
      in_valid = 0; in_sop = 0;
      if ($urandom % 2 == 0) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
