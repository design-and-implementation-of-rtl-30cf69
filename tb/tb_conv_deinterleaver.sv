// tb_conv_deinterleaver: interleaves 30 codewords with a testbench model of the
// convolutional interleaver (branch j delayed by j*12*17 bytes), feeds them to
// the deinterleaver with in_sop on the sync positions, and checks that after
// the total delay of 11 codewords every byte comes out in its original order
// and out_sop marks the codeword starts.
module tb_conv_deinterleaver;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, in_sop = 0, out_valid, out_sop;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  conv_deinterleaver dut (.*);

  localparam int N = 30 * 204;
  localparam int D = 11 * 204;
  logic [7:0] orig [N];
  int nout = 0;

  always @(posedge clk) if (out_valid) begin
    if (nout >= D) begin
      checks++;
      if (out_data !== orig[nout - D] || out_sop !== ((nout - D) % 204 == 0)) begin
        failures++;
        if (failures < 5) $display("byte %0d: %h expected %h sop=%b", nout, out_data, orig[nout - D], out_sop);
      end
    end else if (out_sop) begin
      checks++; failures++;
      $display("out_sop before the delay lines filled");
    end
    nout++;
  end

  initial begin
    for (int n = 0; n < N; n++) orig[n] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      int src;
      @(negedge clk);
      src = n - 204 * (n % 12);
      in_valid = 1; in_sop = (n % 204 == 0);
      in_data = (src >= 0) ? orig[src] : 8'h00;
      @(negedge clk);
      in_valid = 0; in_sop = 0;
    end
    repeat (4) @(posedge clk);
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
