// tb_sync_randomizer: checks the transmit scrambler against a bit-serial model.
// Sixteen packets (two 8-packet groups) of random bytes are sent with in_sop on
// the 0x47 sync byte. The model runs the 15-bit register 1+X^14+X^15 one bit
// at a time, reloads it after every eighth sync byte and expects 0xB8 there,
// 0x47 on the other sync bytes and data XOR PRBS elsewhere.
module tb_sync_randomizer;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, in_sop = 0, out_valid, out_sop;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  sync_randomizer dut (.*);

  logic [14:0] reg_m;      // reg_m[k] = register stage k+1
  function automatic logic [7:0] prbs_byte();
    logic [7:0] b;
    for (int k = 7; k >= 0; k--) begin
      logic fb;
      fb = reg_m[13] ^ reg_m[14];
      b[k] = fb;
      reg_m = {reg_m[13:0], fb};
    end
    return b;
  endfunction

  initial begin
    logic [7:0] exp_b;
    logic [7:0] pb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      for (int b = 0; b < 188; b++) begin
        @(negedge clk);
        in_valid = 1;
        in_sop   = (b == 0);
        in_data  = (b == 0) ? 8'h47 : 8'($urandom);
        if (b == 0) begin
          if (p % 8 == 0) begin
            reg_m = 15'b000000010101001;  // stages 1..15 = 1,0,0,1,0,1,0,1,0,0,0,0,0,0,0
            exp_b = 8'hB8;
          end else begin
            pb    = prbs_byte();          // generator runs through the sync byte
            exp_b = 8'h47;
          end
        end else begin
          pb    = prbs_byte();
          exp_b = in_data ^ pb;
        end
        #1;
        checks++;
        if (out_data !== exp_b || out_valid !== 1'b1 || out_sop !== in_sop) begin
          failures++;
          if (failures < 5) $display("pkt %0d byte %0d: got %h expected %h", p, b, out_data, exp_b);
        end
      end
    end
    // the first scrambled data byte after reload is fixed by the initial state
    reg_m = 15'b000000010101001;
    pb = prbs_byte();
    checks++;
    if (pb != 8'h03) begin failures++; $display("first PRBS byte %h", pb); end
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
