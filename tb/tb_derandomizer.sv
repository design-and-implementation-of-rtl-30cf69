// tb_derandomizer: scrambles 24 packets with a bit-serial model of the
// transmit PRBS (group of 8, inverted first sync byte), starting in the middle
// of a group, and checks that the descrambler flags packets until it sees the
// first 0xB8, then restores every byte exactly, passes in_err through and puts
// 0x47 back on every sync byte.
module tb_derandomizer;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, in_sop = 0, in_err = 0, out_valid, out_sop, out_err;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  derandomizer dut (.*);

  logic [14:0] reg_m;
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

  logic [7:0] plain;
  logic       exp_err;
  logic       seen_inv;
  initial begin
    logic [7:0] pb;
    seen_inv = 0;
    reg_m = 15'b000000010101001;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 5; p < 29; p++) begin
      for (int b = 0; b < 188; b++) begin
        @(negedge clk);
        in_valid = 1;
        in_sop   = (b == 0);
        in_err   = (p == 20);
        plain    = (b == 0) ? 8'h47 : 8'($urandom);
        if (b == 0) begin
          if (p % 8 == 0) begin
            reg_m = 15'b000000010101001;
            in_data = 8'hB8;
            seen_inv = 1;
          end else begin
            pb = prbs_byte();
            in_data = 8'h47;
          end
        end else begin
          pb = prbs_byte();
          in_data = plain ^ pb;
        end
        exp_err = in_err || !seen_inv;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== 1'b1 || out_err !== exp_err || out_sop !== (b == 0) ||
            (!exp_err && out_data !== plain) || (b == 0 && out_data !== 8'h47)) begin
          failures++;
          if (failures < 5) $display("pkt %0d byte %0d: got %h/%b expected %h/%b", p, b, out_data, out_err, plain, exp_err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
