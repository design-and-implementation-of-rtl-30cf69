// tb_down_converter: feeds an IF signal I*cos(phi) - Q*sin(phi) at the quarter
// rate carrier, with (I,Q) held for 8 clocks per baseband sample, and checks
// (1) every output against a bit-true reference sum of the 8 products with the
// 8-bit sine table, (2) that out_valid comes once every 8 clocks, and (3) that
// when the symbol edges are aligned to the decimation, the output equals
// (I,Q) * 4*127*127/(128*128) within 4 LSB of rounding (the image at twice the carrier
// cancels in the 8-sample sum).
module tb_down_converter;
  import modem_pkg::*;
  localparam int R = 8;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic [31:0] phase_inc = 32'h4000_0000;
  logic signed [9:0] adc = 0;
  logic out_valid;
  logic signed [11:0] out_i, out_q;
  int checks = 0, failures = 0;

  down_converter #(.R(R)) dut (.*);

  function automatic int tsin(int a);
    return $rtoi($floor(127.0 * $sin(2.0 * 3.14159265358979 * a / 256.0) + 0.5));
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  logic [31:0] ph = 0;
  int si = 0, sq = 0, cnt = 0, ei = 0, eq = 0, last_v = -1;
  int bi = 0, bq = 0, tx_i = 0, tx_q = 0;
  logic aligned_blk = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int a;
      // new baseband symbol every 8 clocks, aligned with the decimator count
      if (cnt == 0) begin
        tx_i = int'($urandom % 400) - 200;
        tx_q = int'($urandom % 400) - 200;
        aligned_blk = 1;
      end
      a = ph[31:24];
      adc = 10'((tx_i * tsin((a + 64) % 256) - tx_q * tsin(a)) >>> 7);
      #1;
      si += int'(adc) * tsin((a + 64) % 256);
      sq += -int'(adc) * tsin(a);
      ph = ph + phase_inc;
      if (cnt == R - 1) begin
        ei = si >>> 7; eq = sq >>> 7;
        if (ei > 2047) ei = 2047; if (ei < -2048) ei = -2048;
        if (eq > 2047) eq = 2047; if (eq < -2048) eq = -2048;
        si = 0; sq = 0;
        bi = tx_i; bq = tx_q;
      end
      @(negedge clk);
      if (out_valid) begin
        checks++;
        if (last_v >= 0 && n - last_v != R) failures++;
        last_v = n;
        checks++;
        if (int'(out_i) != ei || int'(out_q) != eq) begin
          failures++;
          if (failures < 5) $display("n=%0d out (%0d,%0d) expected (%0d,%0d)", n, out_i, out_q, ei, eq);
        end
        if (n > 20 && aligned_blk) begin
          real g;
          g = 4.0 * 127.0 * 127.0 / 16384.0;
          checks++;
          if (rabs(real'(out_i) - g * bi) > 4.0 || rabs(real'(out_q) - g * bq) > 4.0) begin
            failures++;
            if (failures < 5) $display("n=%0d out (%0d,%0d) tx (%0d,%0d)", n, out_i, out_q, bi, bq);
          end
        end
      end
      cnt = (cnt + 1) % R;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
