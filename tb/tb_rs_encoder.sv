// tb_rs_encoder: encodes 6 packets and checks each 204-byte output codeword:
// the first 188 bytes equal the input, the first one carries out_sop, and all
// 16 syndromes r(a^j), j = 0..15, evaluated by the testbench with its own
// log/antilog tables of GF(256) (x^8+x^4+x^3+x^2+1), are zero. Bytes offered
// before the first sync byte must be dropped; in_ready must be low during the
// 16 parity ticks and only then.
module tb_rs_encoder;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic tick = 0, in_ready, in_valid = 0, in_sop = 0, out_valid, out_sop;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  rs_encoder dut (.*);

  int alog [512];
  int lg [256];
  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x; alog[i+255] = x; lg[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
  end
  function automatic int gmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alog[lg[a] + lg[b]];
  endfunction

  logic [7:0] cw [204];
  int ocnt = 0;
  logic [7:0] sent [6][188];
  int opkt = 0;
  int ready_in_parity = 0;

  always @(posedge clk) if (out_valid) begin
    cw[ocnt] = out_data;
    checks++;
    if (out_sop !== (ocnt == 0)) begin failures++; $display("sop wrong at %0d", ocnt); end
    if (ocnt < 188) begin
      checks++;
      if (out_data !== sent[opkt][ocnt]) begin failures++; $display("data mismatch"); end
    end
    ocnt = ocnt + 1;
    if (ocnt == 204) begin
      for (int j = 0; j < 16; j++) begin
        int s;
        s = 0;
        for (int k = 0; k < 204; k++) s = gmul(s, alog[j]) ^ cw[k];
        checks++;
        if (s != 0) begin failures++; $display("pkt %0d syndrome %0d = %h", opkt, j, s); end
      end
      ocnt = 0;
      opkt++;
      checks++;
      if (ready_in_parity != 16 * opkt) begin
        failures++;
        $display("%0d ticks without in_ready after %0d codewords", ready_in_parity, opkt);
      end
    end
  end

  initial begin
    int p, b;
    for (int i = 0; i < 6; i++) begin
      sent[i][0] = 8'h47;
      for (int k = 1; k < 188; k++) sent[i][k] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    p = 0; b = -3;                 // three stray bytes first
    while (opkt < 6) begin
      @(negedge clk);
      tick     = ($urandom % 3 == 0);
      in_valid = 1;
      in_sop   = (b == 0);
      in_data  = (b < 0) ? 8'h11 : sent[p][b];
      #1;
      if (tick && !in_ready) ready_in_parity++;
      @(posedge clk);
      if (tick && in_ready) begin
        b++;
        if (b == 188) begin b = 0; p = (p + 1) % 6; end
      end
    end
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
