// tb_rs_decoder: sends codewords built by the testbench's own systematic
// RS(204,188) encoder (polynomial division with log/antilog tables) with 0..8
// byte errors at random positions and values, then codewords with 12 errors.
// Up to 8 errors every information byte must come out corrected with out_err
// low and cw_nerr equal to the error count; with 12 errors out_err must be set.
// Bytes arrive every third cycle, the fastest rate the decoder supports, and
// no overrun may occur.
module tb_rs_decoder;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, in_sop = 0, out_valid, out_sop, out_err, cw_done, overrun;
  logic [7:0] in_data = 0, out_data;
  logic [3:0] cw_nerr;
  int checks = 0, failures = 0;

  rs_decoder dut (.*);

  int alog [512];
  int lg [256];
  int gpoly [17];
  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x; alog[i+255] = x; lg[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    gpoly[0] = 1;
    for (int k = 1; k < 17; k++) gpoly[k] = 0;
    for (int i = 0; i < 16; i++)
      for (int k = 16; k >= 0; k--)
        gpoly[k] = (k > 0 ? gpoly[k-1] : 0) ^ gmul(gpoly[k], alog[i]);
  end
  function automatic int gmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alog[lg[a] + lg[b]];
  endfunction

  localparam int NCW = 16;
  logic [7:0] msg [NCW][188];
  int         nerr [NCW];
  int ocw = 0, obyte = 0, ndone = 0, n_overrun = 0;

  always @(posedge clk) begin
    if (overrun) n_overrun++;
    if (cw_done) begin
      checks++;
      if (nerr[ndone] <= 8 && int'(cw_nerr) != nerr[ndone]) begin
        failures++; $display("cw %0d: nerr %0d expected %0d", ndone, cw_nerr, nerr[ndone]);
      end
      ndone++;
    end
    if (out_valid) begin
      if (out_sop) obyte = 0;
      checks++;
      if (nerr[ocw] <= 8) begin
        if (out_err !== 1'b0 || out_data !== msg[ocw][obyte]) begin
          failures++;
          if (failures < 6) $display("cw %0d byte %0d: %h expected %h err=%b", ocw, obyte, out_data, msg[ocw][obyte], out_err);
        end
      end else if (out_err !== 1'b1) begin
        failures++;
        if (failures < 6) $display("cw %0d: uncorrectable not flagged", ocw);
      end
      obyte++;
      if (obyte == 188) begin obyte = 0; ocw++; end
    end
  end

  initial begin
    logic [7:0] cw [204];
    int par [16];
    int pos [12];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCW; c++) begin
      nerr[c] = (c < 9) ? c : ((c < 13) ? 8 - (c - 9) : 12);
      for (int k = 0; k < 188; k++) msg[c][k] = 8'($urandom);
      for (int k = 0; k < 16; k++) par[k] = 0;
      for (int k = 0; k < 188; k++) begin
        int fb;
        fb = msg[c][k] ^ par[15];
        for (int j = 15; j > 0; j--) par[j] = par[j-1] ^ gmul(fb, gpoly[j]);
        par[0] = gmul(fb, gpoly[0]);
      end
      for (int k = 0; k < 188; k++) cw[k] = msg[c][k];
      for (int k = 0; k < 16; k++) cw[188 + k] = 8'(par[15 - k]);
      for (int e = 0; e < nerr[c]; e++) begin
        int p;
        logic dup;
        do begin
          p = $urandom % 204;
          dup = 0;
          for (int f = 0; f < e; f++) if (pos[f] == p) dup = 1;
        end while (dup);
        pos[e] = p;
        cw[p] = cw[p] ^ 8'(1 + $urandom % 255);
      end
      for (int k = 0; k < 204; k++) begin
        @(negedge clk);
        in_valid = 1; in_sop = (k == 0); in_data = cw[k];
        @(negedge clk);
        in_valid = 0; in_sop = 0;
        @(negedge clk);
      end
    end
    repeat (1000) @(posedge clk);
    checks += 2;
    if (ndone != NCW) begin failures++; $display("%0d codewords decoded", ndone); end
    if (n_overrun != 0) begin failures++; $display("overrun"); end
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
