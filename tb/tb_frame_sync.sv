// tb_frame_sync: a symbol stream of 204-byte codewords (sync byte 0x47, every
// eighth 0xB8, random payload) is preceded by 137 random symbols, so both the
// nibble phase and the codeword start are unknown. The synchronizer must lock
// within 4 codewords and then deliver every byte with out_sop exactly on the
// sync bytes. Afterwards the sync bytes are corrupted for several codewords
// and the lock must be lost, then found again.
module tb_frame_sync;
  import modem_pkg::*;
  logic clk = 0, rst_n = 0;
  initial begin                        // a falling edge starts the asynchronous reset
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
  end
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_sop, locked;
  sym_t in_sym = 0;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  frame_sync dut (.*);

  logic [7:0] sent [$];
  int   n_bytes_in = 0;
  int   lock_lost = 0, relocks = 0;
  logic locked_d = 0;
  logic first_lock_seen = 0;
  int   cw_now = 0;

  always @(posedge clk) begin
    locked_d <= locked;
    if (locked_d && !locked) lock_lost++;
    if (!locked_d && locked) begin
      if (first_lock_seen) relocks++;
      first_lock_seen <= 1;
    end
  end

  // out_sop must sit on a sync byte (the flywheel keeps it going while they are destroyed)
  always @(posedge clk) if (out_valid) begin
    if (out_sop && (cw_now < 14 || cw_now >= 24)) begin
      checks++;
      if (out_data != 8'h47 && out_data != 8'hB8) begin failures++; $display("sop on %h", out_data); end
    end
  end

  task automatic send_byte(logic [7:0] b);
    for (int h = 0; h < 2; h++) begin
      @(negedge clk);
      in_valid = 1; in_sym = (h == 0) ? b[7:4] : b[3:0];
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  initial begin
    int lock_at;
    int nb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 137; k++) begin
      @(negedge clk); in_valid = 1; in_sym = 4'($urandom); @(negedge clk); in_valid = 0;
    end
    lock_at = -1;
    nb = 0;
    for (int c = 0; c < 30; c++) begin
      cw_now = c;
      for (int k = 0; k < 204; k++) begin
        logic [7:0] b;
        if (k == 0) b = (c % 8 == 0) ? 8'hB8 : 8'h47;
        else        b = 8'($urandom);
        if (k == 0 && c >= 14 && c < 20) b = 8'h00;   // destroyed sync bytes
        send_byte(b);
        #1;
        if (locked && lock_at < 0) lock_at = c;
        // compare the byte frame_sync emits for this one (registered output)
        if (locked && c < 14 && lock_at >= 0 && out_valid) begin
          checks++;
          if (out_data !== b || out_sop !== (k == 0)) begin
            failures++;
            if (failures < 5) $display("cw %0d byte %0d: %h expected %h", c, k, out_data, b);
          end
        end
      end
    end
    checks += 3;
    if (lock_at < 0 || lock_at > 4) begin failures++; $display("lock at codeword %0d", lock_at); end
    if (lock_lost == 0) begin failures++; $display("lock never lost"); end
    if (relocks == 0 || !locked) begin failures++; $display("no re-lock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
