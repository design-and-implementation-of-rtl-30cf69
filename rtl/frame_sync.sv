// frame_sync: byte and codeword alignment of the received symbol stream.
//
// Every received 4-bit symbol forms, with the one before it, a candidate byte.
// In HUNT the synchronizer waits for a candidate equal to a sync byte (0x47 or
// its inversion 0xB8), which fixes both the nibble phase and the codeword
// start. In CHECK it looks 408 symbols (one 204-byte codeword) later for
// another sync byte; after LOCK_N hits in a row it is in LOCK, and after
// MISS_N misses in a row it falls back to HUNT. While locked it emits one byte
// every two symbols (out_valid), with out_sop on the sync byte. The sync bytes
// are found ahead of the deinterleaver because the interleaver passes them
// undelayed.
//
// The document locates this function with the differential decoder and the
// deinterleaver; the hunt/check/lock procedure and the thresholds are this
// design's choice. Registered outputs, one cycle after in_valid.
module frame_sync
  import modem_pkg::*;
#(
  parameter int unsigned LOCK_N = 3,
  parameter int unsigned MISS_N = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sym_t       in_sym,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       locked
);
  typedef enum logic [1:0] {HUNT, CHECK, LOCK} st_t;
  localparam int PERIOD = 2 * RS_N;  // symbols per codeword

  st_t        st_q;
  sym_t       prev_q;
  logic [8:0] cnt_q;                 // symbols since the last sync position
  logic [2:0] hits_q;
  logic [2:0] miss_q;
  logic [7:0] cand;
  logic       is_sync;

  assign cand    = {prev_q, in_sym};
  assign is_sync = (cand == SYNC_BYTE) || (cand == SYNC_INV);
  assign locked  = (st_q == LOCK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= HUNT;
      prev_q    <= '0;
      cnt_q     <= '0;
      hits_q    <= '0;
      miss_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      if (in_valid) begin
        prev_q <= in_sym;
        cnt_q  <= (int'(cnt_q) == PERIOD - 1) ? '0 : cnt_q + 1'b1;
        unique case (st_q)
          HUNT: if (is_sync) begin
            st_q   <= CHECK;
            cnt_q  <= 9'd1;
            hits_q <= 3'd1;
          end
          CHECK: if (int'(cnt_q) == 0) begin
            if (is_sync) begin
              hits_q <= hits_q + 3'd1;
              if (int'(hits_q) + 1 >= int'(LOCK_N)) begin
                st_q   <= LOCK;
                miss_q <= '0;
              end
            end else begin
              st_q <= HUNT;
            end
          end
          LOCK: begin
            if (cnt_q[0] == 1'b0) begin   // a byte ends on every even count
              out_valid <= 1'b1;
              out_data  <= cand;
              out_sop   <= (cnt_q == 0);
            end
            if (cnt_q == 0) begin
              if (is_sync) miss_q <= '0;
              else begin
                miss_q <= miss_q + 3'd1;
                if (int'(miss_q) + 1 >= int'(MISS_N)) st_q <= HUNT;
              end
            end
          end
          default: st_q <= HUNT;
        endcase
      end
    end
  end
endmodule
