// conv_deinterleaver: convolutional byte deinterleaver, depth I = 12.
//
// Inverse of conv_interleaver: branch j delays its bytes by (I-1-j)*M byte
// slots of that branch (M = 17), so every byte sees the same total delay of
// (I-1)*I*M = 2244 bytes, exactly 11 codewords, and codeword boundaries are
// kept. The commutator is set to branch 0 by in_sop, which the frame
// synchronizer raises on the sync bytes (they travelled through interleaver
// branch 0). Since the delay is a whole number of codewords, the output byte of
// the branch-0 slot is again a sync byte: out_sop marks it once the delay lines
// have filled (2244 bytes after the first in_sop). One byte in, one byte out, one cycle
// of latency. The delay lines share one 1122-byte memory.
//
// Depth 12 is the modem's specification; M = 17 and the structure are the DVB
// cable standard's (assumed).
module conv_deinterleaver
  import modem_pkg::*;
#(
  parameter int unsigned DEPTH = IL_DEPTH,
  parameter int unsigned STEP  = IL_STEP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop
);
  localparam int unsigned TOTAL = STEP * DEPTH * (DEPTH - 1) / 2;
  localparam int unsigned AW    = $clog2(TOTAL);
  localparam int unsigned BW    = $clog2(DEPTH);
  localparam int unsigned PW    = $clog2(STEP * (DEPTH - 1));
  localparam int unsigned SOPW  = $clog2(DEPTH * STEP * (DEPTH - 1) + 1);

  logic [7:0]    mem [TOTAL];
  logic [PW-1:0] ptr_q [DEPTH];
  logic [BW-1:0] br_q;
  logic [BW-1:0] br;
  logic [BW-1:0] rb;                 // branch index counted from the long end
  logic [AW-1:0] addr;
  logic [SOPW-1:0] fill_cnt_q;       // bytes since the first sync byte
  logic          filled_q;

  assign br   = in_sop ? '0 : br_q;
  assign rb   = BW'(DEPTH - 1) - br;
  // branch j has (I-1-j)*STEP words, stored at STEP*k*(k-1)/2 with k = I-1-j
  assign addr = AW'(STEP * (int'(rb) * (int'(rb) - 1) / 2)) + AW'(ptr_q[br]);

  always_ff @(posedge clk) begin
    if (in_valid && rb != 0) mem[addr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_q       <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_sop    <= 1'b0;
      fill_cnt_q <= '0;
      filled_q   <= 1'b0;
      for (int j = 0; j < DEPTH; j++) ptr_q[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= (rb == 0) ? in_data : mem[addr];
        if (rb != 0)
          ptr_q[br] <= (int'(ptr_q[br]) == STEP * int'(rb) - 1) ? '0 : ptr_q[br] + 1'b1;
        br_q <= (int'(br) == DEPTH - 1) ? '0 : br + 1'b1;
        // (I-1)*I*STEP bytes after the first sync byte the undelayed branch
        // slot carries delayed sync bytes: from then on in_sop marks them
        out_sop <= in_sop && filled_q;
        if ((in_sop || fill_cnt_q != 0) && !filled_q) begin
          if (int'(fill_cnt_q) == DEPTH * STEP * (DEPTH - 1) - 1) filled_q <= 1'b1;
          fill_cnt_q <= fill_cnt_q + 1'b1;
        end
      end
    end
  end
endmodule
