// conv_interleaver: convolutional byte interleaver, depth I = 12.
//
// A commutator steps through 12 branches, one per byte; branch j delays its
// bytes by j*M byte slots of that branch (M = 17, so I*M = 204 and every
// codeword's first byte goes through branch 0 without delay). The commutator is
// put back to branch 0 by each in_sop, which keeps the sync bytes undelayed so
// the receiver can find them before deinterleaving. The 11 delay lines share
// one memory of M*I*(I-1)/2 = 1122 bytes, each a circular buffer with its own
// pointer. One byte in, one byte out: the output register is updated one cycle
// after in_valid (out_valid), and out_sop marks the byte that left branch 0 at
// a sync position. Until the delay lines have filled once they return whatever
// the memory held.
//
// Depth 12 is the modem's specification; M = 17 and the branch structure are
// the DVB cable standard's (assumed).
module conv_interleaver
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

  logic [7:0]    mem [TOTAL];
  logic [PW-1:0] ptr_q [DEPTH];
  logic [BW-1:0] br_q;
  logic [BW-1:0] br;
  logic [AW-1:0] addr;

  assign br   = in_sop ? '0 : br_q;
  // branch j occupies STEP*j words starting at STEP*j*(j-1)/2
  assign addr = AW'(STEP * (int'(br) * (int'(br) - 1) / 2)) + AW'(ptr_q[br]);

  always_ff @(posedge clk) begin
    if (in_valid && br != 0) mem[addr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_q      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      for (int j = 0; j < DEPTH; j++) ptr_q[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sop  <= in_sop;
        out_data <= (br == 0) ? in_data : mem[addr];
        if (br != 0)
          ptr_q[br] <= (int'(ptr_q[br]) == STEP * int'(br) - 1) ? '0 : ptr_q[br] + 1'b1;
        br_q <= (int'(br) == DEPTH - 1) ? '0 : br + 1'b1;
      end
    end
  end
endmodule
