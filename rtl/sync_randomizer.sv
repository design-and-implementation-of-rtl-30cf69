// sync_randomizer: energy-dispersal scrambler of the transmitter.
//
// MPEG-2 transport packets (188 bytes, first byte the 0x47 sync byte, marked by
// in_sop) are scrambled with the PRBS 1 + X^14 + X^15 whose register is loaded
// with 100101010000000 at the start of every group of eight packets. The sync
// byte of the first packet of each group is replaced by its inverse 0xB8 so the
// receiver can find the PRBS period; the sync bytes of the other seven packets
// pass unscrambled while the generator keeps running through them. All other
// bytes are XORed with the next eight PRBS bits, MSB first.
//
// The polynomial and the initial state are the modem's specification; the
// inversion scheme and the running-through-sync-bytes rule are those of the
// DVB cable standard, assumed here. The data path is combinational (out_* follow
// in_* in the same cycle); the PRBS state and packet counter advance on each
// accepted byte. The sync byte is not checked: the MAC side marks it with in_sop.
module sync_randomizer
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop
);
  logic [15:1] prbs_q;
  logic [2:0]  pkt_q;        // packet index within the 8-packet group
  logic        started_q;    // a first sop has been seen
  prbs_step_t  step;
  logic        first_of_group;

  always_comb begin
    first_of_group = in_sop && (pkt_q == 3'd7 || !started_q);
    step           = prbs_step8(first_of_group ? PRBS_INIT : prbs_q);
    out_valid      = in_valid;
    out_sop        = in_sop;
    if (in_sop) out_data = first_of_group ? SYNC_INV : in_data;
    else        out_data = in_data ^ step.bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prbs_q    <= PRBS_INIT;
      pkt_q     <= 3'd7;
      started_q <= 1'b0;
    end else if (in_valid) begin
      if (in_sop) begin
        started_q <= 1'b1;
        pkt_q     <= first_of_group ? 3'd0 : pkt_q + 3'd1;
        // the generator is reloaded at the inverted sync byte and runs on
        // through the sync bytes of the other packets
        prbs_q    <= first_of_group ? PRBS_INIT : step.state;
      end else begin
        prbs_q    <= step.state;
      end
    end
  end
endmodule
