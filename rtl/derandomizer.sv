// derandomizer: sync-byte detection and PRBS descrambling of the receiver.
//
// Takes the 188-byte packets coming out of the Reed-Solomon decoder (in_sop on
// the sync byte). A sync byte equal to 0xB8 marks the first packet of an
// 8-packet group: the PRBS 1 + X^14 + X^15 is reloaded with 100101010000000 and
// the byte is restored to 0x47. Other sync bytes pass unchanged while the
// generator runs on through them; every other byte is XORed with the next eight
// PRBS bits, MSB first. Until the first 0xB8 is seen, packets are passed with
// out_err set because the PRBS phase is not yet known. in_err (uncorrectable
// codeword) is passed along with the packet.
//
// Polynomial and initial state follow the modem's specification; the group
// structure follows the DVB cable standard (assumed). Combinational data path,
// state advances on accepted bytes, one cycle of latency from the output
// register.
module derandomizer
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_sop,
  input  logic       in_err,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_err
);
  logic [15:1] prbs_q;
  logic        synced_q;     // an inverted sync byte has been found
  logic        group_start;
  prbs_step_t  step;
  logic [7:0]  data_d;

  always_comb begin
    group_start = in_sop && (in_data == SYNC_INV);
    step        = prbs_step8(prbs_q);
    if (in_sop) data_d = group_start ? SYNC_BYTE : in_data;
    else        data_d = in_data ^ step.bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prbs_q    <= PRBS_INIT;
      synced_q  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_err   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= data_d;
        out_sop  <= in_sop;
        out_err  <= in_err || !(synced_q || group_start);
        if (group_start) begin
          prbs_q   <= PRBS_INIT;
          synced_q <= 1'b1;
        end else begin
          prbs_q   <= step.state;
        end
      end
    end
  end
endmodule
