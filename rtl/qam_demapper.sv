// qam_demapper: 16-QAM hard-decision symbol demapper.
//
// Slices the I and Q rails (thresholds 0 and +-2*UNIT, level 1 = UNIT) and maps
// the resulting point back to the 4-bit symbol {A,B,b1,b0} with the inverse of
// qam_mapper's assignment. Registered: one cycle after in_valid. The slicer
// thresholds follow from the constellation; the bit assignment is this
// design's choice, as in the mapper.
module qam_demapper
  import modem_pkg::*;
#(
  parameter int unsigned W    = 12,
  parameter int          UNIT = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output sym_t                out_sym
);
  qam_pt_t p;
  assign p = '{i: slice_lvl(int'(in_i), UNIT), q: slice_lvl(int'(in_q), UNIT)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_sym <= qam_demap(p);
    end
  end
endmodule
