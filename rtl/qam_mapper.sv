// qam_mapper: 16-QAM I/Q symbol mapper.
//
// Maps a 4-bit symbol {A,B,b1,b0} onto the levels -3,-1,+1,+3 of the I and Q
// rails. {A,B} select the quadrant (Gray numbered 00,10,11,01 counter-clockwise
// from the first quadrant); {b1,b0} select the point inside it, and the points
// of each quadrant are those of the first one rotated by a multiple of 90
// degrees, which makes the low bits immune to a 90-degree carrier ambiguity.
// The exact bit-to-point assignment is this design's choice (the document only
// names the mapper). Registered: the point appears one cycle after in_valid.
module qam_mapper
  import modem_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sym_t    in_sym,
  output logic    out_valid,
  output qam_pt_t out_pt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pt    <= '{i: 3'sd1, q: 3'sd1};
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pt <= qam_map(in_sym);
    end
  end
endmodule
