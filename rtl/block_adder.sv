// Block adder: joins the two data paths of the flow.
//
// Builds one vector from the low-frequency path (the filled vector, used for
// low-frequency columns) and the high-frequency path (the BWT-transformed
// column data, used where high_mask is set). high_mask[c] and block c are
// counted from the right, as in block_matcher. Combinational.
// The flow names this block only; merging by column selection is this
// design's choice.
module block_adder #(
  parameter int unsigned BW = hc_pkg::BLOCK_W,
  parameter int unsigned NB = hc_pkg::NUM_BLOCKS
) (
  input  logic [NB*BW-1:0] low_vec,
  input  logic [NB*BW-1:0] bwt_vec,
  input  logic [NB-1:0]    high_mask,
  output logic [NB*BW-1:0] out_vec
);

  always_comb begin
    for (int c = 0; c < NB; c++)
      out_vec[c*BW +: BW] = high_mask[c] ? bwt_vec[c*BW +: BW] : low_vec[c*BW +: BW];
  end

endmodule
