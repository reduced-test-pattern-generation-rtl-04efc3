// Block matcher.
//
// Compares every BW-bit block of the current (filled) test vector with the
// same block of the previous vector, the reference, and raises diff[c] for
// each block c that differs. Only those blocks need to be stored to rebuild
// the vector from its predecessor. When ref_valid is low (first vector of a
// set) every block counts as different, since the reference vector is kept
// whole. diff[NB-1] belongs to block 1, the leftmost block. Combinational.
// The comparison rule follows the block matching step of the method.
module block_matcher #(
  parameter int unsigned BW = hc_pkg::BLOCK_W,
  parameter int unsigned NB = hc_pkg::NUM_BLOCKS
) (
  input  logic [NB*BW-1:0] cur,
  input  logic [NB*BW-1:0] ref_vec,
  input  logic             ref_valid,
  output logic [NB-1:0]    diff
);

  always_comb begin
    for (int c = 0; c < NB; c++)
      diff[c] = !ref_valid || (cur[c*BW +: BW] != ref_vec[c*BW +: BW]);
  end

endmodule
