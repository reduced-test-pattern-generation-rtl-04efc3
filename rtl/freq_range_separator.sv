// Frequency range separator.
//
// Keeps, for each of the NB block columns, a count of how many times that
// column's block changed from one vector to the next (the diff flags of the
// block matcher, one set per clock while in_valid is high). A column whose
// count reaches HF_THRESH is a high-frequency column and is routed to the BWT;
// the others are low-frequency columns, kept as they are. high_mask is
// registered with the counts, so it is final one clock after the last diff
// set. clear (or rst) zeroes the counts.
// Classifying by change count, and the threshold of two changes (the
// worked three-vector example, where the columns changing in every vector
// are the high-frequency ones), are this design's reading of the method.
module freq_range_separator #(
  parameter int unsigned NB        = hc_pkg::NUM_BLOCKS,
  parameter int unsigned CNT_W     = hc_pkg::CNT_W,
  parameter int unsigned HF_THRESH = hc_pkg::HF_THRESH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic [NB-1:0]            diff,
  output logic [NB-1:0][CNT_W-1:0] chg_cnt,
  output logic [NB-1:0]            high_mask
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      chg_cnt <= '0;
    end else if (in_valid) begin
      for (int c = 0; c < NB; c++)
        if (diff[c] && chg_cnt[c] != '1)
          chg_cnt[c] <= chg_cnt[c] + CNT_W'(1);
    end
  end

  always_comb begin
    for (int c = 0; c < NB; c++)
      high_mask[c] = (chg_cnt[c] >= CNT_W'(HF_THRESH));
  end

endmodule
