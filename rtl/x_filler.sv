// Don't-care filler for one block.
//
// Given a block as a value/care pair and the minterm frequency table, it
// outputs the minterm that the block contains and whose frequency is highest,
// so that filled blocks repeat as often as possible. Ties go to the smaller
// minterm. A fully specified block contains only itself and passes unchanged.
// Purely combinational.
// Filling towards the most frequent minterm follows the method; the tie rule
// is this design's choice.
module x_filler #(
  parameter int unsigned BW    = hc_pkg::BLOCK_W,
  parameter int unsigned CNT_W = hc_pkg::CNT_W,
  localparam int unsigned NM   = 1 << BW
) (
  input  logic [BW-1:0]              in_val,
  input  logic [BW-1:0]              in_care,
  input  logic [NM-1:0][CNT_W-1:0]   count,
  output logic [BW-1:0]              out_val,
  output logic                       had_x     // block had at least one don't care
);

  always_comb begin
    logic             found;
    logic [CNT_W-1:0] best_cnt;
    found    = 1'b0;
    best_cnt = '0;
    out_val  = in_val & in_care;
    for (int m = 0; m < NM; m++) begin
      if (((BW'(m) ^ in_val) & in_care) == '0) begin
        if (!found || count[m] > best_cnt) begin
          found    = 1'b1;
          best_cnt = count[m];
          out_val  = BW'(m);
        end
      end
    end
    had_x = ~&in_care;
  end

endmodule
