// Minterm frequency counter.
//
// For every one of the 2^BW minterms (fully specified block values) it counts
// how many blocks of the test set contain that minterm, a block containing a
// minterm when they agree on every specified bit. A block with k don't cares
// therefore adds one to 2^k counters. One whole vector of NB blocks is taken
// per clock when in_valid is high; each counter adds the number of the NB
// blocks that contain its minterm. clear (or rst) zeroes all counters.
// Counts are registered: they reflect a vector one clock after it is taken.
// Counters saturate at 2^CNT_W-1.
// The counting rule follows the frequency computation of the method; the
// vector-per-clock throughput and saturation are this design's choices.
module minterm_freq_counter #(
  parameter int unsigned BW    = hc_pkg::BLOCK_W,
  parameter int unsigned NB    = hc_pkg::NUM_BLOCKS,
  parameter int unsigned CNT_W = hc_pkg::CNT_W,
  localparam int unsigned NM   = 1 << BW
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic [NB*BW-1:0]           in_val,
  input  logic [NB*BW-1:0]           in_care,
  output logic [NM-1:0][CNT_W-1:0]   count
);

  localparam int unsigned HW = $clog2(NB + 1);

  logic [NM-1:0][HW-1:0] hits;

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      hits[m] = '0;
      for (int c = 0; c < NB; c++) begin
        if ((((BW'(m) ^ in_val[(NB-1-c)*BW +: BW]) & in_care[(NB-1-c)*BW +: BW]) == '0))
          hits[m] = hits[m] + HW'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count <= '0;
    end else if (in_valid) begin
      for (int m = 0; m < NM; m++) begin
        if ({1'b0, count[m]} + (CNT_W+1)'(hits[m]) > (CNT_W+1)'({CNT_W{1'b1}}))
          count[m] <= '1;
        else
          count[m] <= count[m] + CNT_W'(hits[m]);
      end
    end
  end

endmodule
