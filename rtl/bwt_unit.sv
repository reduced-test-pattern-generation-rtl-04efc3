// Burrows-Wheeler transform of a block of N symbols.
//
// The input string sym[0..N-1] (sym[0] first) is conceptually written out as
// its N cyclic rotations, rotation i starting at sym[i]. The rotations are
// sorted lexicographically (unsigned symbol order) and the transform is the
// last column of the sorted matrix, last[0..N-1] (last[0] = row 0), plus the
// row in which the original string lands, primary. Equal rotations keep their
// rotation order, so the sort is stable.
// The sort is done by ranking: rank(i) counts the rotations that sort before
// rotation i, using N*N parallel comparators, and the last symbol of
// rotation i, sym[(i+N-1) mod N], is written to row rank(i).
// Timing: a start pulse samples sym; done pulses one clock later with last
// and primary valid; they hold until the next start.
// The transform itself follows the method; the parallel ranking structure
// and the one-clock timing are this design's choices.
module bwt_unit #(
  parameter int unsigned N = 7,  // string length (DRDOBBS example)
  parameter int unsigned W = 8,  // symbol width (one character)
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [N-1:0][W-1:0]  sym,
  output logic                 done,
  output logic [N-1:0][W-1:0]  last,
  output logic [IW-1:0]        primary
);

  // sorts_first[i][j]: rotation j sorts strictly before rotation i
  logic [N-1:0][N-1:0]   sorts_first;
  logic [N-1:0][IW-1:0]  rank;
  logic [N-1:0][W-1:0]   last_c;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        logic decided, lt;
        decided = 1'b0;
        lt      = 1'b0;
        for (int k = 0; k < N; k++) begin
          if (!decided && sym[(j + k) % N] != sym[(i + k) % N]) begin
            decided = 1'b1;
            lt      = sym[(j + k) % N] < sym[(i + k) % N];
          end
        end
        // equal rotations: the lower rotation index sorts first
        sorts_first[i][j] = decided ? lt : (j < i);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++)
        if (sorts_first[i][j]) rank[i] = rank[i] + IW'(1);
    end
  end

  always_comb begin
    last_c = '0;
    for (int i = 0; i < N; i++)
      last_c[rank[i]] = sym[(i + N - 1) % N];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done    <= 1'b0;
      last    <= '0;
      primary <= '0;
    end else begin
      done <= start;
      if (start) begin
        last    <= last_c;
        primary <= rank[0];
      end
    end
  end

endmodule
