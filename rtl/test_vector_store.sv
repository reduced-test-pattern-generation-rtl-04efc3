// Test vector store (the DATA box of the flow).
//
// A small register file that holds NV test vectors of W bits as value/care
// pairs. One vector is written per clock (we, waddr); one vector can be read
// combinationally by index (raddr), and the whole contents are also visible
// on all_val/all_care so that the controller can read a block column across
// every vector in one cycle. Reset clears the contents to all-zero, fully
// specified. Write-to-read latency is one clock.
// The store and its ports are this design's own choice; the flow only says
// that the test data is held and read out.
module test_vector_store #(
  parameter int unsigned NV = hc_pkg::NUM_VECTORS,
  parameter int unsigned W  = hc_pkg::NUM_BLOCKS * hc_pkg::BLOCK_W,
  localparam int unsigned AW = (NV > 1) ? $clog2(NV) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [W-1:0]          wval,
  input  logic [W-1:0]          wcare,
  input  logic [AW-1:0]         raddr,
  output logic [W-1:0]          rval,
  output logic [W-1:0]          rcare,
  output logic [NV-1:0][W-1:0]  all_val,
  output logic [NV-1:0][W-1:0]  all_care
);

  logic [NV-1:0][W-1:0] mem_val, mem_care;

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_val  <= '0;
      mem_care <= '1;
    end else if (we && (waddr < AW'(NV))) begin
      mem_val[waddr]  <= wval & wcare;
      mem_care[waddr] <= wcare;
    end
  end

  always_comb begin
    rval  = '0;
    rcare = '0;
    if (raddr < AW'(NV)) begin
      rval  = mem_val[raddr];
      rcare = mem_care[raddr];
    end
  end

  assign all_val  = mem_val;
  assign all_care = mem_care;

endmodule
