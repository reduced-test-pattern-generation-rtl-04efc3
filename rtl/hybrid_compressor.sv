// Hybrid test-data compressor (top level).
//
// Takes a test set of NV vectors, each NB blocks of BW bits with don't cares,
// and turns it into one serial compressed bitstream plus the side
// information a decompressor needs. The flow, one phase after the other:
//   LOAD   the vectors arrive on in_* (valid/ready, one per clock); each is
//          written to the vector store and counted by the minterm frequency
//          counter.
//   FILL   one vector per clock: every block's don't cares are filled with
//          its most frequent compatible minterm and written back; the block
//          matcher compares the filled vector with the previous one, the
//          per-vector change flags are kept (chg_mask) and the frequency range
//          separator counts changes per block column.
//   BWT    every high-frequency column (one changing at least HF_THRESH
//          times) is read down the NV vectors as a string of NV symbols and
//          Burrows-Wheeler transformed, two clocks per column; low-frequency
//          columns are skipped in one clock.
//   OVL    the block adder merges, per vector, the BWT columns with the low-
//          frequency columns and the merged NB*BW-bit vector goes to the
//          pattern overlapper, which chains the vectors at the smallest
//          compatible shift and shifts the stream out on so_* (one bit per
//          clock). shift_valid/shift report the shift chosen for each vector.
//   FLUSH  the overlapper's window is drained; done pulses for one clock and
//          the unit returns to LOAD for the next test set.
// high_mask, bwt_primary (row index of each transformed column; 0 for low-
// frequency columns), chg_mask and xfill_blocks stay valid from done until the
// next set has been filled. Block c in all masks counts from the right:
// bit NB-1 is block 1, the leftmost block of a vector.
// The order of the steps and the units follow the method's block diagram;
// the phase-by-phase controller, the column-wise application of the BWT and
// the merge by column selection are this design's choices.
// Two sub-block outputs are left unconnected on purpose: the store's care
// view (every column read for the BWT is already filled) and the
// separator's raw change counts (only its high/low decision is needed).
module hybrid_compressor #(
  parameter int unsigned BW        = hc_pkg::BLOCK_W,
  parameter int unsigned NB        = hc_pkg::NUM_BLOCKS,
  parameter int unsigned NV        = hc_pkg::NUM_VECTORS,
  parameter int unsigned HF_THRESH = hc_pkg::HF_THRESH,
  parameter int unsigned CNT_W     = hc_pkg::CNT_W,
  localparam int unsigned W   = NB * BW,
  localparam int unsigned VW  = (NV > 1) ? $clog2(NV) : 1,
  localparam int unsigned CW  = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned IW  = (NV > 1) ? $clog2(NV) : 1,
  localparam int unsigned SW  = $clog2(W + 1)
) (
  input  logic                    clk,
  input  logic                    reset,
  // raw test vectors
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [W-1:0]            in_val,
  input  logic [W-1:0]            in_care,
  // compressed serial stream
  output logic                    so_valid,
  output logic                    so_bit,
  output logic                    so_care,
  output logic                    shift_valid,
  output logic [SW-1:0]           shift,
  // side information
  output logic [NB-1:0]           high_mask,
  output logic [NB-1:0][IW-1:0]   bwt_primary,
  output logic [NV-1:0][NB-1:0]   chg_mask,
  output logic [CNT_W-1:0]        xfill_blocks,
  output logic                    busy,
  output logic                    done
);

  import hc_pkg::*;

  localparam int unsigned NM = 1 << BW;

  hc_state_e state;
  logic [VW-1:0] v_cnt;
  logic [CW-1:0] c_cnt;
  logic          flush_sent;

  // ---------------- vector store ----------------
  logic                  st_we;
  logic [VW-1:0]         st_waddr;
  logic [W-1:0]          st_wval, st_wcare, st_rval, st_rcare;
  logic [NV-1:0][W-1:0]  st_all_val, st_all_care;

  test_vector_store #(.NV(NV), .W(W)) u_store (
    .clk, .rst(reset), .we(st_we), .waddr(st_waddr), .wval(st_wval), .wcare(st_wcare),
    .raddr(v_cnt), .rval(st_rval), .rcare(st_rcare),
    .all_val(st_all_val), .all_care(st_all_care)
  );

  // ---------------- frequency computation ----------------
  logic                       clear;
  logic                       load_take;
  logic [NM-1:0][CNT_W-1:0]   mcount;

  assign clear     = (state == ST_DONE);
  assign in_ready  = (state == ST_LOAD);
  assign load_take = in_valid && in_ready;

  minterm_freq_counter #(.BW(BW), .NB(NB), .CNT_W(CNT_W)) u_freq (
    .clk, .rst(reset), .clear, .in_valid(load_take),
    .in_val, .in_care, .count(mcount)
  );

  // ---------------- don't-care filling ----------------
  logic [W-1:0]  filled;
  logic [NB-1:0] had_x;

  for (genvar c = 0; c < NB; c++) begin : g_fill
    x_filler #(.BW(BW), .CNT_W(CNT_W)) u_fill (
      .in_val (st_rval [c*BW +: BW]),
      .in_care(st_rcare[c*BW +: BW]),
      .count  (mcount),
      .out_val(filled[c*BW +: BW]),
      .had_x  (had_x[c])
    );
  end

  // ---------------- block matching and separation ----------------
  logic [W-1:0]   prev_filled;
  logic [NB-1:0]  diff;
  logic [NB-1:0]  sep_high;
  logic [NB-1:0][CNT_W-1:0] chg_cnt;
  logic           fill_step;

  assign fill_step = (state == ST_FILL);

  block_matcher #(.BW(BW), .NB(NB)) u_match (
    .cur(filled), .ref_vec(prev_filled), .ref_valid(v_cnt != '0), .diff
  );

  freq_range_separator #(.NB(NB), .CNT_W(CNT_W), .HF_THRESH(HF_THRESH)) u_sep (
    .clk, .rst(reset), .clear, .in_valid(fill_step && v_cnt != '0),
    .diff, .chg_cnt, .high_mask(sep_high)
  );

  always_comb begin
    st_we    = load_take || fill_step;
    st_waddr = v_cnt;
    st_wval  = fill_step ? filled : in_val;
    st_wcare = fill_step ? '1     : in_care;
  end

  // ---------------- BWT of high-frequency columns ----------------
  logic                   bwt_start, bwt_done;
  logic [NV-1:0][BW-1:0]  bwt_sym, bwt_last;
  logic [IW-1:0]          bwt_prim;
  logic [NV-1:0][W-1:0]   bwt_mem;   // transformed columns, row v = vector v

  always_comb begin
    for (int v = 0; v < NV; v++)
      bwt_sym[v] = st_all_val[v][c_cnt*BW +: BW];
  end

  assign bwt_start = (state == ST_BWT) && sep_high[c_cnt];

  bwt_unit #(.N(NV), .W(BW)) u_bwt (
    .clk, .rst(reset), .start(bwt_start), .sym(bwt_sym),
    .done(bwt_done), .last(bwt_last), .primary(bwt_prim)
  );

  // ---------------- merge and overlap ----------------
  logic [W-1:0]  merged;
  logic          ovl_valid, ovl_ready, ovl_flush, ovl_busy;

  block_adder #(.BW(BW), .NB(NB)) u_add (
    .low_vec(st_rval), .bwt_vec(bwt_mem[v_cnt]), .high_mask(high_mask), .out_vec(merged)
  );

  assign ovl_valid = (state == ST_OVL);
  assign ovl_flush = (state == ST_FLUSH) && !flush_sent;

  pattern_overlap #(.L(W)) u_ovl (
    .clk, .rst(reset),
    .in_valid(ovl_valid), .in_ready(ovl_ready), .in_val(merged), .in_care({W{1'b1}}),
    .flush(ovl_flush), .busy(ovl_busy),
    .out_valid(so_valid), .out_bit(so_bit), .out_care(so_care),
    .shift_valid, .shift
  );

  // ---------------- controller ----------------
  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= ST_LOAD;
      v_cnt        <= '0;
      c_cnt        <= '0;
      flush_sent   <= 1'b0;
      prev_filled  <= '0;
      chg_mask     <= '0;
      xfill_blocks <= '0;
      high_mask    <= '0;
      bwt_primary  <= '0;
      bwt_mem      <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_LOAD: begin
          if (load_take) begin
            if (v_cnt == VW'(NV - 1)) begin
              v_cnt        <= '0;
              xfill_blocks <= '0;
              state        <= ST_FILL;
            end else begin
              v_cnt <= v_cnt + VW'(1);
            end
          end
        end
        ST_FILL: begin
          prev_filled     <= filled;
          chg_mask[v_cnt] <= diff;
          xfill_blocks    <= xfill_blocks + CNT_W'($countones(had_x));
          if (v_cnt == VW'(NV - 1)) begin
            v_cnt <= '0;
            c_cnt <= '0;
            state <= ST_BWT;
          end else begin
            v_cnt <= v_cnt + VW'(1);
          end
        end
        ST_BWT: begin
          if (sep_high[c_cnt]) begin
            state <= ST_BWT_WAIT;
          end else begin
            bwt_primary[c_cnt] <= '0;
            if (c_cnt == CW'(NB - 1)) begin
              high_mask <= sep_high;
              state     <= ST_OVL;
            end else begin
              c_cnt <= c_cnt + CW'(1);
            end
          end
        end
        ST_BWT_WAIT: begin
          if (bwt_done) begin
            for (int v = 0; v < NV; v++)
              bwt_mem[v][c_cnt*BW +: BW] <= bwt_last[v];
            bwt_primary[c_cnt] <= bwt_prim;
            if (c_cnt == CW'(NB - 1)) begin
              high_mask <= sep_high;
              state     <= ST_OVL;
            end else begin
              c_cnt <= c_cnt + CW'(1);
              state <= ST_BWT;
            end
          end
        end
        ST_OVL: begin
          if (ovl_ready) begin
            if (v_cnt == VW'(NV - 1)) begin
              v_cnt      <= '0;
              flush_sent <= 1'b0;
              state      <= ST_FLUSH;
            end else begin
              v_cnt <= v_cnt + VW'(1);
            end
          end
        end
        ST_FLUSH: begin
          if (!flush_sent) begin
            if (ovl_ready) flush_sent <= 1'b1;
          end else if (!ovl_busy) begin
            done  <= 1'b1;
            state <= ST_DONE;
          end
        end
        ST_DONE: begin
          v_cnt <= '0;
          state <= ST_LOAD;
        end
        default: state <= ST_LOAD;
      endcase
    end
  end

  assign busy = (state != ST_LOAD);

endmodule
