// End-to-end testbench for hybrid_compressor, at its default size
// (three vectors of seven 4-bit blocks).
// Each test set is loaded, compressed, and the serial stream, the shift of
// every vector, the high-frequency mask, the BWT row indices, the change
// flags and the number of filled blocks are compared with a reference model
// of the whole flow written here. Independently of that model, the stream is
// decompressed (vectors cut out at the reported shifts, BWT columns inverted
// with their row indices) and every rebuilt vector must agree with the
// specified bits of the original. The compression latency is checked
// against the controller's clock budget. Test sets: the two worked examples
// of the method, an all-zero set (every vector overlaps the previous one
// almost completely) and random sets with don't cares. Each mechanism
// (don't-care fill, changed and unchanged blocks, high and low frequency
// columns, BWT, partial and missing overlap, back-to-back sets) is counted
// and must occur at least once.
module tb_hybrid_compressor;
  import hc_pkg::*;
  localparam int BW = BLOCK_W, NB = NUM_BLOCKS, NV = NUM_VECTORS, W = NB * BW, NM = 1 << BW;
  localparam int IW = $clog2(NV), SW = $clog2(W + 1);

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                  in_valid, in_ready, so_valid, so_bit, so_care, shift_valid, busy, done;
  logic [W-1:0]          in_val, in_care;
  logic [SW-1:0]         shift;
  logic [NB-1:0]         high_mask;
  logic [NB-1:0][IW-1:0] bwt_primary;
  logic [NV-1:0][NB-1:0] chg_mask;
  logic [CNT_W-1:0]      xfill_blocks;

  hybrid_compressor dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int ev_fill = 0, ev_changed = 0, ev_same = 0, ev_high = 0, ev_low = 0,
      ev_bwt = 0, ev_partial = 0, ev_none = 0, ev_sets = 0;

  // captured outputs
  bit got_bits[$];
  int got_shifts[$];
  always @(posedge clk) begin
    if (so_valid) begin
      got_bits.push_back(so_bit);
      if (!so_care) begin failures++; $display("FAIL: unresolved don't care in stream"); end
    end
    if (shift_valid) got_shifts.push_back(int'(shift));
  end

  // block b (0 = leftmost) of a vector
  function automatic logic [BW-1:0] blk(input logic [W-1:0] v, input int b);
    return v[(NB - 1 - b) * BW +: BW];
  endfunction

  // stable rotation sort of an NV-symbol column: last column and row of rotation 0
  task automatic ref_bwt(input logic [BW-1:0] s[NV], output logic [BW-1:0] l[NV], output int prim);
    int order[NV];
    foreach (order[i]) order[i] = i;
    for (int a = 0; a < NV; a++)
      for (int b = 0; b < NV - 1 - a; b++) begin
        int x = order[b], y = order[b+1], cmp = 0;
        for (int k = 0; k < NV && cmp == 0; k++)
          if (s[(x+k)%NV] != s[(y+k)%NV]) cmp = (s[(x+k)%NV] > s[(y+k)%NV]) ? 1 : -1;
        if (cmp > 0) begin order[b] = y; order[b+1] = x; end
      end
    for (int r = 0; r < NV; r++) begin
      l[r] = s[(order[r] + NV - 1) % NV];
      if (order[r] == 0) prim = r;
    end
  endtask

  function automatic void inv_bwt(input logic [BW-1:0] l[NV], input int prim, output logic [BW-1:0] s[NV]);
    int lf[NV];
    int row;
    for (int i = 0; i < NV; i++) begin
      int k = 0;
      for (int j = 0; j < NV; j++)
        if (l[j] < l[i] || (j < i && l[j] == l[i])) k++;
      lf[i] = k;
    end
    row = prim;
    for (int k = NV - 1; k >= 0; k--) begin
      s[k] = l[row];
      row = lf[row];
    end
  endfunction

  task automatic run_set(input logic [W-1:0] val[NV], input logic [W-1:0] care[NV], input string what);
    int            cnt[NM];
    logic [W-1:0]  fil[NV], mrg[NV];
    logic [NB-1:0] dif[NV];
    int            chg[NB];
    logic [NB-1:0] hm;
    int            prim[NB];
    int            nfill;
    bit            exp_bits[$];
    int            exp_sh[$];
    int            pos[NV];
    int            t_start, t_end, budget;

    // ---- reference model ----
    foreach (cnt[m]) cnt[m] = 0;
    for (int v = 0; v < NV; v++)
      for (int b = 0; b < NB; b++)
        for (int m = 0; m < NM; m++)
          if (((BW'(m) ^ blk(val[v], b)) & blk(care[v], b)) == 0) cnt[m]++;
    nfill = 0;
    for (int v = 0; v < NV; v++)
      for (int b = 0; b < NB; b++) begin
        int best = -1, bm = 0;
        for (int m = 0; m < NM; m++)
          if (((BW'(m) ^ blk(val[v], b)) & blk(care[v], b)) == 0 && cnt[m] > best) begin
            best = cnt[m]; bm = m;
          end
        fil[v][(NB - 1 - b) * BW +: BW] = BW'(bm);
        if (blk(care[v], b) != '1) nfill++;
      end
    foreach (chg[b]) chg[b] = 0;
    for (int v = 0; v < NV; v++)
      for (int b = 0; b < NB; b++) begin
        dif[v][NB - 1 - b] = (v == 0) || (blk(fil[v], b) != blk(fil[v-1], b));
        if (v > 0 && dif[v][NB - 1 - b]) chg[b]++;
      end
    for (int b = 0; b < NB; b++) hm[NB - 1 - b] = (chg[b] >= HF_THRESH);
    for (int v = 0; v < NV; v++) mrg[v] = fil[v];
    for (int b = 0; b < NB; b++) begin
      prim[b] = 0;
      if (hm[NB - 1 - b]) begin
        logic [BW-1:0] s[NV], l[NV];
        for (int v = 0; v < NV; v++) s[v] = blk(fil[v], b);
        ref_bwt(s, l, prim[b]);
        for (int v = 0; v < NV; v++) mrg[v][(NB - 1 - b) * BW +: BW] = l[v];
      end
    end
    // greedy overlap of the merged vectors (no don't cares are left)
    exp_bits = {};
    exp_sh = {};
    for (int v = 0; v < NV; v++) begin
      int sel = W;
      if (v > 0)
        for (int sh = W; sh >= 1; sh--) begin
          bit ok = 1;
          for (int p = 0; p < W - sh; p++)
            if (exp_bits[exp_bits.size() - (W - sh) + p] != mrg[v][W - 1 - p]) ok = 0;
          if (ok) sel = sh;
        end
      for (int p = W - sel; p < W; p++) exp_bits.push_back(mrg[v][W - 1 - p]);
      exp_sh.push_back(sel);
    end

    // ---- drive the design ----
    got_bits = {};
    got_shifts = {};
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      in_val = val[v]; in_care = care[v]; in_valid = 1'b1;
      do @(posedge clk); while (!in_ready);
      if (v == NV - 1) t_start = int'($time / 10);
      @(negedge clk);
      in_valid = 1'b0;
    end
    do @(posedge clk); while (!done);
    t_end = int'($time / 10);
    @(negedge clk);

    // ---- compare ----
    check(xfill_blocks == CNT_W'(nfill), $sformatf("%s: filled blocks %0d expected %0d", what, xfill_blocks, nfill));
    check(high_mask == hm, $sformatf("%s: high mask %b expected %b", what, high_mask, hm));
    for (int b = 0; b < NB; b++)
      check(int'(bwt_primary[NB - 1 - b]) == prim[b], $sformatf("%s: BWT row of block %0d", what, b + 1));
    for (int v = 0; v < NV; v++)
      check(chg_mask[v] == dif[v], $sformatf("%s: change flags of vector %0d", what, v + 1));
    check(got_shifts.size() == NV, $sformatf("%s: one shift per vector", what));
    for (int v = 0; v < NV && v < got_shifts.size(); v++)
      check(got_shifts[v] == exp_sh[v], $sformatf("%s: shift of vector %0d is %0d expected %0d", what, v + 1, got_shifts[v], exp_sh[v]));
    check(got_bits == exp_bits, $sformatf("%s: stream (%0d bits, expected %0d)", what, got_bits.size(), exp_bits.size()));

    // latency budget: fill NV, BWT 2 per high / 1 per low column,
    // 1 + shift per vector, flush request + L-1 shifts + idle check,
    // and one for the registered done
    budget = NV + NB + $countones(hm) + 1 + (W - 1) + 1 + 1;
    foreach (exp_sh[v]) budget += 1 + exp_sh[v];
    check(t_end - t_start == budget, $sformatf("%s: %0d clocks, expected %0d", what, t_end - t_start, budget));

    // ---- decompress from what the design produced ----
    begin
      logic [W-1:0] rb[NV];
      int p = 0;
      for (int v = 0; v < NV; v++) begin
        if (v > 0 && v < got_shifts.size()) p += got_shifts[v];
        for (int k = 0; k < W; k++)
          rb[v][W - 1 - k] = (p + k < got_bits.size()) ? got_bits[p + k] : 1'b0;
      end
      for (int b = 0; b < NB; b++)
        if (high_mask[NB - 1 - b]) begin
          logic [BW-1:0] l[NV], s[NV];
          for (int v = 0; v < NV; v++) l[v] = blk(rb[v], b);
          inv_bwt(l, int'(bwt_primary[NB - 1 - b]), s);
          for (int v = 0; v < NV; v++) rb[v][(NB - 1 - b) * BW +: BW] = s[v];
        end
      for (int v = 0; v < NV; v++)
        check(((rb[v] ^ val[v]) & care[v]) == '0, $sformatf("%s: rebuilt vector %0d agrees with the test set", what, v + 1));
    end

    // ---- mechanisms ----
    ev_sets++;
    if (xfill_blocks != 0) ev_fill++;
    for (int v = 1; v < NV; v++) begin
      ev_changed += $countones(chg_mask[v]);
      ev_same    += NB - $countones(chg_mask[v]);
    end
    ev_high += $countones(high_mask);
    ev_low  += NB - $countones(high_mask);
    ev_bwt  += $countones(high_mask);
    for (int v = 1; v < got_shifts.size(); v++) begin
      if (got_shifts[v] < W) ev_partial++;
      else ev_none++;
    end
  endtask

  function automatic void parse(input string t, output logic [W-1:0] v, output logic [W-1:0] c);
    int k = W - 1;
    v = '0; c = '0;
    for (int i = 0; i < t.len(); i++)
      if (t[i] == "0" || t[i] == "1" || t[i] == "X") begin
        c[k] = (t[i] != "X");
        v[k] = (t[i] == "1");
        k--;
      end
  endfunction

  initial begin
    logic [W-1:0] v[NV], c[NV];
    in_valid = 0; in_val = '0; in_care = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;

    // worked example with don't cares
    parse("01XX 0XX0 X0X0 10XX X1X1 0XX1 X0X1", v[0], c[0]);
    parse("01X0 01XX X01X 10X1 0X1X 1XX0 0X01", v[1], c[1]);
    parse("0XX0 10X1 10X0 XX01 00XX 10X0 01X1", v[2], c[2]);
    run_set(v, c, "don't-care example");

    // worked block-matching example (blocks 1, 5, 7 become high frequency)
    parse("0100 1100 0001 1000 0110 1000 0111", v[0], c[0]);
    parse("0110 1100 0001 1011 0011 1000 0101", v[1], c[1]);
    parse("0100 1001 0001 1011 0010 1000 0010", v[2], c[2]);
    run_set(v, c, "block-matching example");
    check(high_mask == 7'b1000101, "block-matching example: blocks 1, 5, 7 high frequency");

    // all-zero set
    for (int i = 0; i < NV; i++) begin v[i] = '0; c[i] = '1; end
    run_set(v, c, "all-zero set");

    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < NV; i++)
        for (int k = 0; k < W; k++) begin
          v[i][k] = 1'($urandom);
          c[i][k] = ($urandom % 4) < (t % 4);
        end
      // copy some blocks down so that unchanged blocks occur
      for (int i = 1; i < NV; i++)
        for (int b = 0; b < NB; b++)
          if ($urandom % 3 == 0) begin
            v[i][b*BW +: BW] = v[i-1][b*BW +: BW];
            c[i][b*BW +: BW] = c[i-1][b*BW +: BW];
          end
      run_set(v, c, $sformatf("random %0d", t));
    end

    $display("mechanisms: sets=%0d fill=%0d changed=%0d unchanged=%0d high=%0d low=%0d bwt=%0d partial_overlap=%0d no_overlap=%0d",
             ev_sets, ev_fill, ev_changed, ev_same, ev_high, ev_low, ev_bwt, ev_partial, ev_none);
    check(ev_fill > 0,    "don't-care fill happened");
    check(ev_changed > 0, "changed block happened");
    check(ev_same > 0,    "unchanged block happened");
    check(ev_high > 0,    "high-frequency column happened");
    check(ev_low > 0,     "low-frequency column happened");
    check(ev_bwt > 0,     "BWT happened");
    check(ev_partial > 0, "partial overlap happened");
    check(ev_none > 0,    "missing overlap happened");
    check(ev_sets > 1,    "back-to-back test sets happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
