// Self-checking testbench for bwt_unit.
// Checks the two worked examples (DRDOBBS -> OBRSDDB with the original string
// in row 3; $WORK -> KRWO$ with the original in row 0), then random strings
// over a small alphabet, so that repeated symbols and equal rotations occur.
// Random results are compared with a reference that builds and sorts the
// rotation matrix directly, and the transform is inverted to show that it is
// lossless. done must follow start by exactly one clock.
module tb_bwt_unit;
  localparam int N7 = 7, N5 = 5, W = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 start7, done7, start5, done5;
  logic [N7-1:0][W-1:0] sym7, last7;
  logic [N5-1:0][W-1:0] sym5, last5;
  logic [2:0]           prim7, prim5;

  bwt_unit #(.N(N7), .W(W)) dut7 (.clk, .rst, .start(start7), .sym(sym7), .done(done7), .last(last7), .primary(prim7));
  bwt_unit #(.N(N5), .W(W)) dut5 (.clk, .rst, .start(start5), .sym(sym5), .done(done5), .last(last5), .primary(prim5));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference: rotation matrix, stable selection sort by rows
  task automatic ref_bwt7(input logic [N7-1:0][W-1:0] s,
                          output logic [N7-1:0][W-1:0] l, output int prim);
    int order[N7];
    for (int i = 0; i < N7; i++) order[i] = i;
    for (int a = 0; a < N7; a++)
      for (int b = 0; b < N7 - 1 - a; b++) begin
        int x = order[b], y = order[b+1], cmp = 0;
        for (int k = 0; k < N7 && cmp == 0; k++) begin
          if (s[(x+k)%N7] > s[(y+k)%N7]) cmp = 1;
          else if (s[(x+k)%N7] < s[(y+k)%N7]) cmp = -1;
        end
        if (cmp > 0) begin order[b] = y; order[b+1] = x; end
      end
    for (int r = 0; r < N7; r++) begin
      l[r] = s[(order[r] + N7 - 1) % N7];
      if (order[r] == 0) prim = r;
    end
  endtask

  // inverse transform (LF mapping) used to show the transform is reversible
  function automatic logic [N7-1:0][W-1:0] inv_bwt7(input logic [N7-1:0][W-1:0] l, input int prim);
    logic [N7-1:0][W-1:0] s;
    int lf[N7];
    int row;
    for (int i = 0; i < N7; i++) begin
      int smaller = 0, same_before = 0;
      for (int j = 0; j < N7; j++) begin
        if (l[j] < l[i]) smaller++;
        if (j < i && l[j] == l[i]) same_before++;
      end
      lf[i] = smaller + same_before;
    end
    row = prim;
    s = '0;
    for (int k = N7 - 1; k >= 0; k--) begin
      // row `row` is rotation k+1; its last symbol is s[k]
      s[k] = l[row];
      row = lf[row];
    end
    return s;
  endfunction

  task automatic run7(input logic [N7-1:0][W-1:0] s);
    @(negedge clk);
    sym7 = s; start7 = 1'b1;
    @(negedge clk);
    start7 = 1'b0;
    check(done7 == 1'b1, "done one clock after start (N=7)");
    @(negedge clk);
    check(done7 == 1'b0, "done is a single pulse");
  endtask

  function automatic logic [N7-1:0][W-1:0] str7(input string t);
    logic [N7-1:0][W-1:0] r;
    for (int i = 0; i < N7; i++) r[i] = W'(t[i]);
    return r;
  endfunction

  initial begin
    logic [N7-1:0][W-1:0] s, l_ref;
    int p_ref;
    start7 = 0; start5 = 0; sym7 = '0; sym5 = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // worked example 1
    run7(str7("DRDOBBS"));
    check(last7 == str7("OBRSDDB"), "DRDOBBS last column");
    check(prim7 == 3'd3, "DRDOBBS primary row");

    // worked example 2
    @(negedge clk);
    for (int i = 0; i < N5; i++) sym5[i] = W'(("$WORK") >> (8 * (N5 - 1 - i)));
    start5 = 1'b1;
    @(negedge clk);
    start5 = 1'b0;
    check(done5, "done one clock after start (N=5)");
    check(last5[0] == "K" && last5[1] == "R" && last5[2] == "W" && last5[3] == "O" && last5[4] == "$",
          "$WORK last column");
    check(prim5 == 3'd0, "$WORK primary row");

    // all-equal string: every rotation equal
    run7(str7("AAAAAAA"));
    check(last7 == str7("AAAAAAA") && prim7 == 0, "constant string");

    // more constant strings: all rotations equal, primary must stay 0
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] ch;
      ch = W'($urandom);
      for (int i = 0; i < N7; i++) s[i] = ch;
      run7(s);
      check(last7 == s && prim7 == 0, $sformatf("constant string %0d", t));
    end

    // random strings over a 3-symbol alphabet
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N7; i++) s[i] = W'("a" + ($urandom % 3));
      run7(s);
      ref_bwt7(s, l_ref, p_ref);
      check(last7 == l_ref, $sformatf("random last column %0d", t));
      check(int'(prim7) == p_ref, $sformatf("random primary %0d", t));
      check(inv_bwt7(last7, int'(prim7)) == s, $sformatf("inverse transform %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
