// Self-checking testbench for pattern_overlap.
// First the worked example: ten 5-bit scan patterns with don't cares must
// chain into the 16-bit stream 0010101001110001 (50 bits uncompressed) with
// shifts 5,1,1,1,1,2,1,1,1,2, one clock per shift and L-1 clocks to flush.
// Then random streams of random patterns with don't cares, compared with a
// reference that keeps the whole stream as a string and tries every shift.
// Finally every pattern is checked to be contained in the emitted stream at
// the position the reported shifts give it.
module tb_pattern_overlap;
  localparam int L  = 5;
  localparam int SW = $clog2(L + 1);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid, in_ready, flush, busy, out_valid, out_bit, out_care, shift_valid;
  logic [L-1:0]  in_val, in_care;
  logic [SW-1:0] shift;

  pattern_overlap #(.L(L)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
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

  // captured output stream: characters '0', '1', '-'
  string got = "";
  int    got_shifts[$];
  always @(posedge clk) begin
    if (out_valid) got = {got, bit_char(out_bit, out_care)};
    if (shift_valid) got_shifts.push_back(int'(shift));
  end

  function automatic string bit_char(input logic b, input logic c);
    string r;
    if (!c)     r = "-";
    else if (b) r = "1";
    else        r = "0";
    return r;
  endfunction

  function automatic bit same_list(input int a[$], input int b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  function automatic bit compat(input byte a, input byte b);
    return a == "-" || b == "-" || a == b;
  endfunction

  // reference overlap on strings
  function automatic string ref_overlap(input string pats[$], output int shifts[$]);
    string s = "";
    shifts = {};
    foreach (pats[n]) begin
      int sel = L;
      if (n > 0) begin
        for (int sh = L; sh >= 1; sh--) begin
          bit ok = 1;
          for (int p = 0; p < L - sh; p++)
            if (!compat(s[s.len() - (L - sh) + p], pats[n][p])) ok = 0;
          if (ok) sel = sh;
        end
      end
      for (int p = 0; p < L - sel; p++) begin
        int k = s.len() - (L - sel) + p;
        if (s[k] == "-") s[k] = pats[n][p];
      end
      s = {s, pats[n].substr(L - sel, L - 1)};
      shifts.push_back(sel);
    end
    return s;
  endfunction

  task automatic send(input string p);
    @(negedge clk);
    for (int i = 0; i < L; i++) begin
      in_care[L-1-i] = (p[i] != "-");
      in_val[L-1-i]  = (p[i] == "1");
    end
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic do_flush();
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic run_stream(input string pats[$], input string what);
    string exp_s;
    int    exp_sh[$];
    int    pos;
    got = "";
    got_shifts = {};
    foreach (pats[n]) send(pats[n]);
    do_flush();
    exp_s = ref_overlap(pats, exp_sh);
    check(got == exp_s, $sformatf("%s: stream %s expected %s", what, got, exp_s));
    check(same_list(got_shifts, exp_sh), $sformatf("%s: shift list", what));
    // each pattern must be contained in the stream where its shifts place it
    pos = 0;
    foreach (pats[n]) begin
      bit ok = 1;
      if (n > 0) pos += got_shifts[n];
      for (int p = 0; p < L; p++)
        if (pos + p >= got.len() || !compat(got[pos + p], pats[n][p])) ok = 0;
      check(ok, $sformatf("%s: pattern %0d contained", what, n));
    end
  endtask

  initial begin
    string fig[$];
    int    fig_sh[$];
    longint t0, t1;
    in_valid = 0; flush = 0; in_val = '0; in_care = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    fig = {"0010-", "010--", "101--", "01010", "10100", "100--", "00111", "0111-", "11100", "10001"};
    t0 = $time / 10;
    run_stream(fig, "worked example");
    t1 = $time / 10;
    check(got == "0010101001110001", "worked example gives 0010101001110001");
    check(got.len() == 16, "worked example compresses 50 bits to 16");
    fig_sh = {5, 1, 1, 1, 1, 2, 1, 1, 1, 2};
    check(same_list(got_shifts, fig_sh), "worked example shifts");
    // 16 shift clocks + 4 flush clocks + one accept clock per pattern,
    // plus the flush request and the testbench's own handshake clocks
    $display("worked example took %0d clocks", t1 - t0);
    check(t1 - t0 <= 16 + 4 + 10 + 6, "worked example clock count");

    for (int t = 0; t < 200; t++) begin
      string pats[$];
      int np = 1 + $urandom % 8;
      for (int n = 0; n < np; n++) begin
        string p = "";
        for (int i = 0; i < L; i++) begin
          int r = $urandom % 5;
          p = {p, bit_char(r >= 2, r < 4)};
        end
        pats.push_back(p);
      end
      run_stream(pats, $sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
