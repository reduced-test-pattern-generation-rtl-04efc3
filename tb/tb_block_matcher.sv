// Self-checking testbench for block_matcher.
// The three-vector example: vector 2 differs from vector 1 in blocks 1, 4, 5
// and 7, vector 3 from vector 2 in blocks 1, 2, 5 and 7; the first vector has
// no reference and is kept whole. Then random vectors with random blocks
// copied from the reference.
module tb_block_matcher;
  localparam int BW = 4, NB = 7;
  int checks = 0, failures = 0;

  logic [NB*BW-1:0] cur, ref_vec;
  logic             ref_valid;
  logic [NB-1:0]    diff;

  block_matcher #(.BW(BW), .NB(NB)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // block numbers 1..NB -> diff mask (block 1 is bit NB-1)
  function automatic logic [NB-1:0] blocks(input int list[$]);
    logic [NB-1:0] m = '0;
    foreach (list[i]) m[NB - list[i]] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [NB*BW-1:0] v1, v2, v3;
    int l1[$], l2[$];
    v1 = 28'b0100_1100_0001_1000_0110_1000_0111;
    v2 = 28'b0110_1100_0001_1011_0011_1000_0101;
    v3 = 28'b0100_1001_0001_1011_0010_1000_0010;
    l1 = {1, 4, 5, 7};
    l2 = {1, 2, 5, 7};

    cur = v1; ref_vec = v1; ref_valid = 0; #1;
    check(diff == '1, "first vector is kept whole");
    for (int t = 0; t < 20; t++) begin
      ref_vec = (NB*BW)'($urandom); cur = ($urandom % 2) ? ref_vec : (NB*BW)'($urandom); #1;
      check(diff == '1, "no reference: every block counts as different");
    end
    ref_valid = 1;
    cur = v2; ref_vec = v1; ref_valid = 1; #1;
    check(diff == blocks(l1), "vector 2 against vector 1");
    cur = v3; ref_vec = v2; #1;
    check(diff == blocks(l2), "vector 3 against vector 2");

    for (int t = 0; t < 2000; t++) begin
      logic [NB-1:0] exp_d;
      for (int b = 0; b < NB; b++) begin
        ref_vec[b*BW +: BW] = BW'($urandom);
        cur[b*BW +: BW] = ($urandom % 2) ? ref_vec[b*BW +: BW] : BW'($urandom);
        exp_d[b] = cur[b*BW +: BW] != ref_vec[b*BW +: BW];
      end
      #1;
      check(diff == exp_d, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
