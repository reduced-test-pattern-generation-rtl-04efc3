// Self-checking testbench for freq_range_separator.
// Feeding the two change sets of the three-vector example (blocks 1,4,5,7
// then 1,2,5,7) must make blocks 1, 5 and 7 high frequency and blocks 2, 3,
// 4 and 6 low frequency. Then random change sets against counts kept here,
// and clear.
module tb_freq_range_separator;
  localparam int NB = 7, CNT_W = 8, TH = 2;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     clear, in_valid;
  logic [NB-1:0]            diff, high_mask;
  logic [NB-1:0][CNT_W-1:0] chg_cnt;

  freq_range_separator #(.NB(NB), .CNT_W(CNT_W), .HF_THRESH(TH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ref_c[NB];

  task automatic feed(input logic [NB-1:0] d);
    @(negedge clk);
    diff = d; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    for (int c = 0; c < NB; c++) if (d[c]) ref_c[c]++;
  endtask

  initial begin
    clear = 0; in_valid = 0; diff = '0;
    foreach (ref_c[c]) ref_c[c] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    feed(7'b1001101);   // blocks 1,4,5,7
    feed(7'b1100101);   // blocks 1,2,5,7
    check(high_mask == 7'b1000101, "blocks 1, 5, 7 high; 2, 3, 4, 6 low");
    check(chg_cnt[6] == 2 && chg_cnt[5] == 1 && chg_cnt[4] == 0 && chg_cnt[3] == 1, "change counts");

    for (int t = 0; t < 50; t++) begin
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      foreach (ref_c[c]) ref_c[c] = 0;
      check(chg_cnt == '0 && high_mask == '0, "clear");
      for (int n = 0; n < $urandom % 6; n++) feed(NB'($urandom));
      for (int c = 0; c < NB; c++) begin
        check(int'(chg_cnt[c]) == ref_c[c], $sformatf("random %0d count %0d", t, c));
        check(high_mask[c] == (ref_c[c] >= TH), $sformatf("random %0d class %0d", t, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
