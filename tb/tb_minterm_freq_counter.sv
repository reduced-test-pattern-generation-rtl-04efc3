// Self-checking testbench for minterm_freq_counter.
// Loads the three-vector, seven-block example test set with don't cares and
// checks that minterm 1001 has frequency 5, then checks all 16 counts
// against a count made block by block here; then random sets, clear, and
// one-clock latency of the counts.
module tb_minterm_freq_counter;
  localparam int BW = 4, NB = 7, CNT_W = 8, NM = 16;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     clear, in_valid;
  logic [NB*BW-1:0]         in_val, in_care;
  logic [NM-1:0][CNT_W-1:0] count;

  minterm_freq_counter #(.BW(BW), .NB(NB), .CNT_W(CNT_W)) dut (.*);

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

  // "01XX 0XX0 ..." -> value/care, first block in the top bits
  task automatic parse(input string t, output logic [NB*BW-1:0] v, output logic [NB*BW-1:0] c);
    int k = NB * BW - 1;
    v = '0; c = '0;
    for (int i = 0; i < t.len(); i++) begin
      if (t[i] == "0" || t[i] == "1" || t[i] == "X") begin
        c[k] = (t[i] != "X");
        v[k] = (t[i] == "1");
        k--;
      end
    end
  endtask

  int ref_cnt[NM];

  task automatic ref_add(input logic [NB*BW-1:0] v, input logic [NB*BW-1:0] c);
    for (int b = 0; b < NB; b++)
      for (int m = 0; m < NM; m++) begin
        bit ok = 1;
        for (int i = 0; i < BW; i++)
          if (c[b*BW+i] && (v[b*BW+i] != m[i])) ok = 0;
        if (ok) ref_cnt[m]++;
      end
  endtask

  task automatic feed(input logic [NB*BW-1:0] v, input logic [NB*BW-1:0] c);
    @(negedge clk);
    in_val = v; in_care = c; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    ref_add(v, c);
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    foreach (ref_cnt[m]) ref_cnt[m] = 0;
  endtask

  task automatic compare(input string what);
    for (int m = 0; m < NM; m++)
      check(int'(count[m]) == ref_cnt[m], $sformatf("%s: minterm %0d count %0d expected %0d", what, m, count[m], ref_cnt[m]));
  endtask

  initial begin
    logic [NB*BW-1:0] v, c;
    string ex[3];
    clear = 0; in_valid = 0; in_val = '0; in_care = '0;
    foreach (ref_cnt[m]) ref_cnt[m] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    ex[0] = "01XX 0XX0 X0X0 10XX X1X1 0XX1 X0X1";
    ex[1] = "01X0 01XX X01X 10X1 0X1X 1XX0 0X01";
    ex[2] = "0XX0 10X1 10X0 XX01 00XX 10X0 01X1";
    foreach (ex[i]) begin
      parse(ex[i], v, c);
      feed(v, c);
    end
    check(count[4'b1001] == 8'd5, "frequency of minterm 1001 is 5");
    compare("example");

    // latency: a vector taken at a clock shows in the counts right after it
    do_clear();
    compare("after clear");
    @(negedge clk);
    in_val = '0; in_care = '1; in_valid = 1'b1;   // seven blocks 0000
    @(posedge clk); #1;
    check(count[0] == 8'd7, "count updated one clock after the vector");
    @(negedge clk);
    in_valid = 1'b0;
    ref_cnt[0] = 7;

    for (int t = 0; t < 40; t++) begin
      do_clear();
      for (int n = 0; n < 1 + $urandom % 5; n++) begin
        for (int i = 0; i < NB * BW; i++) begin
          v[i] = 1'($urandom);
          c[i] = ($urandom % 3) != 0;
        end
        feed(v, c);
      end
      compare($sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
