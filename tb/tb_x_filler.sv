// Self-checking testbench for x_filler.
// Random frequency tables and random blocks with don't cares: the output must
// be contained in the block and have the highest frequency among the
// minterms the block contains, the smallest one on a tie. Fully specified
// blocks must pass unchanged, and had_x must flag blocks with don't cares.
module tb_x_filler;
  localparam int BW = 4, CNT_W = 8, NM = 16;
  int checks = 0, failures = 0;

  logic [BW-1:0]            in_val, in_care, out_val;
  logic [NM-1:0][CNT_W-1:0] count;
  logic                     had_x;

  x_filler #(.BW(BW), .CNT_W(CNT_W)) dut (.*);

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

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best, best_m;
      for (int m = 0; m < NM; m++) count[m] = CNT_W'($urandom % ((t % 2) ? 4 : 256));
      in_val  = BW'($urandom);
      in_care = BW'($urandom);
      #1;
      best = -1; best_m = 0;
      for (int m = 0; m < NM; m++)
        if (((BW'(m) ^ in_val) & in_care) == 0 && int'(count[m]) > best) begin
          best = int'(count[m]); best_m = m;
        end
      check(out_val == BW'(best_m), $sformatf("fill %b/%b gives %b expected %b", in_val, in_care, out_val, BW'(best_m)));
      check(had_x == (in_care != '1), "had_x");
      if (in_care == '1) check(out_val == in_val, "specified block unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
