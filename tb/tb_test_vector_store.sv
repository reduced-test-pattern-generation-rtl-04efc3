// Self-checking testbench for test_vector_store: reset contents, random
// writes, the read port, the whole-contents view, masking of the value bits
// of don't cares, and ignored writes to addresses beyond the store.
module tb_test_vector_store;
  localparam int NV = 3, W = 28, AW = 2;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 we;
  logic [AW-1:0]        waddr, raddr;
  logic [W-1:0]         wval, wcare, rval, rcare;
  logic [NV-1:0][W-1:0] all_val, all_care;

  test_vector_store #(.NV(NV), .W(W)) dut (.*);

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

  logic [W-1:0] rv[NV], rc[NV];

  initial begin
    we = 0; waddr = 0; raddr = 0; wval = 0; wcare = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int a = 0; a < NV; a++) begin
      rv[a] = '0; rc[a] = '1;
      check(all_val[a] == '0 && all_care[a] == '1, "reset contents");
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = AW'($urandom);
      wval = W'($urandom);
      wcare = W'($urandom);
      @(negedge clk);
      if (we && waddr < NV) begin
        rv[waddr] = wval & wcare;
        rc[waddr] = wcare;
      end
      we = 0;
      for (int a = 0; a < NV; a++) begin
        raddr = AW'(a);
        #1;
        check(rval == rv[a] && rcare == rc[a], $sformatf("read %0d", a));
        check(all_val[a] == rv[a] && all_care[a] == rc[a], $sformatf("all %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
