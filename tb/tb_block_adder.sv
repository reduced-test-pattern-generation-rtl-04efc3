// Self-checking testbench for block_adder: every block of the output must
// come from the BWT path where its column is high frequency and from the
// low-frequency path otherwise; random data and masks.
module tb_block_adder;
  localparam int BW = 4, NB = 7;
  int checks = 0, failures = 0;

  logic [NB*BW-1:0] low_vec, bwt_vec, out_vec;
  logic [NB-1:0]    high_mask;

  block_adder #(.BW(BW), .NB(NB)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      low_vec = (NB*BW)'({$urandom, $urandom});
      bwt_vec = (NB*BW)'({$urandom, $urandom});
      high_mask = NB'($urandom);
      #1;
      for (int b = 0; b < NB; b++) begin
        logic [BW-1:0] e;
        e = high_mask[b] ? bwt_vec[b*BW +: BW] : low_vec[b*BW +: BW];
        checks++;
        if (out_vec[b*BW +: BW] !== e) begin
          failures++;
          $display("FAIL: test %0d block %0d", t, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
