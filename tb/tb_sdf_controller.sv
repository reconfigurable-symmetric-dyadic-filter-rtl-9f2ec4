// Testbench of sdf_controller: the default setting (256 samples, depth 2)
// and a deeper one (64 samples, depth 3, exercising the alternating scratch
// areas), each checked by sdf_ctrl_harness against an independently computed
// issue sequence.
module tb_sdf_controller;
  logic clk = 1'b0;
  logic fin_a, fin_b;
  int ca, fa, cb, fb;

  always #5 clk = ~clk;

  sdf_ctrl_harness #(.LEN(256), .MAX_LEVELS(2)) h_a (.clk, .finished(fin_a), .checks(ca), .failures(fa));
  sdf_ctrl_harness #(.LEN(64),  .MAX_LEVELS(3)) h_b (.clk, .finished(fin_b), .checks(cb), .failures(fb));

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb + 1);
    $finish;
  end

  initial begin
    wait (fin_a && fin_b);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb);
    $finish;
  end
endmodule
