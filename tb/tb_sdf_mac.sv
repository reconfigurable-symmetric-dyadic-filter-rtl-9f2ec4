// Testbench of sdf_mac: random convolutions of 1 to 9 taps, issued back to
// back and with random idle gaps, with random signed operands. For each one
// the expected sum is computed in integer arithmetic; out_valid must rise
// exactly one cycle after the last tap, and y / sat / acc must match the
// rounded, saturated and raw sums. Large operands are included so that
// saturation occurs in both directions. Random operands are full range;
// the large-operand convolutions keep the sum inside the (2N+1)-bit
// accumulator, as the engine's own filters always do.
module tb_sdf_mac;
  import sdf_pkg::*;
  import sdf_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_first, in_last;
  sample_t sample;
  coef_t coef;
  logic out_valid;
  out_t y;
  logic sat;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  int n_sat = 0;

  sdf_mac dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .sample, .coef,
               .out_valid, .y, .sat, .acc);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  longint exp_q[$];
  longint running;

  // scoreboard: one expected result per finished convolution
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        longint e;
        if (exp_q.size() == 0) begin
          check(1'b0, "unexpected out_valid");
        end else begin
          e = exp_q.pop_front();
          check(longint'(acc) == e, $sformatf("acc %0d exp %0d", acc, e));
          check(int'(y) == rsat(e), $sformatf("y %0d exp %0d", y, rsat(e)));
          check(sat == clips(e), $sformatf("sat %0d exp %0d", sat, clips(e)));
          if (sat) n_sat++;
        end
      end
    end
  end

  initial begin
    int ntaps;
    bit big;
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
    sample = '0; coef = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int conv = 0; conv < 600; conv++) begin
      ntaps = 1 + ($urandom % 9);
      big = ($urandom % 4) == 0;
      running = 0;
      for (int j = 0; j < ntaps; j++) begin
        in_valid = 1'b1;
        in_first = (j == 0);
        in_last  = (j == ntaps - 1);
        if (big) begin
          sample = (conv[0]) ? 9'sd255 : -9'sd256;
          coef   = 9'sd60;
        end else begin
          sample = DATA_W'($urandom);
          coef   = COEF_W'($urandom % 224) - 9'sd112;
        end
        running += longint'(sample) * longint'(coef);
        if (j == ntaps - 1) exp_q.push_back(running);
        @(negedge clk);
        // check the out_valid delay: the cycle after a last tap only
      end
      // random idle gap (none in half of the cases)
      if ($urandom % 2) begin
        in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        repeat ($urandom % 3 + 1) @(negedge clk);
      end
    end
    in_valid = 1'b0; in_last = 1'b0;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "results missing");
    check(n_sat > 0, "saturation never exercised");
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
