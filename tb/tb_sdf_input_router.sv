// Testbench of sdf_input_router: random external samples and RAM words
// through both multiplexer settings; the operand must be the zero-extended
// external sample or the sign-extended RAM word.
module tb_sdf_input_router;
  import sdf_pkg::*;

  logic sel_feedback;
  logic [IN_W-1:0] ext_sample;
  out_t ram_sample;
  sample_t operand;
  int checks = 0, failures = 0;

  sdf_input_router dut (.sel_feedback, .ext_sample, .ram_sample, .operand);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int i = 0; i < 2000; i++) begin
      sel_feedback = 1'($urandom);
      ext_sample   = IN_W'($urandom);
      ram_sample   = OUT_W'($urandom);
      if (i < 4) begin
        ext_sample = (i[0]) ? 8'hFF : 8'h80;
        ram_sample = (i[0]) ? 9'h1FF : 9'h100;
      end
      #1;
      expv = sel_feedback ? int'(ram_sample)
                          : int'(ext_sample);
      checks++;
      if (int'(operand) != expv) begin
        failures++;
        $display("FAIL: sel=%0d ext=%0d ram=%0d got %0d exp %0d",
                 sel_feedback, ext_sample, ram_sample, operand, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
