// Testbench of sdf_coeff_ram: fills the memory with random words, reads
// them back in random order checking the one-cycle read latency, checks that
// the read data holds while rd_en is low, that a write with wr_en low changes
// nothing, and that a read and a write to the same address in one cycle
// return the old word.
module tb_sdf_coeff_ram;
  import sdf_pkg::*;

  localparam int unsigned DEPTH = 384;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  out_t wr_data, rd_data;
  int checks = 0, failures = 0;
  out_t model [DEPTH];

  sdf_coeff_ram dut (.clk, .wr_en, .wr_addr, .wr_data,
                                      .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  initial begin
    int a;
    out_t exp_old;
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = AW'(i); wr_data = OUT_W'($urandom);
      model[i] = wr_data;
      @(negedge clk);
    end
    // writes with wr_en low are ignored
    wr_en = 0;
    for (int i = 0; i < 20; i++) begin
      wr_addr = AW'($urandom % DEPTH); wr_data = ~model[wr_addr];
      @(negedge clk);
    end
    for (int i = 0; i < 1000; i++) begin
      a = $urandom % DEPTH;
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("addr %0d got %0d exp %0d", a, rd_data, model[a]));
      rd_en = 0; rd_addr = AW'(a + 1);
      @(negedge clk);
      check(rd_data == model[a], "read data not held");
    end
    // read during write to the same address returns the old word
    for (int i = 0; i < 50; i++) begin
      a = $urandom % DEPTH;
      exp_old = model[a];
      wr_en = 1; wr_addr = AW'(a); wr_data = OUT_W'($urandom);
      rd_en = 1; rd_addr = AW'(a);
      model[a] = wr_data;
      @(negedge clk);
      wr_en = 0;
      check(rd_data == exp_old, "read-during-write did not return old word");
      @(negedge clk);
      check(rd_data == model[a], "new word not read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
