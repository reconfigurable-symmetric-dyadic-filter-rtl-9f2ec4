// End-to-end testbench of sdf_top at its default parameters (256-sample
// signal, depth-2 decomposition).
//
// A behavioural signal memory answers the engine's external reads one cycle
// late. Several runs switch the mother wavelet and the depth; each result
// (A_J | D_J | ... | D_1, 256 words) is compared word by word with the
// integer reference decomposition, the number of clipped coefficients with
// the reference count, and the run length in cycles with the loop-count
// formula. The window filter beside the engine is driven with random windows
// during the runs. Each mechanism of the design is counted and must occur:
// both wavelets, a wavelet switch between runs, depth 1 and depth 2 runs,
// feedback of approximations through the input multiplexer, reflection at
// the left and right signal ends, and output saturation.
module tb_sdf_top;
  import sdf_pkg::*;
  import sdf_ref_pkg::*;

  localparam int unsigned LEN   = 256;
  localparam int unsigned LEN_W = 8;
  localparam int unsigned LVL_W = 2;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  wavelet_e cfg_wavelet;
  logic [LVL_W-1:0] cfg_levels;
  logic ext_rd_en;
  logic [LEN_W-1:0] ext_addr;
  logic [IN_W-1:0] ext_data;
  logic out_valid, sat_flag, res_valid;
  logic [LEN_W:0] res_addr;
  out_t res_data;
  logic [LEN_W-1:0] out_index;
  out_t out_data;
  wavelet_e win_wavelet;
  band_e win_band;
  logic [IN_W-1:0] win_p [9];
  out_t win_filter_out;

  sdf_top dut (
    .clk, .rst_n, .start, .cfg_wavelet, .cfg_levels, .busy, .done,
    .ext_rd_en, .ext_addr, .ext_data, .out_valid, .out_index, .out_data, .sat_flag,
    .res_valid, .res_addr, .res_data,
    .win_wavelet, .win_band, .win_p, .win_filter_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // behavioural signal memory: data one cycle after the read request
  logic [IN_W-1:0] sigmem [LEN];
  always_ff @(posedge clk) if (ext_rd_en) ext_data <= sigmem[ext_addr];

  // mechanism counters
  int n_feedback = 0, n_refl_left = 0, n_refl_right = 0, n_sat = 0;
  int n_wavelet[2] = '{0, 0};
  int n_depth[3] = '{0, 0, 0};
  int n_switch = 0, n_win = 0;
  int cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.mac_valid && dut.sel_feedback) n_feedback <= n_feedback + 1;
    if (dut.u_ctrl.issue && dut.u_ctrl.raw_idx < 0) n_refl_left <= n_refl_left + 1;
    if (dut.u_ctrl.issue && dut.u_ctrl.raw_idx > $signed({1'b0, dut.u_ctrl.cur_len}) - 1)
      n_refl_right <= n_refl_right + 1;
    if (sat_flag) n_sat <= n_sat + 1;
  end

  // result capture
  int got[LEN];
  int n_out;
  int live[2 * LEN];
  always @(posedge clk) begin
    if (res_valid) live[res_addr] <= int'(res_data);
    if (out_valid) begin
      got[out_index] <= int'(out_data);
      n_out <= n_out + 1;
    end
  end

  // random window-filter traffic, checked on the falling edge
  initial begin
    int c[$];
    int k;
    longint s;
    win_wavelet = WV_LEGALL53; win_band = BAND_LO;
    foreach (win_p[j]) win_p[j] = '0;
    forever begin
      @(negedge clk);
      taps(int'(win_wavelet), int'(win_band), c);
      k = (c.size() - 1) / 2;
      s = 0;
      for (int j = 0; j < c.size(); j++) s += longint'(c[j]) * win_p[4 - k + j];
      check(int'(win_filter_out) == rsat(s),
            $sformatf("window filter got %0d exp %0d", win_filter_out, rsat(s)));
      n_win++;
      win_wavelet = wavelet_e'($urandom % 2);
      win_band = band_e'($urandom % 2);
      foreach (win_p[j]) win_p[j] = IN_W'($urandom);
    end
  end

  int last_wv = -1;

  task automatic run(int wv, int levels, int pattern);
    int x[$];
    int res[$];
    int nclip, sat0, t0, t1;
    x = {};
    for (int i = 0; i < LEN; i++) begin
      case (pattern)
        0: x.push_back($urandom % 256);
        1: x.push_back((i % 3 == 0) ? 255 : 0);
        2: x.push_back(i);
        default: x.push_back((i * 37 + (i * i) % 91) % 256);
      endcase
      sigmem[i] = IN_W'(x[i]);
    end
    dwt(x, wv, levels, res, nclip);
    if (last_wv >= 0 && last_wv != wv) n_switch++;
    last_wv = wv;
    n_wavelet[wv]++;
    n_depth[levels]++;
    cfg_wavelet = wavelet_e'(wv);
    cfg_levels = LVL_W'(levels);
    sat0 = n_sat;
    n_out = 0;
    foreach (live[i]) live[i] = 9999;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    check(t1 - t0 == run_cycles(LEN, wv, levels),
          $sformatf("run wv%0d depth%0d took %0d cycles, exp %0d", wv, levels, t1 - t0,
                    run_cycles(LEN, wv, levels)));
    check(n_out == LEN, $sformatf("%0d output words, exp %0d", n_out, LEN));
    for (int i = 0; i < LEN; i++)
      check(got[i] == res[i], $sformatf("wv%0d depth%0d pattern%0d word %0d got %0d exp %0d",
                                        wv, levels, pattern, i, got[i], res[i]));
    for (int i = 0; i < LEN; i++)
      check(live[i] == res[i], $sformatf("live result word %0d got %0d exp %0d", i, live[i], res[i]));
    check(n_sat - sat0 == nclip, $sformatf("clipped %0d exp %0d", n_sat - sat0, nclip));
    $display("run wavelet=%0d depth=%0d pattern=%0d: %0d cycles, %0d clipped", wv, levels,
             pattern, t1 - t0, nclip);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; cfg_wavelet = WV_LEGALL53; cfg_levels = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(0, 2, 0);
    run(1, 2, 0);
    run(1, 1, 3);
    run(1, 2, 1);
    run(0, 1, 2);
    run(0, 2, 3);
    check(n_wavelet[0] > 0, "LeGall 5/3 never used");
    check(n_wavelet[1] > 0, "CDF 9/7 never used");
    check(n_switch > 0, "wavelet never switched");
    check(n_depth[1] > 0 && n_depth[2] > 0, "depth not varied");
    check(n_feedback > 0, "approximation feedback never used");
    check(n_refl_left > 0, "left boundary reflection never used");
    check(n_refl_right > 0, "right boundary reflection never used");
    check(n_sat > 0, "saturation never occurred");
    check(n_win > 0, "window filter never exercised");
    $display("mechanisms: switches=%0d feedback=%0d refl_left=%0d refl_right=%0d sat=%0d window=%0d",
             n_switch, n_feedback, n_refl_left, n_refl_right, n_sat, n_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
