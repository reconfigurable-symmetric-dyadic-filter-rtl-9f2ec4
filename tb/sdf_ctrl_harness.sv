// Checking harness for sdf_controller at one parameter setting.
//
// Runs the controller for every wavelet and every requested depth (including
// out-of-range depths that must be clamped) and compares, cycle by cycle,
// what it issues with a sequence computed here from the specification:
// tap order, reflected sample addresses, ROM addresses, the multiplexer
// select, MAC first/last strobes one cycle later, RAM write addresses two
// cycles later, the output read sequence and the run length in cycles.
module sdf_ctrl_harness
  import sdf_pkg::*;
  import sdf_ref_pkg::*;
#(
  parameter int unsigned LEN        = 256,
  parameter int unsigned MAX_LEVELS = 2
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned LEN_W     = $clog2(LEN);
  localparam int unsigned RAM_DEPTH = (MAX_LEVELS > 2) ? LEN * 7 / 4 : LEN * 3 / 2;
  localparam int unsigned RAM_AW    = $clog2(RAM_DEPTH);
  localparam int unsigned LVL_W     = $clog2(MAX_LEVELS + 1);

  logic rst_n, start, busy, done;
  wavelet_e cfg_wavelet;
  logic [LVL_W-1:0] cfg_levels;
  logic ext_rd_en, rom_rd_en, sel_feedback, mac_valid, mac_first, mac_last;
  logic [LEN_W-1:0] ext_addr, out_index;
  wavelet_e rom_wavelet;
  band_e rom_band;
  logic [HALF_AW-1:0] rom_m;
  logic ram_rd_en, ram_wr_en, out_valid;
  logic [RAM_AW-1:0] ram_rd_addr, ram_wr_addr;

  sdf_controller #(.LEN(LEN), .MAX_LEVELS(MAX_LEVELS)) dut (
    .clk, .rst_n, .start, .cfg_wavelet, .cfg_levels, .busy, .done,
    .ext_rd_en, .ext_addr, .rom_rd_en, .rom_wavelet, .rom_band, .rom_m,
    .sel_feedback, .mac_valid, .mac_first, .mac_last,
    .ram_rd_en, .ram_rd_addr, .ram_wr_en, .ram_wr_addr, .out_valid, .out_index);

  typedef struct {
    int  level;
    int  band;
    int  m;
    int  addr;      // external or RAM read address
    bit  first;
    bit  last;
    int  dst;
  } tap_t;

  tap_t exp_taps[$];
  int   exp_wr[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL(LEN=%0d): %s", LEN, what);
    end
  endtask

  function automatic int scratch(int lv);
    return (lv % 2 == 1) ? LEN : LEN + LEN / 2;
  endfunction

  task automatic build(int wv, int levels);
    int c[$];
    int k, len, idx;
    tap_t tp;
    exp_taps = {};
    exp_wr = {};
    for (int lv = 1; lv <= levels; lv++) begin
      len = LEN >> (lv - 1);
      for (int n = 0; n < len / 2; n++) begin
        for (int b = 0; b < 2; b++) begin
          taps(wv, b, c);
          k = (c.size() - 1) / 2;
          for (int t = -k; t <= k; t++) begin
            idx = reflect(2 * n + b + t, len);
            tp.level = lv;
            tp.band  = b;
            tp.m     = (t < 0) ? -t : t;
            tp.addr  = (lv == 1) ? idx : scratch(lv - 1) + idx;
            tp.first = (t == -k);
            tp.last  = (t == k);
            if (b == 1)           tp.dst = len / 2 + n;
            else if (lv == levels) tp.dst = n;
            else                  tp.dst = scratch(lv) + n;
            exp_taps.push_back(tp);
            if (tp.last) exp_wr.push_back(tp.dst);
          end
        end
      end
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(int wv, int req_levels);
    int levels, ti, mi, wi, oi, t0, t1;
    tap_t tp;
    tap_t pipe[$];
    levels = (req_levels == 0) ? 1 : ((req_levels > int'(MAX_LEVELS)) ? int'(MAX_LEVELS) : req_levels);
    build(wv, levels);
    cfg_wavelet = wavelet_e'(wv);
    cfg_levels  = LVL_W'(req_levels);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    ti = 0; mi = 0; wi = 0; oi = 0;
    pipe = {};
    while (!done) begin
      // issue stage
      if (rom_rd_en) begin
        if (ti < exp_taps.size()) begin
          tp = exp_taps[ti];
          check(rom_wavelet == wavelet_e'(wv) && int'(rom_band) == tp.band && int'(rom_m) == tp.m,
                $sformatf("tap %0d rom band %0d m %0d exp %0d %0d", ti, rom_band, rom_m, tp.band, tp.m));
          if (tp.level == 1)
            check(ext_rd_en && !ram_rd_en && int'(ext_addr) == tp.addr,
                  $sformatf("tap %0d ext addr %0d exp %0d", ti, ext_addr, tp.addr));
          else
            check(!ext_rd_en && ram_rd_en && int'(ram_rd_addr) == tp.addr,
                  $sformatf("tap %0d ram addr %0d exp %0d", ti, ram_rd_addr, tp.addr));
          pipe.push_back(tp);
        end else begin
          check(1'b0, "too many taps issued");
        end
        ti++;
      end else begin
        check(!ext_rd_en, "external read outside filtering");
      end
      // MAC stage, one cycle after issue
      if (mac_valid) begin
        if (pipe.size() > 0) begin
          tp = pipe.pop_front();
          check(mac_first == tp.first && mac_last == tp.last &&
                sel_feedback == (tp.level != 1),
                $sformatf("mac strobes first %0d last %0d sel %0d", mac_first, mac_last, sel_feedback));
        end else check(1'b0, "mac_valid without issue");
        mi++;
      end
      // write stage
      if (ram_wr_en) begin
        if (wi < exp_wr.size())
          check(int'(ram_wr_addr) == exp_wr[wi],
                $sformatf("write %0d addr %0d exp %0d", wi, ram_wr_addr, exp_wr[wi]));
        else check(1'b0, "too many writes");
        wi++;
      end
      // output stage
      if (out_valid) begin
        check(int'(out_index) == oi, $sformatf("out index %0d exp %0d", out_index, oi));
        check(wi == exp_wr.size(), "output began before all writes");
        oi++;
      end
      if (ram_rd_en && !rom_rd_en)
        check(int'(ram_rd_addr) == oi, "output read address");
      check(busy, "busy low during run");
      @(negedge clk);
      if (cyc - t0 > 100000) break;
    end
    t1 = cyc;
    check(ti == exp_taps.size(), $sformatf("taps issued %0d exp %0d", ti, exp_taps.size()));
    check(mi == exp_taps.size(), "mac steps");
    check(wi == exp_wr.size(), $sformatf("writes %0d exp %0d", wi, exp_wr.size()));
    check(oi == LEN, $sformatf("outputs %0d exp %0d", oi, LEN));
    check(t1 - t0 == run_cycles(LEN, wv, levels),
          $sformatf("run took %0d cycles, exp %0d", t1 - t0, run_cycles(LEN, wv, levels)));
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; start = 1'b0; cfg_wavelet = WV_LEGALL53; cfg_levels = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int wv = 0; wv < 2; wv++)
      for (int lv = 0; lv < (1 << LVL_W); lv++) begin
        run(wv, lv);
        repeat (2) @(negedge clk);
      end
    finished = 1'b1;
  end

endmodule
