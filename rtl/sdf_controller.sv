// Reconfigurable controller of the SDF wavelet engine.
//
// Sequences a dyadic wavelet decomposition of a LEN-sample signal through a
// single MAC unit. At each level the current signal of length L is filtered
// by the low-pass (LoD) and high-pass (HiD) filter of the selected mother
// wavelet, and only every second output is computed (the down-sampling by 2).
// The low-pass half becomes the input of the next level, read back from the
// coefficient RAM through the input multiplexer; the high-pass half is a
// finished detail band. With the default depth of 2 the result is A_2, D_2
// and D_1.
//
// Loop order: level, then output index n, then band (low, high), then tap
// offset t from -K to +K. Each cycle one tap is issued: the sample address
// (external input at level 1, RAM scratch area later) and the ROM address
// {wavelet, band, |t|}. The sample index is 2n + band + t, reflected at both
// ends (x[-i] = x[i], x[L-1+i] = x[L-1-i]).
//
// Pipeline: issue (cycle c) -> memory data and MAC operands (c+1, the
// mac_* and sel_feedback outputs) -> accumulator final and RAM write (c+2,
// ram_wr_*). A level thus costs (L/2) * (taps_lo + taps_hi) cycles with no
// bubbles. After the last level the controller drains the pipeline for two
// cycles, then reads RAM words 0..LEN-1 out in order, with out_valid marking
// each word one cycle after its read. done pulses for one cycle at the end.
//
// RAM layout: the final level writes its approximation to words 0..L/2-1;
// level j writes its detail band to words L_j/2..L_j-1; approximations of
// non-final levels go to scratch words from LEN (odd levels) or LEN + LEN/2
// (even levels), so a level never overwrites what it reads. The RAM thus
// needs LEN + LEN/2 words for depth 2 and LEN + 3*LEN/4 for deeper
// decompositions (sdf_pkg::ram_depth). The result in words 0..LEN-1 is
// [A_J | D_J | ... | D_1].
//
// Handshake: start is sampled in IDLE together with cfg_wavelet and
// cfg_levels (clamped to 1..MAX_LEVELS); both are held for the whole run.
// External samples are read through ext_rd_en / ext_addr and must be on
// ext_data one cycle later. The output has no back-pressure.
//
// The sequence of duties (initialise, route input, address the ROM,
// synchronise the MAC, manage the output) follows the architecture; the loop
// order, the pipeline, the memory layout, the boundary handling and the
// handshakes are this design's choices.
module sdf_controller
  import sdf_pkg::*;
#(
  parameter int unsigned LEN        = 256,
  parameter int unsigned MAX_LEVELS = 2,
  parameter int unsigned LEN_W      = $clog2(LEN),
  parameter int unsigned RAM_DEPTH  = sdf_pkg::ram_depth(LEN, MAX_LEVELS),
  parameter int unsigned RAM_AW     = $clog2(RAM_DEPTH),
  parameter int unsigned LVL_W      = $clog2(MAX_LEVELS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  wavelet_e          cfg_wavelet,
  input  logic [LVL_W-1:0]  cfg_levels,
  output logic              busy,
  output logic              done,
  // external sample read port
  output logic              ext_rd_en,
  output logic [LEN_W-1:0]  ext_addr,
  // coefficient ROM
  output logic              rom_rd_en,
  output wavelet_e          rom_wavelet,
  output band_e             rom_band,
  output logic [HALF_AW-1:0] rom_m,
  // input multiplexer and MAC, aligned with the memory read data
  output logic              sel_feedback,
  output logic              mac_valid,
  output logic              mac_first,
  output logic              mac_last,
  // coefficient RAM
  output logic              ram_rd_en,
  output logic [RAM_AW-1:0] ram_rd_addr,
  output logic              ram_wr_en,
  output logic [RAM_AW-1:0] ram_wr_addr,
  // output stage: RAM read data is valid when out_valid is high
  output logic              out_valid,
  output logic [LEN_W-1:0]  out_index
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_FILT,
    S_DRAIN,
    S_OUT,
    S_LAST
  } state_e;

  localparam int signed IDX_W = LEN_W + 2;   // signed sample index width
  typedef logic signed [IDX_W-1:0] idx_t;

  state_e               state;
  wavelet_e             wv;
  logic [LVL_W-1:0]     levels;
  logic [LVL_W-1:0]     level;     // 1-based current level
  logic [LEN_W-1:0]     n;         // output index within the level
  band_e                band;
  idx_t                 t;         // tap offset, -K..K
  logic [1:0]           drain_cnt;
  logic [LEN_W-1:0]     out_cnt;

  // combinational view of the issued tap
  logic [LEN_W:0]       cur_len;   // L of the current level
  logic [LEN_W-1:0]     half;      // L/2 outputs per band
  idx_t                 k_half;    // K of the current filter
  idx_t                 raw_idx;
  idx_t                 idx;
  logic [RAM_AW-1:0]    src_base;
  logic [RAM_AW-1:0]    dst_addr;
  logic                 tap_first, tap_last, level_last, n_last;
  logic                 issue;

  function automatic logic [RAM_AW-1:0] scratch_base(logic [LVL_W-1:0] lvl);
    return lvl[0] ? RAM_AW'(LEN) : RAM_AW'(LEN + LEN / 2);
  endfunction

  always_comb begin
    cur_len  = (LEN_W + 1)'(LEN) >> (level - 1);
    half     = LEN_W'(cur_len >> 1);
    k_half   = idx_t'(half_len(wv, band));
    raw_idx  = idx_t'({n, 1'b0}) + idx_t'(band) + t;
    if (raw_idx < 0)
      idx = -raw_idx;
    else if (raw_idx > idx_t'(cur_len) - 1)
      idx = (idx_t'(cur_len) - 1) * 2 - raw_idx;
    else
      idx = raw_idx;
    src_base = scratch_base(level - 1);
    if (band == BAND_HI)
      dst_addr = RAM_AW'(half) + RAM_AW'(n);
    else if (level == levels)
      dst_addr = RAM_AW'(n);
    else
      dst_addr = scratch_base(level) + RAM_AW'(n);
    tap_first  = (t == -k_half);
    tap_last   = (t == k_half);
    n_last     = (n == half - 1);
    level_last = (level == levels);
    issue      = (state == S_FILT);
  end

  // memory and ROM requests
  always_comb begin
    ext_rd_en   = issue && (level == 1);
    ext_addr    = LEN_W'(idx);
    rom_rd_en   = issue;
    rom_wavelet = wv;
    rom_band    = band;
    rom_m       = HALF_AW'((t < 0) ? -t : t);
    ram_rd_en   = (issue && (level != 1)) || (state == S_OUT);
    if (state == S_OUT) ram_rd_addr = RAM_AW'(out_cnt);
    else                ram_rd_addr = src_base + RAM_AW'(idx);
    busy        = (state != S_IDLE);
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wv        <= WV_LEGALL53;
      levels    <= LVL_W'(1);
      level     <= LVL_W'(1);
      n         <= '0;
      band      <= BAND_LO;
      t         <= '0;
      drain_cnt <= '0;
      out_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            wv <= cfg_wavelet;
            if (cfg_levels == 0)                levels <= LVL_W'(1);
            else if (32'(cfg_levels) > MAX_LEVELS) levels <= LVL_W'(MAX_LEVELS);
            else                                levels <= cfg_levels;
            level <= LVL_W'(1);
            n     <= '0;
            band  <= BAND_LO;
            t     <= -idx_t'(half_len(cfg_wavelet, BAND_LO));
            state <= S_FILT;
          end
        end
        S_FILT: begin
          if (!tap_last) begin
            t <= t + 1;
          end else if (band == BAND_LO) begin
            band <= BAND_HI;
            t    <= -idx_t'(half_len(wv, BAND_HI));
          end else begin
            band <= BAND_LO;
            t    <= -idx_t'(half_len(wv, BAND_LO));
            if (!n_last) begin
              n <= n + 1;
            end else begin
              n <= '0;
              if (level_last) begin
                state     <= S_DRAIN;
                drain_cnt <= '0;
              end else begin
                level <= level + 1;
              end
            end
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1;
          if (drain_cnt == 2'd1) begin
            state   <= S_OUT;
            out_cnt <= '0;
          end
        end
        S_OUT: begin
          out_cnt <= out_cnt + 1;
          if (out_cnt == LEN_W'(LEN - 1)) state <= S_LAST;
        end
        S_LAST: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // pipeline alignment of MAC control, RAM write and output valid
  logic              s1_last;
  logic [RAM_AW-1:0] s1_dst;
  logic              s1_out;
  logic [LEN_W-1:0]  s1_out_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_valid    <= 1'b0;
      mac_first    <= 1'b0;
      s1_last      <= 1'b0;
      sel_feedback <= 1'b0;
      s1_dst       <= '0;
      ram_wr_en    <= 1'b0;
      ram_wr_addr  <= '0;
      s1_out       <= 1'b0;
      s1_out_idx   <= '0;
    end else begin
      mac_valid    <= issue;
      mac_first    <= issue && tap_first;
      s1_last      <= issue && tap_last;
      sel_feedback <= (level != 1);
      s1_dst       <= dst_addr;
      ram_wr_en    <= mac_valid && s1_last;
      ram_wr_addr  <= s1_dst;
      s1_out       <= (state == S_OUT);
      s1_out_idx   <= out_cnt;
    end
  end

  assign mac_last  = s1_last;
  assign out_valid = s1_out;
  assign out_index = s1_out_idx;

  // LEN must be a power of two, and the shortest level long enough for a
  // single reflection.
  initial begin
    assert (LEN == (1 << LEN_W))
      else $error("LEN must be a power of two");
    assert ((LEN >> (MAX_LEVELS - 1)) >= 2 * MAX_HALF + 2)
      else $error("LEN too short for MAX_LEVELS levels of a 9-tap filter");
  end

  // A RAM write never targets the area the same cycle reads at level > 1.
  property p_no_rw_clash;
    @(posedge clk) disable iff (!rst_n)
      (ram_wr_en && ram_rd_en) |-> (ram_wr_addr != ram_rd_addr);
  endproperty
  assert property (p_no_rw_clash);

endmodule
