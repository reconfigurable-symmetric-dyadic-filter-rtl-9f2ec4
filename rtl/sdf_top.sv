// Reconfigurable symmetric dyadic filter (SDF) wavelet decomposition engine.
//
// A controller drives one multiply-accumulate unit through a multi-level
// dyadic wavelet decomposition. Filter coefficients of the selected mother
// wavelet come from a ROM; the MAC operand comes through a two-input
// multiplexer, from the external signal at the first level and from the
// approximation coefficients in the coefficient RAM at deeper levels; every
// finished low-pass or high-pass output is written to the RAM, which is then
// streamed out. With the defaults (LEN = 256 samples, two levels) one run
// produces A_2 (64 words), D_2 (64) and D_1 (128), in that order.
//
// Beside the sequential engine sits the parallel window filter: nine 8-bit
// samples in, one 9-bit filter output, combinational, with the same
// coefficient set.
//
// Interface and timing:
//   start / cfg_wavelet / cfg_levels   begin a run (sampled while idle)
//   ext_rd_en / ext_addr -> ext_data   external signal memory, data one
//                                      cycle after the request
//   out_valid / out_index / out_data   result words 0..LEN-1, one per cycle
//   busy, done                         run in progress, one-cycle end pulse
//   sat_flag                           a coefficient being written to the
//                                      RAM this cycle was clipped to 9 bits
//   res_valid / res_addr / res_data    live copy of every MAC result as it
//                                      is written to the RAM, with its RAM
//                                      address (scratch words included)
// Run length: with F = (LEN/2)*(taps_lo + taps_hi) + (LEN/4)*(taps_lo +
// taps_hi) filtering cycles for depth 2 (taps 5 + 3 for LeGall 5/3, 9 + 7 for
// CDF 9/7), done rises F + LEN + 3 clock edges after the edge that samples
// start: 1795 edges for 5/3 and 3331 for 9/7 at LEN = 256.
// The block structure follows the architecture; word widths, the memory
// layout and the handshakes are this design's choices, described in the
// sub-modules.
module sdf_top
  import sdf_pkg::*;
#(
  parameter int unsigned LEN        = 256,
  parameter int unsigned MAX_LEVELS = 2,
  parameter int unsigned LEN_W      = $clog2(LEN),
  parameter int unsigned LVL_W      = $clog2(MAX_LEVELS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // decomposition engine
  input  logic             start,
  input  wavelet_e         cfg_wavelet,
  input  logic [LVL_W-1:0] cfg_levels,
  output logic             busy,
  output logic             done,
  output logic             ext_rd_en,
  output logic [LEN_W-1:0] ext_addr,
  input  logic [IN_W-1:0]  ext_data,
  output logic             out_valid,
  output logic [LEN_W-1:0] out_index,
  output out_t             out_data,
  output logic             sat_flag,
  output logic             res_valid,
  output logic [LEN_W:0]   res_addr,
  output out_t             res_data,
  // parallel window filter
  input  wavelet_e         win_wavelet,
  input  band_e            win_band,
  input  logic [IN_W-1:0]  win_p [9],
  output out_t             win_filter_out
);

  localparam int unsigned RAM_DEPTH = ram_depth(LEN, MAX_LEVELS);
  localparam int unsigned RAM_AW    = $clog2(RAM_DEPTH);

  logic              rom_rd_en;
  wavelet_e          rom_wavelet;
  band_e             rom_band;
  logic [HALF_AW-1:0] rom_m;
  coef_t             coef;
  logic              sel_feedback;
  logic              mac_valid, mac_first, mac_last;
  sample_t           operand;
  logic              mac_out_valid;
  out_t              mac_y;
  logic              mac_sat;
  logic              ram_rd_en, ram_wr_en;
  logic [RAM_AW-1:0] ram_rd_addr, ram_wr_addr;
  out_t              ram_rd_data;

  sdf_controller #(
    .LEN        (LEN),
    .MAX_LEVELS (MAX_LEVELS),
    .LEN_W      (LEN_W),
    .RAM_DEPTH  (RAM_DEPTH),
    .RAM_AW     (RAM_AW),
    .LVL_W      (LVL_W)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .cfg_wavelet, .cfg_levels, .busy, .done,
    .ext_rd_en, .ext_addr,
    .rom_rd_en, .rom_wavelet, .rom_band, .rom_m,
    .sel_feedback, .mac_valid, .mac_first, .mac_last,
    .ram_rd_en, .ram_rd_addr, .ram_wr_en, .ram_wr_addr,
    .out_valid, .out_index
  );

  sdf_coeff_rom u_rom (
    .clk,
    .rd_en   (rom_rd_en),
    .wavelet (rom_wavelet),
    .band    (rom_band),
    .m       (rom_m),
    .coef    (coef)
  );

  sdf_input_router u_mux (
    .sel_feedback,
    .ext_sample (ext_data),
    .ram_sample (ram_rd_data),
    .operand
  );

  sdf_mac u_mac (
    .clk, .rst_n,
    .in_valid  (mac_valid),
    .in_first  (mac_first),
    .in_last   (mac_last),
    .sample    (operand),
    .coef      (coef),
    .out_valid (mac_out_valid),
    .y         (mac_y),
    .sat       (mac_sat),
    .acc       ()
  );

  sdf_coeff_ram #(
    .DEPTH  (RAM_DEPTH),
    .ADDR_W (RAM_AW)
  ) u_ram (
    .clk,
    .wr_en   (ram_wr_en),
    .wr_addr (ram_wr_addr),
    .wr_data (mac_y),
    .rd_en   (ram_rd_en),
    .rd_addr (ram_rd_addr),
    .rd_data (ram_rd_data)
  );

  assign out_data = ram_rd_data;
  assign sat_flag = mac_out_valid && mac_sat;

  // The MAC result also leaves the design as it is produced, beside the
  // stored-and-streamed output.
  assign res_valid = ram_wr_en;
  assign res_addr  = (LEN_W + 1)'(ram_wr_addr);
  assign res_data  = mac_y;

  sdf_window_filter u_win (
    .wavelet    (win_wavelet),
    .band       (win_band),
    .p          (win_p),
    .filter_out (win_filter_out)
  );

  // The controller's write strobe and the MAC's result strobe coincide.
  property p_write_matches_mac;
    @(posedge clk) disable iff (!rst_n) ram_wr_en == mac_out_valid;
  endproperty
  assert property (p_write_matches_mac);

endmodule
