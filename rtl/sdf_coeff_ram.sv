// Approximation and detail coefficient RAM.
//
// Simple dual-port memory of DEPTH words of OUT_W bits: one synchronous write
// port driven by the MAC result under the controller's write enable, and one
// synchronous read port that serves both the output stage and the feedback
// path to the next decomposition level. Read data appears one cycle after an
// enabled read and holds until the next one. A read and a write to the same
// address in one cycle return the old word.
//
// The controller places the coefficients by address: the final result is
// laid out as [A_J | D_J | ... | D_1] in words 0..LEN-1, and the words from
// LEN upward are scratch space for intermediate approximations. Classifying
// the coefficients into approximation and detail by where they are written
// is this design's reading of the architecture; the memory is not reset.
module sdf_coeff_ram
  import sdf_pkg::*;
#(
  parameter int unsigned DEPTH  = 384,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  out_t              wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output out_t              rd_data
);

  out_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
