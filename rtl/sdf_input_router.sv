// Input routing multiplexer in front of the MAC unit.
//
// The first decomposition level filters the external signal; every further
// level filters the approximation coefficients of the level before, which are
// read back from the coefficient RAM. This multiplexer picks the operand:
//   sel_feedback = 0  external sample, unsigned IN_W bits, zero-extended
//   sel_feedback = 1  RAM word, signed OUT_W bits, sign-extended
// and presents it as a signed DATA_W-bit MAC operand. Purely combinational.
// The two-input multiplexer and its control by the controller follow the
// architecture; the operand formats are this design's choice.
module sdf_input_router
  import sdf_pkg::*;
(
  input  logic            sel_feedback,
  input  logic [IN_W-1:0] ext_sample,
  input  out_t            ram_sample,
  output sample_t         operand
);

  always_comb begin
    if (sel_feedback) operand = sample_t'(ram_sample);
    else              operand = sample_t'({1'b0, ext_sample});
  end

endmodule
