// foc_decoder: inverse of foc_encoder, (40,32) at the default width.
//
// Each 5-wire group code[5k+4:5k] is mapped back to data[4k+3:4k] by a
// lookup in the FOC 4-5 code book (cac_pkg::foc45_dec). The decoding
// equations are this design's own; only the encoder equations are given.
// Purely combinational.
module foc_decoder
  import cac_pkg::*;
#(
  parameter  int DATA_W = 32,
  localparam int CODE_W = foc_code_w(DATA_W)
) (
  input  logic [CODE_W-1:0] code,
  output logic [DATA_W-1:0] data
);
  localparam int NSUB = DATA_W / 4;

  always_comb
    for (int k = 0; k < NSUB; k++)
      data[4*k +: 4] = foc45_dec(code[5*k +: 5]);
endmodule
