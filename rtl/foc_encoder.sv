// foc_encoder: forbidden overlap condition (FOC) encoder, (40,32) at the
// default width.
//
// The flit is cut into 4-bit sub-channels; each is coded by the FOC 4-5 code
// (cac_pkg::foc45_enc) and the 5-bit codewords are placed side by side with
// no shield: sub-channel k drives code[5k+4:5k] from data[4k+3:4k]. No wire
// triple on the link, boundaries included, can go from 010 to 101 or back,
// which limits the worst-case coupling of a wire to 3 lambda.
// Purely combinational; DATA_W must be a multiple of 4.
module foc_encoder
  import cac_pkg::*;
#(
  parameter  int DATA_W = 32,
  localparam int CODE_W = foc_code_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);
  localparam int NSUB = DATA_W / 4;

  initial assert (DATA_W % 4 == 0) else $error("foc_encoder: DATA_W must be a multiple of 4");

  always_comb
    for (int k = 0; k < NSUB; k++)
      code[5*k +: 5] = foc45_enc(data[4*k +: 4]);
endmodule
