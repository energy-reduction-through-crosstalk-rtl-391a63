// ftc_decoder: inverse of ftc_encoder, (53,32) at the default width.
//
// Each 4-wire sub-channel code[5k+3:5k] is looked up in the FTC 3-4 code
// book (cac_pkg::ftc34_dec); shield wires are ignored. The 3-wire tail is
// decoded with its dropped top wire taken as 0. The decoder is this
// design's own; only the encoder is given as equations. Purely combinational.
module ftc_decoder
  import cac_pkg::*;
#(
  parameter  int DATA_W = 32,
  localparam int CODE_W = ftc_code_w(DATA_W)
) (
  input  logic [CODE_W-1:0] code,
  output logic [DATA_W-1:0] data
);
  localparam int NF = DATA_W / 3;
  localparam int R  = DATA_W % 3;

  always_comb
    for (int k = 0; k < NF; k++)
      data[3*k +: 3] = ftc34_dec(code[5*k +: 4]);

  if (R != 0) begin : g_tail
    logic [2:0] t;
    assign t = ftc34_dec({1'b0, code[CODE_W-1 -: 3]});
    assign data[DATA_W-1:3*NF] = t[R-1:0];
  end
endmodule
