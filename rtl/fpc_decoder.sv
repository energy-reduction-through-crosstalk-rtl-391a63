// fpc_decoder: inverse of fpc_encoder, (52,32) at the default width.
//
// Each 5-wire sub-channel is looked up in the FPC 4-5 code book
// (cac_pkg::fpc45_dec) and gives data[3k+2:3k]; the shared MSB is taken from
// the sub-channel (or tail) above. A 2-wire tail is {bit 31, bit 30}
// directly; a 4-wire tail is looked up with its shared bit known. The
// decoder is this design's own; only the encoder is given as equations.
// Purely combinational.
module fpc_decoder
  import cac_pkg::*;
#(
  parameter  int DATA_W = 32,
  localparam int CODE_W = fpc_code_w(DATA_W)
) (
  input  logic [CODE_W-1:0] code,
  output logic [DATA_W-1:0] data
);
  localparam int NS = (DATA_W - 1) / 3;
  localparam int R  = (DATA_W - 1) % 3;

  logic [3*NS:0] body;  // data bits 0..3*NS from the full sub-channels

  always_comb begin
    logic [3:0] d;
    body = '0;
    for (int k = 0; k < NS; k++) begin
      d = fpc45_dec(code[5*k +: 5]);
      body[3*k +: 3] = d[2:0];
      if (k == NS - 1) body[3*k + 3] = d[3];
    end
  end

  if (R == 0) begin : g_tail0
    assign data = body;
  end else if (R == 1) begin : g_tail1
    assign data = {code[CODE_W-1], body};
  end else begin : g_tail2
    logic [2:0] t;
    assign t    = fpc_tail3_dec(code[CODE_W-1 -: 4], body[3*NS]);
    assign data = {t[2:1], body};
  end
endmodule
