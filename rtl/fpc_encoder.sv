// fpc_encoder: forbidden pattern condition (FPC) encoder, (52,32) at the
// default width.
//
// Sub-channel k codes the four data bits data[3k+3:3k] with the FPC 4-5 code
// (cac_pkg::fpc45_enc) onto code[5k+4:5k]. The MSB of one sub-channel is
// also the LSB input of the next; the code passes d0 and d3 straight
// through, so the two wires at every boundary carry the same bit and no
// 010 or 101 pattern can appear anywhere on the link (worst-case coupling
// 2 lambda). With DATA_W = 32, ten sub-channels cover bits 0..30; the last
// bit forms a tail coded like a sub-channel with its upper inputs at 0,
// keeping only its two non-constant wires (shared bit 30, then bit 31), for
// 52 wires in all. The sharing follows the published scheme; the tail is
// this design's choice. Purely combinational.
module fpc_encoder
  import cac_pkg::*;
#(
  parameter  int DATA_W = 32,
  localparam int CODE_W = fpc_code_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);
  localparam int NS = (DATA_W - 1) / 3;
  localparam int R  = (DATA_W - 1) % 3;

  always_comb
    for (int k = 0; k < NS; k++)
      code[5*k +: 5] = fpc45_enc(data[3*k +: 4]);

  if (R == 1) begin : g_tail1
    logic [4:0] t;
    assign t = fpc45_enc({2'b00, data[DATA_W-1], data[DATA_W-2]});
    assign code[CODE_W-1 -: 2] = t[1:0];
  end else if (R == 2) begin : g_tail2
    logic [4:0] t;
    assign t = fpc45_enc({1'b0, data[DATA_W-1 -: 3]});
    assign code[CODE_W-1 -: 4] = t[3:0];
  end
endmodule
