// ftc_encoder: forbidden transition condition (FTC) encoder, (53,32) at the
// default width.
//
// The flit is cut into 3-bit sub-channels, each coded by the FTC 3-4 code
// (cac_pkg::ftc34_enc). A grounded shield wire separates neighbouring
// sub-channels, so no two adjacent wires ever switch in opposite directions
// (worst-case coupling 2 lambda). Layout: sub-channel k drives
// code[5k+3:5k] from data[3k+2:3k] and code[5k+4] is a shield (constant 0).
// When DATA_W is not a multiple of 3, the remaining 1-2 bits form a tail
// coded with the 3-4 code with its upper inputs at 0, behind one more
// shield; its constant top wire is dropped (3 wires). Sub-channel and shield
// placement follow the published scheme; the tail is this design's choice.
// Purely combinational.
module ftc_encoder
  import cac_pkg::*;
#(
  parameter  int DATA_W = 32,
  localparam int CODE_W = ftc_code_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);
  localparam int NF = DATA_W / 3;
  localparam int R  = DATA_W % 3;

  always_comb
    for (int k = 0; k < NF; k++) begin
      code[5*k +: 4] = ftc34_enc(data[3*k +: 3]);
      if (k < NF - 1 || R != 0) code[5*k + 4] = 1'b0;  // shield
    end

  if (R != 0) begin : g_tail
    logic [3:0] t;
    assign t = ftc34_enc(3'(data[DATA_W-1:3*NF]));
    assign code[CODE_W-1 -: 3] = t[2:0];
  end
endmodule
