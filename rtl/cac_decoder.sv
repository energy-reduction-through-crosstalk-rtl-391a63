// cac_decoder: selects one of the three CAC decoders by the SCHEME
// parameter. CODE_W follows from the scheme and the flit width.
module cac_decoder
  import cac_pkg::*;
#(
  parameter  cac_scheme_e SCHEME = CAC_FPC,
  parameter  int          DATA_W = 32,
  localparam int          CODE_W = code_w(SCHEME, DATA_W)
) (
  input  logic [CODE_W-1:0] code,
  output logic [DATA_W-1:0] data
);
  if (SCHEME == CAC_FOC) begin : g_foc
    foc_decoder #(.DATA_W(DATA_W)) u_dec (.code, .data);
  end else if (SCHEME == CAC_FTC) begin : g_ftc
    ftc_decoder #(.DATA_W(DATA_W)) u_dec (.code, .data);
  end else begin : g_fpc
    fpc_decoder #(.DATA_W(DATA_W)) u_dec (.code, .data);
  end
endmodule
