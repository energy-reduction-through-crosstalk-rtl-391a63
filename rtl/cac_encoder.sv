// cac_encoder: selects one of the three CAC encoders by the SCHEME
// parameter. CODE_W follows from the scheme and the flit width.
module cac_encoder
  import cac_pkg::*;
#(
  parameter  cac_scheme_e SCHEME = CAC_FPC,
  parameter  int          DATA_W = 32,
  localparam int          CODE_W = code_w(SCHEME, DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CODE_W-1:0] code
);
  if (SCHEME == CAC_FOC) begin : g_foc
    foc_encoder #(.DATA_W(DATA_W)) u_enc (.data, .code);
  end else if (SCHEME == CAC_FTC) begin : g_ftc
    ftc_encoder #(.DATA_W(DATA_W)) u_enc (.data, .code);
  end else begin : g_fpc
    fpc_encoder #(.DATA_W(DATA_W)) u_enc (.data, .code);
  end
endmodule
