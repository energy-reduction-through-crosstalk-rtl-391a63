// cac_ni: network interface between an IP core and the local port of its
// switch. Payload flits are coded once at the source and decoded once at
// the destination; headers are also coded here and are then decoded and
// re-encoded by every switch they cross.
//
// Transmit: the core offers uncoded 32-bit flits (tx_valid/tx_ready); each
// is CAC-encoded and held in a link register that drives the switch's local
// input (sw_in_valid/sw_in_code, sw_in_ready = switch buffer not full). The
// register keeps its last codeword while idle, so the local link, like the
// switch links, only ever changes from codeword to codeword. One cycle of
// latency, one flit per cycle.
// Receive: the switch's local output is CAC-decoded combinationally and
// handed to the core (rx_valid/rx_flit, rx_ready back to the switch).
// The core forms complete packets itself (header first, then flit_count
// payload flits with the same pktid). Where the codecs sit follows the
// published scheme; the register and handshake are this design's choice.
module cac_ni
  import cac_pkg::*;
  import noc_pkg::*;
#(
  parameter  cac_scheme_e SCHEME = CAC_FPC,
  localparam int          CODE_W = code_w(SCHEME, FLIT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              tx_valid,
  input  logic [FLIT_W-1:0] tx_flit,
  output logic              tx_ready,
  output logic              rx_valid,
  output logic [FLIT_W-1:0] rx_flit,
  input  logic              rx_ready,
  // switch side (local port)
  output logic              sw_in_valid,
  output logic [CODE_W-1:0] sw_in_code,
  input  logic              sw_in_ready,
  input  logic              sw_out_valid,
  input  logic [CODE_W-1:0] sw_out_code,
  output logic              sw_out_ready
);
  logic [CODE_W-1:0] tx_code;

  cac_encoder #(.SCHEME(SCHEME), .DATA_W(FLIT_W)) u_enc (.data(tx_flit), .code(tx_code));

  assign tx_ready = !sw_in_valid || sw_in_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sw_in_valid <= 1'b0;
      sw_in_code  <= '0;
    end else if (tx_ready) begin
      sw_in_valid <= tx_valid;
      if (tx_valid) sw_in_code <= tx_code;
    end

  cac_decoder #(.SCHEME(SCHEME), .DATA_W(FLIT_W)) u_dec (.code(sw_out_code), .data(rx_flit));

  assign rx_valid     = sw_out_valid;
  assign sw_out_ready = rx_ready;
endmodule
