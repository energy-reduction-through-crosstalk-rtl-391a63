// cac_noc_mesh: MESH_X x MESH_Y mesh network on chip (8 x 8 = 64 cores by
// default) whose inter-switch links carry crosstalk-avoidance-coded flits.
//
// Every node has a cac_switch and a cac_ni. Neighbouring switches are joined
// by one coded link in each direction (CODE_W wires plus valid and ready);
// ports on the mesh edge are tied off. Packets use the modified flit
// structure of noc_pkg: the header is decoded, routed (XY order) and
// re-encoded in each switch, while payload flits are coded once in the
// source NI, cross every switch still coded, and are decoded once in the
// destination NI.
//
// Core interface, per node n = y * MESH_X + x: tx_* injects uncoded flits,
// rx_* delivers them (valid/ready). The ev_* outputs pulse once per flit
// switched, per node and input port, for statistics: header flits
// (decode/route/encode path), payload flits (codec bypass) and payload
// flits dropped for a coded pktid mismatch.
// SCHEME picks the code: CAC_FOC (40 wires), CAC_FTC (53) or CAC_FPC (52).
module cac_noc_mesh
  import cac_pkg::*;
  import noc_pkg::*;
#(
  parameter  cac_scheme_e SCHEME    = CAC_FPC,
  parameter  int          MESH_X    = 8,
  parameter  int          MESH_Y    = 8,
  parameter  int          BUF_DEPTH = 2,
  localparam int          NODES     = MESH_X * MESH_Y,
  localparam int          CODE_W    = code_w(SCHEME, FLIT_W)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NODES-1:0]                      tx_valid,
  input  logic [NODES-1:0][FLIT_W-1:0]          tx_flit,
  output logic [NODES-1:0]                      tx_ready,
  output logic [NODES-1:0]                      rx_valid,
  output logic [NODES-1:0][FLIT_W-1:0]          rx_flit,
  input  logic [NODES-1:0]                      rx_ready,
  output logic [NODES-1:0][NPORTS-1:0]          ev_header,
  output logic [NODES-1:0][NPORTS-1:0]          ev_payload,
  output logic [NODES-1:0][NPORTS-1:0]          ev_pktid_drop
);
  // switch port bundles, indexed by node
  logic [NODES-1:0][NPORTS-1:0]             in_valid, in_ready, out_valid, out_ready;
  logic [NODES-1:0][NPORTS-1:0][CODE_W-1:0] in_code, out_code;

  initial assert (NODES <= 2 ** ADDR_W) else $error("cac_noc_mesh: mesh larger than the address field");

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      cac_switch #(
        .SCHEME(SCHEME), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
        .MY_ADDR(N), .BUF_DEPTH(BUF_DEPTH)
      ) u_sw (
        .clk, .rst_n,
        .in_valid      (in_valid[N]),
        .in_code       (in_code[N]),
        .in_ready      (in_ready[N]),
        .out_valid     (out_valid[N]),
        .out_code      (out_code[N]),
        .out_ready     (out_ready[N]),
        .ev_header     (ev_header[N]),
        .ev_payload    (ev_payload[N]),
        .ev_pktid_drop (ev_pktid_drop[N])
      );

      cac_ni #(.SCHEME(SCHEME)) u_ni (
        .clk, .rst_n,
        .tx_valid     (tx_valid[N]),
        .tx_flit      (tx_flit[N]),
        .tx_ready     (tx_ready[N]),
        .rx_valid     (rx_valid[N]),
        .rx_flit      (rx_flit[N]),
        .rx_ready     (rx_ready[N]),
        .sw_in_valid  (in_valid[N][P_LOCAL]),
        .sw_in_code   (in_code[N][P_LOCAL]),
        .sw_in_ready  (in_ready[N][P_LOCAL]),
        .sw_out_valid (out_valid[N][P_LOCAL]),
        .sw_out_code  (out_code[N][P_LOCAL]),
        .sw_out_ready (out_ready[N][P_LOCAL])
      );

      // East / West links
      if (x < MESH_X - 1) begin : g_e
        assign in_valid[N][P_EAST]      = out_valid[N+1][P_WEST];
        assign in_code[N][P_EAST]       = out_code[N+1][P_WEST];
        assign out_ready[N+1][P_WEST]   = in_ready[N][P_EAST];
      end else begin : g_e_edge
        assign in_valid[N][P_EAST]      = 1'b0;
        assign in_code[N][P_EAST]       = '0;
        assign out_ready[N][P_EAST]     = 1'b1;
      end
      if (x > 0) begin : g_w
        assign in_valid[N][P_WEST]      = out_valid[N-1][P_EAST];
        assign in_code[N][P_WEST]       = out_code[N-1][P_EAST];
        assign out_ready[N-1][P_EAST]   = in_ready[N][P_WEST];
      end else begin : g_w_edge
        assign in_valid[N][P_WEST]      = 1'b0;
        assign in_code[N][P_WEST]       = '0;
        assign out_ready[N][P_WEST]     = 1'b1;
      end
      // North / South links
      if (y < MESH_Y - 1) begin : g_s
        assign in_valid[N][P_SOUTH]        = out_valid[N+MESH_X][P_NORTH];
        assign in_code[N][P_SOUTH]         = out_code[N+MESH_X][P_NORTH];
        assign out_ready[N+MESH_X][P_NORTH] = in_ready[N][P_SOUTH];
      end else begin : g_s_edge
        assign in_valid[N][P_SOUTH]        = 1'b0;
        assign in_code[N][P_SOUTH]         = '0;
        assign out_ready[N][P_SOUTH]       = 1'b1;
      end
      if (y > 0) begin : g_n
        assign in_valid[N][P_NORTH]        = out_valid[N-MESH_X][P_SOUTH];
        assign in_code[N][P_NORTH]         = out_code[N-MESH_X][P_SOUTH];
        assign out_ready[N-MESH_X][P_SOUTH] = in_ready[N][P_NORTH];
      end else begin : g_n_edge
        assign in_valid[N][P_NORTH]        = 1'b0;
        assign in_code[N][P_NORTH]         = '0;
        assign out_ready[N][P_NORTH]       = 1'b1;
      end
    end
  end
endmodule
