// cac_switch: five-port wormhole switch for a mesh NoC whose links carry
// crosstalk-avoidance-coded flits, using the modified flit structure in
// which only the header flit carries control information.
//
// Datapath per input port (the header / payload split of the switch
// published switch datapath):
//   link word -> input buffer (coded, BUF_DEPTH deep)
//     header : CAC decoder -> XY routing -> output arbitration -> crossbar
//              (uncoded) -> CAC encoder -> output register -> link
//     payload: crossbar (coded, never decoded) -> output register -> link
// A switch knows which flit is a header by counting: after a header it
// expects exactly flit_count payload flits on that input. At header time it
// also stores the header's CAC-coded pktid wires (the link wires that
// depend only on pktid bits, since pktid starts on a sub-channel boundary).
// Each payload flit's coded pktid wires are compared with the stored ones;
// a matching flit follows the packet's path, a flit whose coded pktid does
// not match is removed from the buffer, not forwarded, and reported on
// ev_pktid_drop. There are no virtual channels, so one packet per input is
// in flight and the stored id is a single register per input.
//
// Timing: one cycle for the header at the buffer head to win its output
// (grant registered), then one flit per cycle per port. A flit leaves the
// output register one cycle after it is switched, so an unblocked hop costs
// 2 cycles for a payload flit and 3 for a header flit (buffer write, grant,
// output register). The codecs sit inside the switch-traversal cycle and add
// no pipeline stage. The link flow control is valid/ready: out_ready is the
// downstream buffer's not-full flag; the output register holds its last
// codeword while idle so the link wires change only between codewords.
//
// Following the published scheme: codec placement for headers only, payload
// bypass, flit_count and coded-pktid matching, 5 ports and 2-flit buffers.
// This design's choices: flow control, round-robin output arbitration, the
// drop on a pktid mismatch, port numbering and the pipeline registers.
module cac_switch
  import cac_pkg::*;
  import noc_pkg::*;
#(
  parameter  cac_scheme_e SCHEME    = CAC_FPC,
  parameter  int          MESH_X    = 8,
  parameter  int          MESH_Y    = 8,
  parameter  int          MY_ADDR   = 0,
  parameter  int          BUF_DEPTH = 2,
  localparam int          CODE_W    = code_w(SCHEME, FLIT_W)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              in_valid,
  input  logic [NPORTS-1:0][CODE_W-1:0]  in_code,
  output logic [NPORTS-1:0]              in_ready,
  output logic [NPORTS-1:0]              out_valid,
  output logic [NPORTS-1:0][CODE_W-1:0]  out_code,
  input  logic [NPORTS-1:0]              out_ready,
  // per input port, one pulse per flit switched or dropped
  output logic [NPORTS-1:0]              ev_header,
  output logic [NPORTS-1:0]              ev_payload,
  output logic [NPORTS-1:0]              ev_pktid_drop
);
  localparam int PK_LSB = code_lsb_of_bit(SCHEME, PKTID_LSB);
  localparam int PK_W   = CODE_W - PK_LSB;
  localparam int IW     = $clog2(NPORTS);

  typedef enum logic [1:0] {S_ROUTE, S_HEAD, S_BODY} in_state_e;

  // ---------------------------------------------------------- input side
  logic      [NPORTS-1:0]             head_valid, pop;
  logic      [NPORTS-1:0][CODE_W-1:0] head_code;
  header_t                            hdr     [NPORTS];
  port_e                              rt_port [NPORTS];
  in_state_e                          state   [NPORTS];
  logic      [IW-1:0]                 route_q [NPORTS];
  logic      [FCNT_W-1:0]             rem_q   [NPORTS];
  logic      [PK_W-1:0]               pk_q    [NPORTS];
  logic      [NPORTS-1:0]             send, xfer, drop, pk_match;

  // ---------------------------------------------------------- output side
  logic [NPORTS-1:0]              busy;
  logic [IW-1:0]                  owner   [NPORTS];
  logic [NPORTS-1:0][NPORTS-1:0]  req;     // req[o][i]
  logic [NPORTS-1:0][NPORTS-1:0]  grant;   // grant[o][i]
  logic [IW-1:0]                  gidx    [NPORTS];
  logic [NPORTS-1:0]              can_load, load;
  logic [NPORTS-1:0][FLIT_W-1:0]  enc_in;
  logic [NPORTS-1:0][CODE_W-1:0]  enc_out;
  logic [NPORTS-1:0]              out_valid_q;
  logic [NPORTS-1:0][CODE_W-1:0]  out_code_q;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [FLIT_W-1:0] dec_flit;

    flit_fifo #(.WIDTH(CODE_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_valid (in_valid[i]),
      .wr_data  (in_code[i]),
      .wr_ready (in_ready[i]),
      .rd_valid (head_valid[i]),
      .rd_data  (head_code[i]),
      .rd_pop   (pop[i])
    );

    // header path: decode, then route on the destination address
    cac_decoder #(.SCHEME(SCHEME), .DATA_W(FLIT_W)) u_dec (
      .code (head_code[i]),
      .data (dec_flit)
    );
    assign hdr[i] = header_t'(dec_flit);

    xy_route #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_route (
      .cur  (ADDR_W'(MY_ADDR)),
      .dst  (hdr[i].dst),
      .port (rt_port[i])
    );

    // payload path: compare the coded pktid wires, nothing is decoded
    assign pk_match[i] = (head_code[i][CODE_W-1:PK_LSB] == pk_q[i]);

    always_comb begin
      send[i] = head_valid[i] && ((state[i] == S_HEAD) ||
                                  (state[i] == S_BODY && pk_match[i]));
      drop[i] = head_valid[i] && (state[i] == S_BODY) && !pk_match[i];
      xfer[i] = send[i] && can_load[route_q[i]];
      pop[i]  = xfer[i] || drop[i];
      for (int o = 0; o < NPORTS; o++)
        req[o][i] = head_valid[i] && (state[i] == S_ROUTE) && (int'(rt_port[i]) == o);
    end

    logic won;
    always_comb begin
      won = 1'b0;
      for (int o = 0; o < NPORTS; o++) won |= grant[o][i];
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        state[i]   <= S_ROUTE;
        route_q[i] <= '0;
        rem_q[i]   <= '0;
        pk_q[i]    <= '0;
      end else begin
        case (state[i])
          S_ROUTE:
            if (won) begin
              state[i]   <= S_HEAD;
              route_q[i] <= IW'(rt_port[i]);
              rem_q[i]   <= hdr[i].flit_count;
              pk_q[i]    <= head_code[i][CODE_W-1:PK_LSB];
            end
          S_HEAD:
            if (xfer[i]) state[i] <= (rem_q[i] == '0) ? S_ROUTE : S_BODY;
          S_BODY:
            if (xfer[i]) begin
              rem_q[i] <= rem_q[i] - 1'b1;
              if (rem_q[i] == FCNT_W'(1)) state[i] <= S_ROUTE;
            end
          default: state[i] <= S_ROUTE;
        endcase
      end

    // a routed header must address a node of the mesh
    a_dst_in_mesh: assert property (@(posedge clk) disable iff (!rst_n)
        state[i] == S_ROUTE && won |-> int'(hdr[i].dst) < MESH_X * MESH_Y)
      else $error("cac_switch: header destination outside the mesh");

    assign ev_header[i]     = xfer[i] && (state[i] == S_HEAD);
    assign ev_payload[i]    = xfer[i] && (state[i] == S_BODY);
    assign ev_pktid_drop[i] = drop[i];
  end

  // An output is released when the last flit of its packet is switched.
  function automatic logic last_flit(int i);
    return (state[i] == S_HEAD && rem_q[i] == '0) ||
           (state[i] == S_BODY && rem_q[i] == FCNT_W'(1));
  endfunction

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req       (busy[o] ? '0 : req[o]),
      .accept    (!busy[o]),
      .grant     (grant[o]),
      .grant_idx (gidx[o])
    );

    assign can_load[o] = !out_valid_q[o] || out_ready[o];
    assign load[o]     = busy[o] && xfer[owner[o]] && (int'(route_q[owner[o]]) == o);
    assign enc_in[o]   = FLIT_W'(hdr[owner[o]]);

    // header path: re-encode the decoded header for the next link
    cac_encoder #(.SCHEME(SCHEME), .DATA_W(FLIT_W)) u_enc (
      .data (enc_in[o]),
      .code (enc_out[o])
    );

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        busy[o]  <= 1'b0;
        owner[o] <= '0;
      end else if (!busy[o]) begin
        if (|grant[o]) begin
          busy[o]  <= 1'b1;
          owner[o] <= gidx[o];
        end
      end else if (load[o] && last_flit(int'(owner[o]))) begin
        busy[o] <= 1'b0;
      end

    // link driver register; holds the last codeword while idle
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        out_valid_q[o] <= 1'b0;
        out_code_q[o]  <= '0;
      end else if (can_load[o]) begin
        out_valid_q[o] <= load[o];
        if (load[o])
          out_code_q[o] <= (state[owner[o]] == S_HEAD) ? enc_out[o] : head_code[owner[o]];
      end

    // a word offered on the link stays put until it is taken
    a_link_hold: assert property (@(posedge clk) disable iff (!rst_n)
        out_valid_q[o] && !out_ready[o] |=> out_valid_q[o] && $stable(out_code_q[o]))
      else $error("cac_switch: link word changed while stalled");
  end

  assign out_valid = out_valid_q;
  assign out_code  = out_code_q;
endmodule
