// noc_pkg: flit format and port numbering of the mesh network.
//
// Flits are 32 bits. Packets use the modified flit structure: only the
// header carries control information, and every payload flit carries just
// the packet id next to its data.
//   header : pktid[31:24] | flit_count[23:18] | addr_len[17:12]
//            | src_addr[11:6] | dst_addr[5:0]
//   payload: pktid[31:24] | data[23:0]
// flit_count is the number of payload flits that follow the header. The
// field order follows the packet drawing; the field widths are this
// design's choice (6-bit addresses cover 64 cores, an 8-bit pktid starts on
// a sub-channel boundary of all three codes). addr_len is carried unchanged.
// A node address is y * MESH_X + x.
package noc_pkg;

  localparam int FLIT_W   = 32;
  localparam int PKTID_W  = 8;
  localparam int FCNT_W   = 6;
  localparam int ALEN_W   = 6;
  localparam int ADDR_W   = 6;
  localparam int DATA_W   = FLIT_W - PKTID_W;   // payload data bits
  localparam int PKTID_LSB = FLIT_W - PKTID_W;  // 24

  localparam int NPORTS = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,  // towards y - 1
    P_EAST  = 3'd2,  // towards x + 1
    P_SOUTH = 3'd3,  // towards y + 1
    P_WEST  = 3'd4   // towards x - 1
  } port_e;

  typedef struct packed {
    logic [PKTID_W-1:0] pktid;
    logic [FCNT_W-1:0]  flit_count;
    logic [ALEN_W-1:0]  addr_len;
    logic [ADDR_W-1:0]  src;
    logic [ADDR_W-1:0]  dst;
  } header_t;

  typedef struct packed {
    logic [PKTID_W-1:0] pktid;
    logic [DATA_W-1:0]  data;
  } payload_t;

endpackage
