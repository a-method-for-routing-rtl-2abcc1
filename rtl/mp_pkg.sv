// Shared types and constants of the multipath in-order NoC.
//
// A packet is PKT_FLITS flits of FLIT_W data bits. The head flit carries the
// fields the reconvergent switches compare against their look-up tables
// (source address, destination address, packet identifier, 8 bits each) and a
// source route. Every flit travels with a 2-bit type and SECDED check bits on
// sideband wires beside the data bits.
//
// Head flit layout (data bits):
//   [31:24] packet id   [23:16] destination   [15:8] source   [7:0] route
// The route holds ROUTE_HOPS 2-bit output directions (N, E, S, W), consumed
// least-significant first; each switch shifts the field right by two bits as
// the head leaves it. A packet is ejected at the switch whose address equals
// the destination field, so no "local" code is needed.
//
// The 32-bit flit, 4-flit packet and 8-bit address and identifier widths
// follow the document; the field placement, the 2-bit direction codes and the
// sideband type/check wires are this design's choices.
package mp_pkg;

  parameter int unsigned FLIT_W     = 32;
  parameter int unsigned PKT_FLITS  = 4;
  parameter int unsigned ADDR_W     = 8;
  parameter int unsigned PKTID_W    = 8;
  parameter int unsigned ROUTE_W    = FLIT_W - 2 * ADDR_W - PKTID_W;  // 8
  parameter int unsigned ROUTE_HOPS = ROUTE_W / 2;                     // 4
  parameter int unsigned ECC_W      = 7;   // 6 Hamming bits + overall parity
  parameter int unsigned PAYLOAD_W  = (PKT_FLITS - 1) * FLIT_W;        // 96
  parameter int unsigned NPORTS     = 5;

  // Switch port numbering. Local is the NI port.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // 2-bit route codes for the link directions.
  typedef enum logic [1:0] {
    D_NORTH = 2'd0,
    D_EAST  = 2'd1,
    D_SOUTH = 2'd2,
    D_WEST  = 2'd3
  } dir_e;

  typedef enum logic [1:0] {
    FT_BODY = 2'd0,
    FT_HEAD = 2'd1,
    FT_TAIL = 2'd2
  } ftype_e;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [PKTID_W-1:0] pktid_t;
  typedef logic [ROUTE_W-1:0] route_t;

  typedef struct packed {
    pktid_t id;
    addr_t  dst;
    addr_t  src;
    route_t route;
  } head_t;

  typedef struct packed {
    ftype_e              ftype;
    logic [ECC_W-1:0]    ecc;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  // Configuration write, broadcast to all nodes; 'node' selects the target.
  typedef enum logic [1:0] {
    CFG_NI_PATH   = 2'd0,  // sender path table entry
    CFG_NI_DEST   = 2'd1,  // sender per-destination copy count
    CFG_SW_LUT    = 2'd2,  // switch reorder look-up table entry
    CFG_NI_RXCOPY = 2'd3   // receiver per-source copy count
  } cfg_sel_e;

  typedef struct packed {
    logic       we;
    addr_t      node;     // node whose table is written
    cfg_sel_e   sel;
    logic [7:0] idx;      // destination (NI tables) or entry index (LUT)
    logic [1:0] path;     // path index for CFG_NI_PATH
    logic [23:0] data;    // see the receiving module for the field layout
  } cfg_t;

  function automatic port_e dir_to_port(dir_e d);
    case (d)
      D_NORTH: return P_NORTH;
      D_EAST:  return P_EAST;
      D_SOUTH: return P_SOUTH;
      default: return P_WEST;
    endcase
  endfunction

endpackage
