// Mesh network on chip with multipath routing and in-order delivery.
//
// MESH_X columns by MESH_Y rows of nodes; node n = y*MESH_X + x holds one
// switch (mp_switch), one sending NI (ni_initiator) on the switch's local
// input and one receiving NI (ni_target) on its local output. Neighbouring
// switches are joined by a pair of opposite one-way links; the 3x4 default
// has 34 such links. North is row y-1, south row y+1, east column x+1, west
// column x-1.
//
// A packet is sent on one of several paths that share only their source and
// destination, chosen per packet by the sender's split weights. Packets of
// one path stay in order; the destination switch's reorder table holds back
// a packet whose id is not the next one, so the core receives the packets of
// every source in order without reorder buffers. Critical commodities are
// sent n_t times and the receiver keeps the first error-free copy; a failed
// path is dropped by the sender, which resends what was lost on it.
//
// Ports: one configuration write bus for all tables (cfg_t, see mp_pkg), and
// per node a core send port, a receive port and a permanent-failure notice
// input. link_flip and link_kill, indexed node*4 + direction (N, E, S, W) of
// the link's sending end, model faulty wires: flip XORs the mask into the
// data of every flit crossing the link, kill makes the link swallow every
// flit. Entries for links that leave the mesh are unused. ooo_stall and
// replaying report the reorder stalls and resends of each node.
// The topology, the switch and NI roles and the fault-tolerance scheme follow
// the document; the fault-injection inputs are a test access of this design.
module mp_noc_top
  import mp_pkg::*;
#(
  parameter int unsigned MESH_X = 3,
  parameter int unsigned MESH_Y = 4,
  localparam int unsigned N     = MESH_X * MESH_Y
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  cfg_t                        cfg,
  // core send ports
  input  logic   [N-1:0]              core_valid,
  output logic   [N-1:0]              core_ready,
  input  addr_t  [N-1:0]              core_dst,
  input  logic   [N-1:0][PAYLOAD_W-1:0] core_data,
  // permanent failure notices to the senders
  input  logic   [N-1:0]              fail_valid,
  input  addr_t  [N-1:0]              fail_dst,
  input  logic   [N-1:0][1:0]         fail_path,
  input  pktid_t [N-1:0]              fail_id,
  // core receive ports
  output logic   [N-1:0]              pkt_valid,
  input  logic   [N-1:0]              pkt_ready,
  output addr_t  [N-1:0]              pkt_src,
  output pktid_t [N-1:0]              pkt_id,
  output logic   [N-1:0][PAYLOAD_W-1:0] pkt_data,
  output logic   [N-1:0]              pkt_err,
  output logic   [N-1:0]              pkt_corrected,
  output logic   [N-1:0]              pkt_drop,
  // link fault injection
  input  logic   [N*4-1:0][FLIT_W-1:0] link_flip,
  input  logic   [N*4-1:0]            link_kill,
  // observation
  output logic   [N-1:0][NPORTS-1:0]  ooo_stall,
  output logic   [N-1:0]              replaying
);
  flit_t [N-1:0][NPORTS-1:0] sw_in, sw_out;
  logic  [N-1:0][NPORTS-1:0] sw_in_v, sw_in_r, sw_out_v, sw_out_r;

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % MESH_X;
    localparam int Y = n / MESH_X;

    mp_switch #(.NODE(n)) u_sw (
      .clk, .rst_n, .cfg,
      .in_flit(sw_in[n]), .in_valid(sw_in_v[n]), .in_ready(sw_in_r[n]),
      .out_flit(sw_out[n]), .out_valid(sw_out_v[n]), .out_ready(sw_out_r[n]),
      .ooo_stall(ooo_stall[n]));

    ni_initiator #(.NODE(n)) u_ini (
      .clk, .rst_n, .cfg,
      .core_valid(core_valid[n]), .core_ready(core_ready[n]),
      .core_dst(core_dst[n]), .core_data(core_data[n]),
      .fail_valid(fail_valid[n]), .fail_dst(fail_dst[n]),
      .fail_path(fail_path[n]), .fail_id(fail_id[n]),
      .out_flit(sw_in[n][P_LOCAL]), .out_valid(sw_in_v[n][P_LOCAL]),
      .out_ready(sw_in_r[n][P_LOCAL]), .replaying(replaying[n]));

    ni_target #(.NODE(n)) u_tgt (
      .clk, .rst_n, .cfg,
      .in_flit(sw_out[n][P_LOCAL]), .in_valid(sw_out_v[n][P_LOCAL]),
      .in_ready(sw_out_r[n][P_LOCAL]),
      .pkt_valid(pkt_valid[n]), .pkt_ready(pkt_ready[n]), .pkt_src(pkt_src[n]),
      .pkt_id(pkt_id[n]), .pkt_data(pkt_data[n]), .pkt_err(pkt_err[n]),
      .pkt_corrected(pkt_corrected[n]), .drop(pkt_drop[n]));

    // Links arriving at this node. For each direction d of this node, the
    // neighbour m sends on its opposite direction; the link is indexed by
    // its sending end, m*4 + opposite(d).
    for (genvar d = 0; d < 4; d++) begin : g_dir
      localparam int NX = X + ((d == 1) ? 1 : (d == 3) ? -1 : 0);
      localparam int NY = Y + ((d == 2) ? 1 : (d == 0) ? -1 : 0);
      localparam int P  = d + 1;                     // port of direction d
      localparam int OP = ((d + 2) % 4) + 1;         // opposite port
      if (NX >= 0 && NX < int'(MESH_X) && NY >= 0 && NY < int'(MESH_Y)) begin : g_link
        localparam int M = NY * MESH_X + NX;
        localparam int L = M * 4 + ((d + 2) % 4);
        always_comb begin
          sw_in[n][P]       = sw_out[M][OP];
          sw_in[n][P].data  = sw_out[M][OP].data ^ link_flip[L];
          sw_in_v[n][P]     = sw_out_v[M][OP] && !link_kill[L];
          sw_out_r[M][OP]   = sw_in_r[n][P] || link_kill[L];
        end
      end else begin : g_edge
        assign sw_in[n][P]         = '0;
        assign sw_in_v[n][P]       = 1'b0;
        assign sw_out_r[n][P]      = 1'b1;
      end
    end
  end
endmodule
