// Mesh switch with in-order rebuilding of multipath traffic.
//
// Five ports: local (the node's NIs), north, east, south, west. Each input has
// an IN_DEPTH-flit input buffer, each output an OUT_DEPTH-flit output buffer,
// and a crossbar joins them. Switching is wormhole: a head flit claims an
// output, and the output stays with that input until the tail flit has passed.
//
// Routing is by source route: a head whose destination equals this node's
// address goes to the local port, otherwise the two low route bits give the
// direction and the route field is shifted right by two bits as the head
// leaves (the SECDED bits of a head cover it with the route field cleared,
// which is its value on arrival, so they stay valid).
//
// Reordering: the head at each input is checked against the reorder look-up
// table. A head of a reconverging commodity whose packet id is not the one
// the table expects does not request the arbiter and stays in its input
// buffer; the matching packet is on another, disjoint path. When a tracked
// head is granted, the table's id for that commodity is incremented.
// ooo_stall reports, per input, a cycle in which a head is held for order.
//
// Timing: a flit moves from an input buffer to an output buffer in one cycle
// when granted, so a flit crosses an idle switch in two cycles (input buffer
// write, then output buffer write; the output buffer drives the link).
// Flow control on links is valid/ready with ready = input buffer not full.
// Buffering, the look-up table and its gating of the arbiter follow the
// document; port count, route encoding, round-robin arbitration and the
// valid/ready link handshake are this design's choices.
module mp_switch
  import mp_pkg::*;
#(
  parameter int unsigned NODE        = 0,   // this switch's address
  parameter int unsigned IN_DEPTH    = 2,
  parameter int unsigned OUT_DEPTH   = 4,
  parameter int unsigned LUT_ENTRIES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  flit_t [NPORTS-1:0] in_flit,
  input  logic  [NPORTS-1:0] in_valid,
  output logic  [NPORTS-1:0] in_ready,
  output flit_t [NPORTS-1:0] out_flit,
  output logic  [NPORTS-1:0] out_valid,
  input  logic  [NPORTS-1:0] out_ready,
  output logic  [NPORTS-1:0] ooo_stall
);
  localparam int unsigned NP = NPORTS;

  // ---------------------------------------------------------------- buffers
  flit_t [NP-1:0] ib_flit;
  logic  [NP-1:0] ib_valid, ib_ready;
  flit_t [NP-1:0] ob_in;
  logic  [NP-1:0] ob_wr, ob_space;

  for (genvar p = 0; p < NP; p++) begin : g_buf
    flit_fifo #(.W($bits(flit_t)), .DEPTH(IN_DEPTH)) u_ib (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_ready(in_ready[p]), .in_data(in_flit[p]),
      .out_valid(ib_valid[p]), .out_ready(ib_ready[p]), .out_data(ib_flit[p]));
    flit_fifo #(.W($bits(flit_t)), .DEPTH(OUT_DEPTH)) u_ob (
      .clk, .rst_n,
      .in_valid(ob_wr[p]), .in_ready(ob_space[p]), .in_data(ob_in[p]),
      .out_valid(out_valid[p]), .out_ready(out_ready[p]), .out_data(out_flit[p]));
  end

  // ---------------------------------------------------------- route compute
  head_t  [NP-1:0] hd;
  port_e  [NP-1:0] want;
  logic   [NP-1:0] is_head;
  addr_t  [NP-1:0] q_src, q_dst;
  pktid_t [NP-1:0] q_id;
  logic   [NP-1:0] q_ok, q_tracked, lut_inc;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      hd[p]      = head_t'(ib_flit[p].data);
      is_head[p] = ib_valid[p] && ib_flit[p].ftype == FT_HEAD;
      want[p]    = (hd[p].dst == addr_t'(NODE)) ? P_LOCAL : dir_to_port(dir_e'(hd[p].route[1:0]));
      q_src[p]   = hd[p].src;
      q_dst[p]   = hd[p].dst;
      q_id[p]    = hd[p].id;
    end
  end

  reorder_lut #(.ENTRIES(LUT_ENTRIES), .NP(NP)) u_lut (
    .clk, .rst_n,
    .cfg_we(cfg.we && cfg.node == addr_t'(NODE) && cfg.sel == CFG_SW_LUT),
    .cfg_idx(cfg.idx), .cfg_valid(cfg.data[16]), .cfg_src(cfg.data[15:8]), .cfg_dst(cfg.data[7:0]),
    .q_src, .q_dst, .q_id, .q_ok, .q_tracked, .inc(lut_inc));

  // ------------------------------------------------------- allocation state
  logic  [NP-1:0] in_busy;          // input owns an output (mid-packet)
  port_e [NP-1:0] in_out;           // which output
  logic  [NP-1:0] out_busy;         // output owned by an input

  // requests per output
  logic [NP-1:0][NP-1:0] req, gnt;  // [output][input]
  logic [NP-1:0]         ob_take;   // output accepts a new head this cycle

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++)
        req[o][i] = is_head[i] && !in_busy[i] && q_ok[i] && want[i] == port_e'(o)
                    && !out_busy[o] && ob_space[o];
  end

  for (genvar o = 0; o < NP; o++) begin : g_arb
    assign ob_take[o] = |req[o];
    rr_arbiter #(.N(NP)) u_arb (.clk, .rst_n, .req(req[o]), .advance(ob_take[o]), .gnt(gnt[o]));
  end

  // ---------------------------------------------------------------- crossbar
  function automatic head_t shift_route(head_t h);
    head_t r;
    r       = h;
    r.route = h.route >> 2;
    return r;
  endfunction

  logic [NP-1:0] head_go;           // input's head granted this cycle
  always_comb begin
    ob_wr    = '0;
    ob_in    = '0;
    ib_ready = '0;
    head_go  = '0;
    // new heads
    for (int o = 0; o < NP; o++) begin
      for (int i = 0; i < NP; i++) begin
        if (gnt[o][i]) begin
          head_go[i]  = 1'b1;
          ib_ready[i] = 1'b1;
          ob_wr[o]    = 1'b1;
          ob_in[o]    = ib_flit[i];
          if (o != int'(P_LOCAL)) ob_in[o].data = FLIT_W'(shift_route(hd[i]));
        end
      end
    end
    // body and tail flits of packets in progress
    for (int i = 0; i < NP; i++) begin
      if (in_busy[i] && ib_valid[i] && ob_space[in_out[i]]) begin
        ib_ready[i]      = 1'b1;
        ob_wr[in_out[i]] = 1'b1;
        ob_in[in_out[i]] = ib_flit[i];
      end
    end
  end

  assign lut_inc = head_go & q_tracked;

  always_comb begin
    for (int i = 0; i < NP; i++) ooo_stall[i] = is_head[i] && !in_busy[i] && !q_ok[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_busy  <= '0;
      out_busy <= '0;
      in_out   <= '{default: P_LOCAL};
    end else begin
      for (int i = 0; i < NP; i++) begin
        if (head_go[i]) begin
          in_busy[i]         <= 1'b1;
          in_out[i]          <= want[i];
          out_busy[want[i]]  <= 1'b1;
        end else if (in_busy[i] && ib_valid[i] && ob_space[in_out[i]]
                     && ib_flit[i].ftype == FT_TAIL) begin
          in_busy[i]         <= 1'b0;
          out_busy[in_out[i]] <= 1'b0;
        end
      end
    end
  end

  // A body or tail flit must never reach an input that owns no output.
  for (genvar i = 0; i < NP; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      ib_valid[i] && !in_busy[i] |-> ib_flit[i].ftype == FT_HEAD);
  end
endmodule
