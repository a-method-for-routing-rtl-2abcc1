// Sending network interface: packetizing, multipath splitting, replication of
// critical packets and recovery from failed paths.
//
// The core hands over one packet at a time (destination and PKT_FLITS-1
// payload flits, valid/ready). For each destination the NI holds up to NPATHS
// source routes with an 8-bit split weight each, a copy count n_t and a
// packet-id counter that starts at 1 after reset.
//
// Path choice: among the valid paths not marked failed, a path is drawn with
// probability weight/sum(weights), using a 16-bit LFSR: x = (r * sum) >> 10
// for a 10-bit random r, and the first path whose running weight sum exceeds
// x is taken. A critical destination (n_t > 1) gets every packet n_t times;
// the first copy takes the drawn path, further copies the next alive paths in
// turn. Each copy is a packet of its own with the next packet id, so the
// reconvergent switch releases the copies in order.
//
// Permanent failures: a notice (destination, path, id of the first packet
// lost) marks that path failed, so it is never chosen again, and every packet
// to that destination in the history of the last HIST packets that went out
// on that path with an id from the lost one onwards is sent again, with its
// original id, on a path drawn among the alive ones. Replays go before new
// packets, oldest first.
//
// Every flit is SECDED-encoded; a head is encoded with its route field
// cleared, the value it has when it reaches the destination.
// Timing: one flit per cycle while out_ready is high; core_ready is high in
// the idle state only, so a packet takes PKT_FLITS cycles per copy plus one.
//
// From the document: per-packet path choice by split probabilities from a
// source-routing table, packet identifiers per commodity starting at 1,
// n_t-fold replication of critical commodities over the paths, dropping a
// failed path and resending what was lost on it. This design's own: the
// table format and configuration port, the LFSR draw, copies as consecutive
// ids, the notice format and the replay history.
module ni_initiator
  import mp_pkg::*;
#(
  parameter int unsigned NODE   = 0,   // this NI's address (source field)
  parameter int unsigned NPATHS = 4,
  parameter int unsigned NDEST  = 16,
  parameter int unsigned HIST   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  // core side
  input  logic                 core_valid,
  output logic                 core_ready,
  input  addr_t                core_dst,
  input  logic [PAYLOAD_W-1:0] core_data,
  // permanent path failure notice
  input  logic                 fail_valid,
  input  addr_t                fail_dst,
  input  logic [1:0]           fail_path,
  input  pktid_t               fail_id,
  // network side
  output flit_t                out_flit,
  output logic                 out_valid,
  input  logic                 out_ready,
  // observation
  output logic                 replaying
);
  localparam int unsigned DW = $clog2(NDEST);
  localparam int unsigned PW = (NPATHS > 1) ? $clog2(NPATHS) : 1;
  localparam int unsigned HW = $clog2(HIST);
  localparam int unsigned FW = $clog2(PKT_FLITS);

  typedef struct packed {
    logic       valid;
    logic [7:0] weight;
    route_t     route;
  } path_t;

  typedef struct packed {
    logic                 valid;
    logic                 pending;   // to be replayed
    addr_t                dst;
    pktid_t               id;
    logic [PW-1:0]        path;
    logic [PAYLOAD_W-1:0] data;
  } hist_t;

  path_t  ptab   [NDEST][NPATHS];
  logic   [NPATHS-1:0] failed [NDEST];
  logic   [1:0]  ncopy  [NDEST];
  pktid_t next_id [NDEST];
  hist_t  hist   [HIST];
  logic   [HW-1:0] hwp;              // next history slot (= oldest entry)

  // ------------------------------------------------------------- config
  wire cfg_me = cfg.we && cfg.node == addr_t'(NODE);

  // ---------------------------------------------------------------- LFSR
  logic [15:0] lfsr;
  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  // ------------------------------------------------------------- sender
  typedef enum logic [1:0] {S_IDLE, S_SEND} state_e;
  state_e               state;
  addr_t                cur_dst;
  pktid_t               cur_id;
  logic [PW-1:0]        cur_path;
  logic [PAYLOAD_W-1:0] cur_data;
  logic [1:0]           copies_left;   // copies still to send after this one
  logic                 cur_replay;
  logic [HW-1:0]        cur_hidx;
  logic [FW-1:0]        fcnt;

  // draw a path for destination d among alive paths
  function automatic logic [PW:0] draw_path(input logic [DW-1:0] d, input logic [9:0] r);
    logic [9:0]  sum, cum;
    logic [19:0] prod;
    logic [PW:0] pick;       // MSB set: no alive path
    sum = '0;
    for (int j = 0; j < NPATHS; j++)
      if (ptab[d][j].valid && !failed[d][j]) sum += 10'(ptab[d][j].weight);
    prod = r * sum;   // x = prod[19:10]
    cum  = '0;
    pick = {1'b1, {PW{1'b0}}};
    for (int j = 0; j < NPATHS; j++) begin
      if (ptab[d][j].valid && !failed[d][j]) begin
        cum += 10'(ptab[d][j].weight);
        if (pick[PW] && (prod[19:10] < cum || sum == '0)) pick = {1'b0, PW'(j)};
      end
    end
    return pick;
  endfunction

  // next alive path after p, wrapping (p itself if it is the only one)
  function automatic logic [PW-1:0] next_alive(input logic [DW-1:0] d, input logic [PW-1:0] p);
    logic [PW-1:0] n;
    logic          found;
    n     = p;
    found = 1'b0;
    for (int k = 1; k <= NPATHS; k++) begin
      int j;
      j = (int'(p) + k) % NPATHS;
      if (!found && ptab[d][j].valid && !failed[d][j]) begin
        n     = PW'(j);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  // oldest pending replay in the history
  logic          rp_any;
  logic [HW-1:0] rp_idx;
  always_comb begin
    rp_any = 1'b0;
    rp_idx = '0;
    for (int k = 0; k < HIST; k++) begin
      logic [HW-1:0] e;
      e = HW'(int'(hwp) + k);
      if (!rp_any && hist[e].valid && hist[e].pending) begin
        rp_any = 1'b1;
        rp_idx = e;
      end
    end
  end

  wire [DW-1:0] core_d = core_dst[DW-1:0];
  wire [DW-1:0] rp_d   = hist[rp_idx].dst[DW-1:0];
  wire [DW-1:0] cur_d  = cur_dst[DW-1:0];
  logic [PW:0]  core_pick, rp_pick;
  always_comb begin
    core_pick = draw_path(core_d, lfsr[9:0]);
    rp_pick   = draw_path(rp_d, lfsr[9:0]);
  end

  assign core_ready = (state == S_IDLE) && !rp_any && !fail_valid && !core_pick[PW];
  assign replaying  = cur_replay && state == S_SEND;

  // ---------------------------------------------------------------- flits
  logic [FLIT_W-1:0] enc_in;
  logic [ECC_W-1:0]  enc_out;
  head_t             head;
  secded_enc #(.DATA_W(FLIT_W), .ECC_W(ECC_W)) u_enc (.data(enc_in), .ecc(enc_out));

  ftype_e            fl_type;
  logic [FLIT_W-1:0] fl_data;
  always_comb begin
    head = '{id: cur_id, dst: cur_dst, src: addr_t'(NODE), route: ptab[cur_d][cur_path].route};
    if (fcnt == '0) begin
      fl_type = FT_HEAD;
      fl_data = FLIT_W'(head);
      enc_in  = FLIT_W'(head) & ~FLIT_W'({ROUTE_W{1'b1}});
    end else begin
      fl_type = (fcnt == FW'(PKT_FLITS - 1)) ? FT_TAIL : FT_BODY;
      fl_data = cur_data[(int'(fcnt) - 1) * FLIT_W +: FLIT_W];
      enc_in  = fl_data;
    end
  end
  assign out_flit = '{ftype: fl_type, ecc: enc_out, data: fl_data};
  assign out_valid = (state == S_SEND);

  wire flit_go = out_valid && out_ready;
  wire pkt_end = flit_go && fcnt == FW'(PKT_FLITS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      fcnt        <= '0;
      hwp         <= '0;
      cur_dst     <= '0;
      cur_id      <= '0;
      cur_path    <= '0;
      cur_data    <= '0;
      copies_left <= '0;
      cur_replay  <= 1'b0;
      cur_hidx    <= '0;
      for (int d = 0; d < NDEST; d++) begin
        next_id[d] <= pktid_t'(1);
        failed[d]  <= '0;
        ncopy[d]   <= 2'd1;
        for (int j = 0; j < NPATHS; j++) ptab[d][j] <= '0;
      end
      for (int h = 0; h < HIST; h++) hist[h] <= '0;
    end else begin
      // configuration
      if (cfg_me && cfg.sel == CFG_NI_PATH && int'(cfg.path) < NPATHS)
        ptab[cfg.idx[DW-1:0]][cfg.path[PW-1:0]] <= '{valid: cfg.data[23], weight: cfg.data[15:8], route: cfg.data[7:0]};
      if (cfg_me && cfg.sel == CFG_NI_DEST) begin
        ncopy[cfg.idx[DW-1:0]]  <= (cfg.data[1:0] == 2'd0) ? 2'd1 : cfg.data[1:0];
        failed[cfg.idx[DW-1:0]] <= '0;
      end

      // failure notice: mark path, schedule replays
      if (fail_valid) begin
        failed[fail_dst[DW-1:0]][fail_path[PW-1:0]] <= 1'b1;
        for (int h = 0; h < HIST; h++) begin
          if (hist[h].valid && hist[h].dst == fail_dst && hist[h].path == fail_path[PW-1:0]
              && pktid_t'(hist[h].id - fail_id) < pktid_t'(next_id[fail_dst[DW-1:0]] - fail_id))
            hist[h].pending <= 1'b1;
        end
      end

      case (state)
        S_IDLE: begin
          if (!fail_valid && rp_any && !rp_pick[PW]) begin
            state      <= S_SEND;
            fcnt       <= '0;
            cur_dst    <= hist[rp_idx].dst;
            cur_id     <= hist[rp_idx].id;
            cur_data   <= hist[rp_idx].data;
            cur_path   <= rp_pick[PW-1:0];
            cur_replay <= 1'b1;
            cur_hidx   <= rp_idx;
            copies_left <= '0;
          end else if (core_valid && core_ready) begin
            state       <= S_SEND;
            fcnt        <= '0;
            cur_dst     <= core_dst;
            cur_id      <= next_id[core_d];
            cur_data    <= core_data;
            cur_path    <= core_pick[PW-1:0];
            cur_replay  <= 1'b0;
            copies_left <= ncopy[core_d] - 2'd1;
            next_id[core_d] <= next_id[core_d] + 1'b1;
          end
        end
        S_SEND: begin
          if (flit_go) fcnt <= fcnt + 1'b1;
          if (pkt_end) begin
            fcnt <= '0;
            if (cur_replay) begin
              hist[cur_hidx].pending <= 1'b0;
              hist[cur_hidx].path    <= cur_path;
            end else begin
              hist[hwp] <= '{valid: 1'b1, pending: 1'b0, dst: cur_dst, id: cur_id,
                             path: cur_path, data: cur_data};
              hwp <= hwp + 1'b1;
            end
            if (copies_left != '0 && !cur_replay) begin
              copies_left <= copies_left - 1'b1;
              cur_id      <= next_id[cur_d];
              next_id[cur_d] <= next_id[cur_d] + 1'b1;
              cur_path    <= next_alive(cur_d, cur_path);
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> $stable(out_flit));
endmodule
