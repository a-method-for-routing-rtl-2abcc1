// Reorder look-up table of a reconvergent switch.
//
// Each of ENTRIES entries holds one reconverging commodity: its source
// address, its destination address and the identifier of the next packet the
// switch must pass for it. All identifiers are 1 after reset. For every input
// port the head flit's source, destination and packet id are compared with
// all entries in parallel. If an entry matches source and destination but not
// the id, the packet is out of order and q_ok is low: the arbiter must not
// grant it and it stays in its input buffer. A head that matches no entry is
// not a reconverging commodity and is always allowed. When the arbiter grants
// a head of a tracked commodity it pulses inc for that port and the entry's
// identifier is incremented (modulo 2^PKTID_W, as is the sender's counter).
//
// Entries are written through the cfg_* port (valid, source, destination),
// which also resets the entry's identifier to 1. q_ok is combinational from the
// query inputs; the increment takes effect on the next clock edge.
// The table contents, reset value and increment rule follow the document; the
// per-port parallel query, the "untracked passes" rule and the write port are
// this design's choices.
module reorder_lut
  import mp_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned NP      = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               cfg_we,
  input  logic [7:0]         cfg_idx,
  input  logic               cfg_valid,
  input  addr_t              cfg_src,
  input  addr_t              cfg_dst,
  // queries, one per input port
  input  addr_t  [NP-1:0]    q_src,
  input  addr_t  [NP-1:0]    q_dst,
  input  pktid_t [NP-1:0]    q_id,
  output logic   [NP-1:0]    q_ok,
  output logic   [NP-1:0]    q_tracked,
  // counter increment signals from the arbiter
  input  logic   [NP-1:0]    inc
);
  typedef struct packed {
    logic   valid;
    addr_t  src;
    addr_t  dst;
    pktid_t next_id;
  } entry_t;

  entry_t tbl [ENTRIES];
  logic [NP-1:0][ENTRIES-1:0] hit;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      q_ok[p]      = 1'b1;
      q_tracked[p] = 1'b0;
      for (int e = 0; e < ENTRIES; e++) begin
        hit[p][e] = tbl[e].valid && tbl[e].src == q_src[p] && tbl[e].dst == q_dst[p];
        if (hit[p][e]) begin
          q_tracked[p] = 1'b1;
          if (tbl[e].next_id != q_id[p]) q_ok[p] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '{valid: 1'b0, src: '0, dst: '0, next_id: pktid_t'(1)};
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (cfg_we && cfg_idx == 8'(e)) begin
          tbl[e] <= '{valid: cfg_valid, src: cfg_src, dst: cfg_dst, next_id: pktid_t'(1)};
        end else begin
          for (int p = 0; p < NP; p++)
            if (inc[p] && hit[p][e]) tbl[e].next_id <= tbl[e].next_id + 1'b1;
        end
      end
    end
  end

  // An increment is only ever requested for a tracked, in-order head.
  for (genvar p = 0; p < NP; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) inc[p] |-> q_ok[p] && q_tracked[p]);
  end
endmodule
