// Receiving network interface: error correction and copy filtering.
//
// Takes the flits the local switch port delivers, one per cycle, and runs each
// through a SECDED decoder: single-bit errors are corrected, double-bit errors
// mark the packet bad. A head is decoded with its route field as it arrives
// (cleared by the switches along the way). On the tail flit the packet is
// complete.
//
// Critical commodities arrive as n_t copies with consecutive packet ids, and
// because delivery is in order the copies of one packet arrive one after the
// other. With the copy count programmed for a source, the NI counts arrivals
// from that source in groups of n_t and passes on the first error-free copy of
// each group; the others are dropped (drop pulses). If every copy is bad the
// last one is passed on with pkt_err set. With n_t = 1 every packet is passed
// on, with pkt_err set if it holds an uncorrectable error.
//
// Interface: pkt_valid/pkt_ready toward the core, holding source, packet id,
// payload, error flag and a flag for corrected single-bit errors. The NI takes
// no flit while a delivered packet waits for pkt_ready.
// From the document: Hamming correction at the receiver and acceptance of an
// error-free copy. This design's own: the double-error detection bit, the
// grouping of consecutive copies and the handling of all-bad groups.
module ni_target
  import mp_pkg::*;
#(
  parameter int unsigned NODE = 0,
  parameter int unsigned NSRC = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  input  flit_t                in_flit,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 pkt_valid,
  input  logic                 pkt_ready,
  output addr_t                pkt_src,
  output pktid_t               pkt_id,
  output logic [PAYLOAD_W-1:0] pkt_data,
  output logic                 pkt_err,
  output logic                 pkt_corrected,
  output logic                 drop
);
  localparam int unsigned SW = $clog2(NSRC);
  localparam int unsigned FW = $clog2(PKT_FLITS);

  logic [FLIT_W-1:0] corr;
  logic              s_err, d_err;
  secded_dec #(.DATA_W(FLIT_W), .ECC_W(ECC_W)) u_dec (
    .data(in_flit.data), .ecc(in_flit.ecc), .corr, .single_err(s_err), .double_err(d_err));

  logic [1:0] ncopy [NSRC];
  logic [1:0] cidx  [NSRC];
  logic       dlv   [NSRC];

  head_t                a_head;
  logic [PAYLOAD_W-1:0] a_data;
  logic                 a_bad, a_fix;
  logic [FW-1:0]        a_cnt;

  wire   take = in_valid && in_ready;
  assign in_ready = !pkt_valid;

  // complete packet as seen this cycle (tail included)
  logic                 c_bad, c_fix;
  logic [PAYLOAD_W-1:0] c_data;
  logic [SW-1:0]        c_s;
  always_comb begin
    c_bad  = a_bad || d_err;
    c_fix  = a_fix || s_err;
    c_data = a_data;
    c_data[PAYLOAD_W-FLIT_W +: FLIT_W] = corr;
    c_s    = a_head.src[SW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt_valid     <= 1'b0;
      pkt_src       <= '0;
      pkt_id        <= '0;
      pkt_data      <= '0;
      pkt_err       <= 1'b0;
      pkt_corrected <= 1'b0;
      drop          <= 1'b0;
      a_head        <= '0;
      a_data        <= '0;
      a_bad         <= 1'b0;
      a_fix         <= 1'b0;
      a_cnt         <= '0;
      for (int s = 0; s < NSRC; s++) begin
        ncopy[s] <= 2'd1;
        cidx[s]  <= '0;
        dlv[s]   <= 1'b0;
      end
    end else begin
      drop <= 1'b0;
      if (pkt_valid && pkt_ready) pkt_valid <= 1'b0;
      if (cfg.we && cfg.node == addr_t'(NODE) && cfg.sel == CFG_NI_RXCOPY) begin
        ncopy[cfg.idx[SW-1:0]] <= (cfg.data[1:0] == 2'd0) ? 2'd1 : cfg.data[1:0];
        cidx[cfg.idx[SW-1:0]]  <= '0;
        dlv[cfg.idx[SW-1:0]]   <= 1'b0;
      end
      if (take) begin
        if (in_flit.ftype == FT_HEAD) begin
          a_head <= head_t'(corr);
          a_bad  <= d_err;
          a_fix  <= s_err;
          a_cnt  <= FW'(1);
        end else if (in_flit.ftype == FT_BODY) begin
          a_data[(int'(a_cnt) - 1) * FLIT_W +: FLIT_W] <= corr;
          a_bad  <= c_bad;
          a_fix  <= c_fix;
          a_cnt  <= a_cnt + 1'b1;
        end else begin
          // tail: packet complete
          a_cnt <= '0;
          if (ncopy[c_s] == 2'd1) begin
            pkt_valid <= 1'b1;
          end else begin
            if (!dlv[c_s] && (!c_bad || cidx[c_s] == ncopy[c_s] - 2'd1)) begin
              pkt_valid <= 1'b1;
              dlv[c_s]  <= 1'b1;
            end else begin
              drop <= 1'b1;
            end
            if (cidx[c_s] == ncopy[c_s] - 2'd1) begin
              cidx[c_s] <= '0;
              dlv[c_s]  <= 1'b0;
            end else begin
              cidx[c_s] <= cidx[c_s] + 2'd1;
            end
          end
          pkt_src       <= a_head.src;
          pkt_id        <= a_head.id;
          pkt_data      <= c_data;
          pkt_err       <= c_bad;
          pkt_corrected <= c_fix;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pkt_valid && !pkt_ready |=> pkt_valid);
endmodule
