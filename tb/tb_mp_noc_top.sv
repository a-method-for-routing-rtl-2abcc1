// End-to-end testbench for mp_noc_top at its default size (3x4 mesh).
//
// Nodes follow an MPEG decoder placement: idct 0, vu 1, au 2, upsamp 3,
// sdram 4, mcpu 5, sram2 6, rast 7, sram1 8, risc 9, bab 10, adsp 11. Four
// commodities get multiple nonintersecting paths:
//   au -> sdram     : S,W  and  W,S
//   mcpu -> sdram   : W  and  N,W,S  and  S,W,N
//   upsamp -> sram2 : S  and  E,S,W
//   risc -> sram2   : N  and  E,N,W      (critical, sent twice)
// The reorder tables of switches 4 and 6 track the commodities that
// reconverge there.
// Phase 1: every source sends PKTS packets while the sdram and sram2 cores
// apply random backpressure, au and upsamp first, then mcpu and risc; one
// single-bit flip is injected on the mcpu->sdram link and a double-bit flip
// on the risc->sram2 link. The two commodities that reconverge at one switch
// run in different phases because they share that switch's input links, and
// without virtual channels a packet held for order could block the packet it
// waits for. Phase 2: the first link of the
// third mcpu->sdram path is killed; mcpu sends until a packet is swallowed
// there, the testbench reports the failure and the sender resends it; then
// mcpu sends more packets, none of which may use the failed path.
// Checks: every packet arrives exactly once, in order, with its payload and
// no uncorrectable error. Counted mechanisms (each must occur): reorder
// stalls, use of every path, corrected errors, dropped duplicate copies,
// receiver backpressure, a swallowed packet, a replay.
module tb_mp_noc_top;
  import mp_pkg::*;
  localparam int N = 12;
  localparam int PKTS = 40;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic   [N-1:0] core_valid, core_ready;
  addr_t  [N-1:0] core_dst;
  logic   [N-1:0][PAYLOAD_W-1:0] core_data;
  logic   [N-1:0] fail_valid;
  addr_t  [N-1:0] fail_dst;
  logic   [N-1:0][1:0] fail_path;
  pktid_t [N-1:0] fail_id;
  logic   [N-1:0] pkt_valid, pkt_ready, pkt_err, pkt_corrected, pkt_drop;
  addr_t  [N-1:0] pkt_src;
  pktid_t [N-1:0] pkt_id;
  logic   [N-1:0][PAYLOAD_W-1:0] pkt_data;
  logic   [N*4-1:0][FLIT_W-1:0] link_flip;
  logic   [N*4-1:0] link_kill;
  logic   [N-1:0][NPORTS-1:0] ooo_stall;
  logic   [N-1:0] replaying;

  mp_noc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // route codes, first hop in the low bits
  function automatic logic [23:0] pathcfg(int w, dir_e d0, int nh, dir_e d1 = D_NORTH, dir_e d2 = D_NORTH);
    route_t r;
    r = route_t'(d0);
    if (nh > 1) r[3:2] = d1;
    if (nh > 2) r[5:4] = d2;
    return {1'b1, 7'd0, 8'(w), r};
  endfunction

  task automatic wcfg(int node, cfg_sel_e sel, int idx, int path, logic [23:0] data);
    @(negedge clk);
    cfg = '{we: 1'b1, node: addr_t'(node), sel: sel, idx: 8'(idx), path: 2'(path), data: data};
    @(negedge clk);
    cfg = '0;
  endtask

  // ---------------------------------------------------------------- traffic
  int next_exp [N][N];   // [receiver][source] next expected sequence number
  int delivered = 0, stalls = 0, corrected = 0, drops = 0, bp_cycles = 0, replays = 0;
  int swallowed = 0;
  int path_heads [N][5];

  function automatic logic [PAYLOAD_W-1:0] pay(int src, int n);
    return {32'(src), 32'(n), 32'hC0DE_0000 | 32'(n)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N; r++) begin
      if (pkt_valid[r] && pkt_ready[r]) begin
        int s;
        s = int'(pkt_src[r]);
        delivered++;
        check(!pkt_err[r], $sformatf("node %0d: packet from %0d without uncorrectable error", r, s));
        check(pkt_data[r] == pay(s, next_exp[r][s]),
              $sformatf("node %0d: from %0d in order, want seq %0d got %0d", r, s, next_exp[r][s], pkt_data[r][63:32]));
        next_exp[r][s]++;
        if (pkt_corrected[r]) corrected++;
      end
      if (pkt_drop[r]) drops++;
      if (pkt_valid[r] && !pkt_ready[r]) bp_cycles++;
      if (|ooo_stall[r]) stalls++;
      if (replaying[r] && dut.sw_in_v[r][P_LOCAL] && dut.sw_in_r[r][P_LOCAL]
          && dut.sw_in[r][P_LOCAL].ftype == FT_HEAD) replays++;
      for (int p = 1; p < 5; p++)
        if (dut.sw_out_v[r][p] && dut.sw_out_r[r][p] && dut.sw_out[r][p].ftype == FT_HEAD) begin
          path_heads[r][p]++;
          if (link_kill[r * 4 + p - 1]) swallowed++;
        end
    end
  end

  task automatic put(int node, int dst, int n);
    @(negedge clk);
    core_valid[node] = 1'b1; core_dst[node] = addr_t'(dst); core_data[node] = pay(node, n);
    #1;
    while (!core_ready[node]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 core_valid[node] = 1'b0;
  endtask

  task automatic stream(int node, int dst, int from, int to);
    for (int n = from; n < to; n++) put(node, dst, n);
  endtask

  // hold a flip mask on a link until one flit has crossed it
  task automatic flip_once(int node, int dir, logic [31:0] mask);
    @(negedge clk);
    link_flip[node * 4 + dir] = mask;
    do @(posedge clk); while (!(dut.sw_out_v[node][dir + 1] && dut.sw_out_r[node][dir + 1]));
    #1 link_flip[node * 4 + dir] = '0;
  endtask

  task automatic bp_random(int cycles);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      pkt_ready[4] = ($urandom_range(0, 2) != 0);
      pkt_ready[6] = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    pkt_ready = '1;
  endtask

  task automatic wait_idle(int cycles);
    int quiet;
    quiet = 0;
    while (quiet < cycles) begin
      @(posedge clk);
      if (|pkt_valid || |core_valid) quiet = 0; else quiet++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_c2, lost_id, n_before;
    cfg = '0; core_valid = '0; core_dst = '0; core_data = '0;
    fail_valid = '0; fail_dst = '0; fail_path = '0; fail_id = '0;
    pkt_ready = '1; link_flip = '0; link_kill = '0;
    foreach (next_exp[r, s]) next_exp[r][s] = 0;
    foreach (path_heads[r, p]) path_heads[r][p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // au(2) -> sdram(4)
    wcfg(2, CFG_NI_PATH, 4, 0, pathcfg(128, D_SOUTH, 2, D_WEST));
    wcfg(2, CFG_NI_PATH, 4, 1, pathcfg(128, D_WEST, 2, D_SOUTH));
    // mcpu(5) -> sdram(4)
    wcfg(5, CFG_NI_PATH, 4, 0, pathcfg(100, D_WEST, 1));
    wcfg(5, CFG_NI_PATH, 4, 1, pathcfg(80, D_NORTH, 3, D_WEST, D_SOUTH));
    wcfg(5, CFG_NI_PATH, 4, 2, pathcfg(76, D_SOUTH, 3, D_WEST, D_NORTH));
    // upsamp(3) -> sram2(6)
    wcfg(3, CFG_NI_PATH, 6, 0, pathcfg(128, D_SOUTH, 1));
    wcfg(3, CFG_NI_PATH, 6, 1, pathcfg(128, D_EAST, 3, D_SOUTH, D_WEST));
    // risc(9) -> sram2(6), critical: two copies
    wcfg(9, CFG_NI_PATH, 6, 0, pathcfg(128, D_NORTH, 1));
    wcfg(9, CFG_NI_PATH, 6, 1, pathcfg(128, D_EAST, 3, D_NORTH, D_WEST));
    wcfg(9, CFG_NI_DEST, 6, 0, 24'd2);
    wcfg(6, CFG_NI_RXCOPY, 9, 0, 24'd2);
    // reorder tables at the reconvergent switches
    wcfg(4, CFG_SW_LUT, 0, 0, {7'd0, 1'b1, 8'd2, 8'd4});
    wcfg(4, CFG_SW_LUT, 1, 0, {7'd0, 1'b1, 8'd5, 8'd4});
    wcfg(6, CFG_SW_LUT, 0, 0, {7'd0, 1'b1, 8'd3, 8'd6});
    wcfg(6, CFG_SW_LUT, 1, 0, {7'd0, 1'b1, 8'd9, 8'd6});

    // ---- phase 1a: au and upsamp
    fork
      stream(2, 4, 0, PKTS);
      stream(3, 6, 0, PKTS);
      bp_random(400);
    join
    wait_idle(50);
    // ---- phase 1b: mcpu and risc, with injected bit flips
    fork
      stream(5, 4, 0, PKTS);
      stream(9, 6, 0, PKTS);
      bp_random(400);
      begin
        repeat (60) @(posedge clk);
        flip_once(5, int'(D_WEST), 32'h0000_0001);          // single bit, mcpu->sdram
        flip_once(9, int'(D_NORTH), 32'h0000_0003);         // double bit, risc->sram2
      end
    join
    wait_idle(50);
    check(next_exp[4][2] == PKTS && next_exp[4][5] == PKTS, "sdram got all packets of au and mcpu");
    check(next_exp[6][3] == PKTS && next_exp[6][9] == PKTS, "sram2 got all packets of upsamp and risc");

    // ---- phase 2: permanent failure of mcpu's third path (first link south)
    n_c2 = PKTS;
    @(negedge clk);
    link_kill[5 * 4 + int'(D_SOUTH)] = 1'b1;
    n_before = swallowed;
    lost_id = -1;
    for (int k = 0; k < 60 && swallowed == n_before; k++) begin
      put(5, 4, n_c2);
      n_c2++;
      repeat (8) @(posedge clk);
    end
    check(swallowed > n_before, "a packet was swallowed by the failed link");
    repeat (20) @(posedge clk);
    // the lost packet is the last one sent: id = number of packets sent + 1
    lost_id = n_c2 + 1;
    @(negedge clk);
    fail_valid[5] = 1'b1; fail_dst[5] = 8'd4; fail_path[5] = 2'd2; fail_id[5] = pktid_t'(lost_id - 1);
    @(negedge clk);
    fail_valid[5] = 1'b0;
    wait_idle(50);
    check(next_exp[4][5] == n_c2, $sformatf("lost packet resent and delivered (%0d of %0d)", next_exp[4][5], n_c2));
    n_before = path_heads[5][P_SOUTH];
    stream(5, 4, n_c2, n_c2 + 30);
    n_c2 += 30;
    wait_idle(50);
    check(path_heads[5][P_SOUTH] == n_before, "failed path no longer used");
    check(next_exp[4][5] == n_c2, $sformatf("all mcpu packets delivered (%0d of %0d)", next_exp[4][5], n_c2));

    // ---- mechanisms
    check(stalls > 0, $sformatf("reorder stalls: %0d", stalls));
    check(path_heads[2][P_SOUTH] > 0 && path_heads[2][P_WEST] > 0, "both au paths used");
    check(path_heads[5][P_WEST] > 0 && path_heads[5][P_NORTH] > 0 && n_before > 0, "all three mcpu paths used");
    check(path_heads[3][P_SOUTH] > 0 && path_heads[3][P_EAST] > 0, "both upsamp paths used");
    check(path_heads[9][P_NORTH] > 0 && path_heads[9][P_EAST] > 0, "both risc paths used");
    check(corrected > 0, $sformatf("corrected single-bit errors: %0d", corrected));
    check(drops >= PKTS, $sformatf("duplicate copies dropped: %0d", drops));
    check(bp_cycles > 0, $sformatf("receiver backpressure cycles: %0d", bp_cycles));
    check(replays > 0, $sformatf("replayed packets: %0d", replays));
    $display("stats: delivered=%0d stalls=%0d corrected=%0d drops=%0d bp=%0d swallowed=%0d replays=%0d",
             delivered, stalls, corrected, drops, bp_cycles, swallowed, replays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
