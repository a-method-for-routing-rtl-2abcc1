// Testbench for mp_switch (node 4 of a 3-column mesh, the mesh centre).
// Checks:
//  - out-of-order stall: with commodity 5->4 tracked, a packet with id 2 on
//    the north input is held (ooo_stall) until id 1 arrives on the east
//    input; the local output then carries id 1 before id 2;
//  - source routing: a head leaves on the port named by its two low route
//    bits, with the route shifted right by two, and takes 2 cycles from
//    input handshake to output valid on an idle switch;
//  - wormhole: two packets contending for one output are not interleaved;
//  - untracked commodities pass whatever their id; backpressure holds flits.
module tb_mp_switch;
  import mp_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = NPORTS;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  flit_t [NP-1:0] in_flit, out_flit;
  logic  [NP-1:0] in_valid, in_ready, out_valid, out_ready, ooo_stall;
  int checks = 0, failures = 0;
  int stall_cycles = 0;
  flit_t outq [NP][$];
  int cyc = 0;

  mp_switch #(.NODE(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++)
      if (out_valid[p] && out_ready[p]) outq[p].push_back(out_flit[p]);
    if (|ooo_stall) stall_cycles++;
  end

  task automatic send(int port, flit_t f);
    @(negedge clk);
    in_flit[port]  = f;
    in_valid[port] = 1'b1;
    while (!in_ready[port]) @(negedge clk);
    @(posedge clk);
    #1 in_valid[port] = 1'b0;
  endtask

  // mk_head takes (id, dst, src, route); wrapper with readable order
  function automatic flit_t hdr(int id, int src, int dst, int route);
    return mk_head(pktid_t'(id), addr_t'(dst), addr_t'(src), route_t'(route));
  endfunction

  task automatic send_p(int port, int id, int src, int dst, int route, int tag);
    send(port, hdr(id, src, dst, route));
    for (int k = 1; k < PKT_FLITS; k++) send(port, mk_body(32'(tag * 16 + k), k == PKT_FLITS - 1));
  endtask

  // pop one packet from an output queue and check it
  task automatic expect_pkt(int port, int id, int src, int tag, int route_out);
    head_t h;
    check(outq[port].size() >= PKT_FLITS, $sformatf("port %0d has a packet (size %0d)", port, outq[port].size()));
    if (outq[port].size() < PKT_FLITS) return;
    h = head_t'(outq[port][0].data);
    check(outq[port][0].ftype == FT_HEAD && h.id == pktid_t'(id) && h.src == addr_t'(src),
          $sformatf("port %0d head id %0d src %0d (want %0d %0d)", port, h.id, h.src, id, src));
    check(h.route == route_t'(route_out), $sformatf("route out %h want %h", h.route, route_out));
    void'(outq[port].pop_front());
    for (int k = 1; k < PKT_FLITS; k++) begin
      flit_t f;
      f = outq[port].pop_front();
      check(f.data == 32'(tag * 16 + k) && f.ftype == ((k == PKT_FLITS - 1) ? FT_TAIL : FT_BODY),
            $sformatf("port %0d body %0d of tag %0d: %h", port, k, tag, f.data));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    cfg = '0; in_flit = '0; in_valid = '0; out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg = '{we: 1'b1, node: 8'd4, sel: CFG_SW_LUT, idx: 8'd0, path: 2'd0, data: 24'h010504};
    @(negedge clk);
    cfg = '0;

    // ---- out-of-order: id 2 from north first
    fork
      send_p(int'(P_NORTH), 2, 5, 4, 0, 2);
    join_none
    repeat (10) @(posedge clk);
    check(outq[P_LOCAL].size() == 0, "id 2 held back");
    check(stall_cycles >= 5, $sformatf("ooo stall seen (%0d)", stall_cycles));
    send_p(int'(P_EAST), 1, 5, 4, 0, 1);
    wait fork;
    repeat (20) @(posedge clk);
    expect_pkt(int'(P_LOCAL), 1, 5, 1, 0);
    expect_pkt(int'(P_LOCAL), 2, 5, 2, 0);

    // ---- routing and latency: local input to south, route S then E
    @(posedge clk);
    t0 = cyc + 1;
    fork
      send_p(int'(P_LOCAL), 9, 4, 10, {D_EAST, D_SOUTH}, 3);
      begin
        @(posedge clk);
        while (!out_valid[P_SOUTH]) @(posedge clk);
        check(cyc - t0 == 2, $sformatf("head latency %0d edges (2 cycles after handshake)", cyc - t0));
      end
    join
    repeat (10) @(posedge clk);
    expect_pkt(int'(P_SOUTH), 9, 4, 3, int'(D_EAST));

    // ---- untracked commodity, any id, to north
    send_p(int'(P_WEST), 77, 3, 1, D_NORTH, 4);
    repeat (10) @(posedge clk);
    expect_pkt(int'(P_NORTH), 77, 3, 4, 0);

    // ---- wormhole contention with backpressure on east
    out_ready[P_EAST] = 1'b0;
    fork
      send_p(int'(P_WEST), 5, 3, 5, D_EAST, 5);
      send_p(int'(P_NORTH), 6, 1, 5, D_EAST, 6);
      send_p(int'(P_SOUTH), 7, 7, 5, D_EAST, 7);
    join_none
    repeat (20) @(posedge clk);
    check(outq[P_EAST].size() == 0, "backpressure holds flits");
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      out_ready[P_EAST] = $urandom_range(0, 1);
    end
    out_ready[P_EAST] = 1'b1;
    wait fork;
    repeat (20) @(posedge clk);
    check(outq[P_EAST].size() == 3 * PKT_FLITS, $sformatf("three packets out east (%0d flits)", outq[P_EAST].size()));
    for (int n = 0; n < 3; n++) begin
      head_t h;
      h = head_t'(outq[P_EAST][0].data);
      expect_pkt(int'(P_EAST), int'(h.id), int'(h.src), int'(h.id), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
