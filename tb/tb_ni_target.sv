// Testbench for ni_target (node 4). Checks:
//  - clean packets are delivered with source, id and payload;
//  - a single flipped bit in any flit is corrected and flagged as corrected;
//  - a double error marks a non-critical packet bad;
//  - with n_t = 2 for source 6: only the first error-free copy of each pair is
//    delivered (drop pulses for the other), a bad first copy is replaced by
//    the second, and a pair with both copies bad delivers the second with
//    pkt_err set;
//  - backpressure on pkt_ready holds the packet.
module tb_ni_target;
  import mp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  flit_t in_flit;
  logic in_valid, in_ready, pkt_valid, pkt_ready, pkt_err, pkt_corrected, drop;
  addr_t pkt_src;
  pktid_t pkt_id;
  logic [PAYLOAD_W-1:0] pkt_data;
  int checks = 0, failures = 0, drops = 0;

  typedef struct { addr_t src; pktid_t id; logic [PAYLOAD_W-1:0] d; bit err; bit fix; } opkt_t;
  opkt_t got[$];

  ni_target #(.NODE(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pkt_valid && pkt_ready) got.push_back('{pkt_src, pkt_id, pkt_data, pkt_err, pkt_corrected});
    if (drop) drops++;
  end

  function automatic logic [PAYLOAD_W-1:0] pay(int n);
    return {32'(n * 11 + 5), 32'(n * 13 + 6), 32'(n * 17 + 7)};
  endfunction

  task automatic send(flit_t f);
    @(negedge clk);
    in_flit = f; in_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  // flip: flit index and bit mask (0 = none); flip2 on another flit
  task automatic send_pkt(int src, int id, int n, int fl, logic [31:0] mask);
    flit_t f;
    f = mk_head(pktid_t'(id), addr_t'(4), addr_t'(src), '0);
    if (fl == 0) f.data ^= mask;
    send(f);
    for (int k = 1; k < PKT_FLITS; k++) begin
      f = mk_body(pay(n)[(k - 1) * 32 +: 32], k == PKT_FLITS - 1);
      if (fl == k) f.data ^= mask;
      send(f);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; in_flit = '0; in_valid = 0; pkt_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg = '{we: 1'b1, node: 8'd4, sel: CFG_NI_RXCOPY, idx: 8'd6, path: 2'd0, data: 24'd2};
    @(negedge clk);
    cfg = '0;

    // clean and single-error packets from source 2
    for (int n = 0; n < 8; n++) send_pkt(2, n + 1, n, n % 4, (n < 4) ? 32'h0 : (32'h1 << (n * 3)));
    // double error
    send_pkt(2, 9, 9, 2, 32'h0000_0101);
    // head single error on a header field (id bit)
    send_pkt(2, 10, 10, 0, 32'h0100_0000);
    repeat (5) @(posedge clk);
    check(got.size() == 10, $sformatf("10 packets (%0d)", got.size()));
    for (int n = 0; n < 8; n++) begin
      check(got[n].src == 2 && got[n].id == pktid_t'(n + 1) && got[n].d == pay(n) && !got[n].err,
            $sformatf("packet %0d delivered intact", n));
      check(got[n].fix == (n >= 4), $sformatf("corrected flag %0d", n));
    end
    check(got[8].err, "double error flagged");
    check(got[9].id == 10 && !got[9].err && got[9].fix, "head error corrected");
    got.delete();

    // critical source 6: pairs of copies
    send_pkt(6, 1, 100, 0, 0);               // good
    send_pkt(6, 2, 100, 0, 0);               // duplicate, dropped
    send_pkt(6, 3, 101, 1, 32'h0000_0011);   // bad
    send_pkt(6, 4, 101, 0, 0);               // good, delivered
    send_pkt(6, 5, 102, 2, 32'h0000_0003);   // bad
    send_pkt(6, 6, 102, 3, 32'h0300_0000);   // bad, delivered with err
    send_pkt(6, 7, 103, 3, 32'h0000_0800);   // single error corrected, delivered
    send_pkt(6, 8, 103, 0, 0);               // dropped
    repeat (5) @(posedge clk);
    check(got.size() == 4, $sformatf("4 of 8 copies delivered (%0d)", got.size()));
    check(drops == 4, $sformatf("4 drops (%0d)", drops));
    if (got.size() == 4) begin
      check(got[0].id == 1 && got[0].d == pay(100) && !got[0].err, "pair 1: first copy");
      check(got[1].id == 4 && got[1].d == pay(101) && !got[1].err, "pair 2: error-free second copy");
      check(got[2].id == 6 && got[2].err, "pair 3: both bad, flagged");
      check(got[3].id == 7 && got[3].d == pay(103) && got[3].fix && !got[3].err, "pair 4: corrected first copy");
    end
    got.delete();

    // backpressure
    @(negedge clk);
    pkt_ready = 0;
    send_pkt(2, 11, 11, 0, 0);
    fork send_pkt(2, 12, 12, 0, 0); join_none
    repeat (30) @(posedge clk);
    check(got.size() == 0 && pkt_valid && pkt_id == 11 && !in_ready, "held under backpressure");
    @(negedge clk);
    pkt_ready = 1;
    repeat (30) @(posedge clk);
    check(got.size() == 2 && got[0].id == 11 && got[1].id == 12, "released in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
