// Testbench for ni_initiator (node 2). Checks:
//  - packet ids per destination count up from 1; head fields, payload and
//    SECDED check bits (against an independent reference encoder);
//  - the split: with weights 100:50 the first path carries 55-78 % of 300
//    packets, and only programmed routes are used;
//  - a critical destination with n_t = 2 gets every packet twice, with
//    consecutive ids, on two different paths;
//  - a failure notice stops use of the failed path and resends, with their
//    original ids, exactly the packets of the replay history that went out
//    on it from the lost id onwards, before any new packet;
//  - one flit per cycle when the network side is always ready.
module tb_ni_initiator;
  import mp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic core_valid, core_ready, out_valid, out_ready, replaying;
  addr_t core_dst;
  logic [PAYLOAD_W-1:0] core_data;
  logic fail_valid;
  addr_t fail_dst;
  logic [1:0] fail_path;
  pktid_t fail_id;
  flit_t out_flit;
  int checks = 0, failures = 0;

  typedef struct {
    head_t h;
    logic [PAYLOAD_W-1:0] d;
    bit ecc_ok;
  } rpkt_t;
  rpkt_t rx[$];
  rpkt_t cur;
  int fcnt = 0;
  int flit_cycles = 0, flits_seen = 0;

  localparam route_t R0 = {4'h0, D_WEST, D_SOUTH};   // S then W
  localparam route_t R1 = {4'h0, D_SOUTH, D_WEST};   // W then S
  localparam route_t R2 = {2'h0, D_WEST, D_SOUTH, D_SOUTH};

  ni_initiator #(.NODE(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      flits_seen++;
      if (fcnt == 0) begin
        head_t hz;
        cur.h = head_t'(out_flit.data);
        hz = cur.h; hz.route = '0;
        cur.ecc_ok = (out_flit.ecc == ref_ecc(FLIT_W'(hz))) && out_flit.ftype == FT_HEAD;
        cur.d = '0;
      end else begin
        cur.d[(fcnt - 1) * FLIT_W +: FLIT_W] = out_flit.data;
        cur.ecc_ok &= (out_flit.ecc == ref_ecc(out_flit.data));
        cur.ecc_ok &= out_flit.ftype == ((fcnt == PKT_FLITS - 1) ? FT_TAIL : FT_BODY);
      end
      fcnt = (fcnt + 1) % PKT_FLITS;
      if (fcnt == 0) rx.push_back(cur);
    end
    if (out_valid) flit_cycles++;


  end

  task automatic wcfg(cfg_sel_e sel, int idx, int path, logic [23:0] data);
    @(negedge clk);
    cfg = '{we: 1'b1, node: 8'd2, sel: sel, idx: 8'(idx), path: 2'(path), data: data};
    @(negedge clk);
    cfg = '0;
  endtask

  function automatic logic [PAYLOAD_W-1:0] pay(int n);
    return {32'(n * 7 + 3), 32'(n * 5 + 2), 32'(n * 3 + 1)};
  endfunction

  task automatic put(int dst, int n);
    @(negedge clk);
    core_valid = 1; core_dst = addr_t'(dst); core_data = pay(n);
    #1;   // let core_ready settle for the new destination
    while (!core_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 core_valid = 0;
  endtask

  task automatic put_range(int dst, int from, int to);
    for (int n = from; n < to; n++) put(dst, n);
  endtask

  task automatic drain(int n);
    int guard = 0;
    while (rx.size() < n && guard < 5000) begin @(posedge clk); guard++; end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, n1, seen_before, base;
    rpkt_t hist[$];     // all packets sent, in order (reference history)
    cfg = '0; core_valid = 0; core_dst = 0; core_data = 0; out_ready = 1;
    fail_valid = 0; fail_dst = 0; fail_path = 0; fail_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wcfg(CFG_NI_PATH, 4, 0, {1'b1, 7'd0, 8'd100, R0});
    wcfg(CFG_NI_PATH, 4, 1, {1'b1, 7'd0, 8'd50, R1});
    wcfg(CFG_NI_PATH, 7, 0, {1'b1, 7'd0, 8'd128, R0});
    wcfg(CFG_NI_PATH, 7, 2, {1'b1, 7'd0, 8'd128, R2});
    wcfg(CFG_NI_DEST, 7, 0, 24'd2);

    // ---- rate: one flit per cycle with the network always ready
    put(4, 0);
    drain(1);
    check(flit_cycles == PKT_FLITS, $sformatf("packet took %0d cycles", flit_cycles));

    // ---- split and ids, random backpressure
    fork
      put_range(4, 1, 300);
      for (int c = 0; c < 3000; c++) begin @(negedge clk); out_ready = $urandom_range(0, 3) != 0; end
    join_any
    out_ready = 1;
    drain(300);
    check(rx.size() == 300, $sformatf("300 packets out (%0d)", rx.size()));
    n0 = 0; n1 = 0;
    foreach (rx[i]) begin
      check(rx[i].h.id == pktid_t'(i + 1), $sformatf("id %0d at %0d", rx[i].h.id, i));
      check(rx[i].h.src == 2 && rx[i].h.dst == 4, "src/dst");
      check(rx[i].d == pay(i), $sformatf("payload %0d: %h vs %h", i, rx[i].d, pay(i)));
      check(rx[i].ecc_ok, "ecc and flit types");
      check(rx[i].h.route == R0 || rx[i].h.route == R1, "programmed route");
      if (rx[i].h.route == R0) n0++; else n1++;
    end
    check(n0 >= 165 && n0 <= 234, $sformatf("split %0d:%0d for weights 100:50", n0, n1));
    foreach (rx[i]) hist.push_back(rx[i]);
    rx.delete();

    // ---- critical destination 7: two copies each
    for (int n = 0; n < 10; n++) put(7, 1000 + n);
    drain(20);
    check(rx.size() == 20, "20 copies");
    for (int k = 0; k < 10; k++) begin
      check(rx[2*k].h.id == pktid_t'(2*k + 1) && rx[2*k+1].h.id == pktid_t'(2*k + 2), "copy ids consecutive");
      check(rx[2*k].d == pay(1000 + k) && rx[2*k+1].d == pay(1000 + k), "copies carry the same payload");
      check(rx[2*k].h.route != rx[2*k+1].h.route, "copies on different paths");
    end
    foreach (rx[i]) hist.push_back(rx[i]);
    rx.delete();

    // ---- failure: send 8 more to dst 4, then fail path 0 from the 3rd of them
    for (int n = 0; n < 8; n++) put(4, 2000 + n);
    drain(8);
    foreach (rx[i]) hist.push_back(rx[i]);
    base = 300;   // next id for dst 4 is 301 (mod 256 = 45)
    rx.delete();
    @(negedge clk);
    fail_valid = 1; fail_dst = 4; fail_path = 0; fail_id = pktid_t'(base + 3);
    @(negedge clk);
    fail_valid = 0;
    put(4, 3000);
    drain(1);
    // expected replays: last 8 packets of the history, dst 4, route R0, id >= fail id
    begin
      rpkt_t exp[$];
      for (int i = hist.size() - 8; i < hist.size(); i++)
        if (hist[i].h.dst == 4 && hist[i].h.route == R0 &&
            pktid_t'(hist[i].h.id - pktid_t'(base + 3)) < pktid_t'(pktid_t'(base + 9) - pktid_t'(base + 3)))
          exp.push_back(hist[i]);
      drain(exp.size() + 1);
      check(rx.size() == exp.size() + 1, $sformatf("%0d replays + 1 new (got %0d)", exp.size(), rx.size()));
      check(exp.size() > 0, "some packets were on the failed path");
      foreach (exp[i]) begin
        check(rx[i].h.id == exp[i].h.id && rx[i].d == exp[i].d, $sformatf("replay %0d id %0d", i, exp[i].h.id));
        check(rx[i].h.route == R1, "replay on the other path");
      end
      check(rx[rx.size()-1].h.id == pktid_t'(base + 9) && rx[rx.size()-1].d == pay(3000), "new packet after replays");
    end
    rx.delete();
    for (int n = 0; n < 40; n++) put(4, 4000 + n);
    drain(40);
    seen_before = 0;
    foreach (rx[i]) if (rx[i].h.route == R0) seen_before++;
    check(seen_before == 0, $sformatf("failed path not used (%0d)", seen_before));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
