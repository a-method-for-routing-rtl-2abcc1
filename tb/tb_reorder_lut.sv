// Testbench for reorder_lut. Programs two commodities and checks: ids are 1
// after reset and after a write; only the expected id is allowed; untracked
// heads pass; inc moves the expected id by one; two ports of one commodity
// are told apart; the id wraps modulo 256.
module tb_reorder_lut;
  import mp_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_valid;
  logic [7:0] cfg_idx;
  addr_t cfg_src, cfg_dst;
  addr_t  [NP-1:0] q_src, q_dst;
  pktid_t [NP-1:0] q_id;
  logic   [NP-1:0] q_ok, q_tracked, inc;
  int checks = 0, failures = 0;

  reorder_lut #(.ENTRIES(4), .NP(NP)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int idx, bit v, int s, int d);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 8'(idx); cfg_valid = v; cfg_src = addr_t'(s); cfg_dst = addr_t'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic q(int p, int s, int d, int id);
    q_src[p] = addr_t'(s); q_dst[p] = addr_t'(d); q_id[p] = pktid_t'(id);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_idx = 0; cfg_valid = 0; cfg_src = 0; cfg_dst = 0;
    q_src = '0; q_dst = '0; q_id = '0; inc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(0, 1, 5, 4);   // commodity 5 -> 4
    wr(2, 1, 2, 4);   // commodity 2 -> 4
    @(negedge clk);
    q(0, 5, 4, 1); q(1, 5, 4, 2); q(2, 2, 4, 1); q(3, 7, 4, 9); q(4, 5, 3, 3);
    #1;
    check(q_ok == 5'b11101, $sformatf("initial id 1: q_ok=%b", q_ok));
    check(q_tracked == 5'b00111, $sformatf("tracked=%b", q_tracked));
    // grant port 0 (id 1 of 5->4); as in the switch, only an in-order
    // tracked head is ever granted and counted
    inc = 5'b00001 & q_ok & q_tracked;
    @(negedge clk);
    inc = '0;
    #1;
    check(q_ok[1] && !q_ok[0], "after inc id 2 expected");
    check(q_ok[2], "other commodity untouched");
    // simultaneous increments of the two commodities
    inc = 5'b00110 & q_ok & q_tracked;
    @(negedge clk);
    inc = '0;
    q(1, 5, 4, 3); q(2, 2, 4, 2);
    #1;
    check(q_ok[1] && q_ok[2], "both advanced");
    // walk commodity 5->4 up to wrap
    for (int id = 3; id < 258; id++) begin
      q(0, 5, 4, id % 256);
      #1;
      check(q_ok[0], $sformatf("id %0d in order", id % 256));
      inc = 5'b00001 & q_ok & q_tracked;
      @(negedge clk);
      inc = '0;
    end
    q(0, 5, 4, 2); #1;
    check(q_ok[0], "wrapped to 2");
    // rewrite entry 0 resets to 1
    wr(0, 1, 5, 4);
    q(0, 5, 4, 1); q(1, 5, 4, 2); #1;
    check(q_ok[0] && !q_ok[1], "rewrite resets to 1");
    // invalidate: untracked passes
    wr(0, 0, 5, 4);
    #1;
    check(q_ok[1] && !q_tracked[1], "invalid entry not tracked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
