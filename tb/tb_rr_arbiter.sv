// Testbench for rr_arbiter: random requests against a round-robin model.
// Checks one-hot grants, grant only to requesters, the rotation order, that
// the pointer holds when the grant is not used, and starvation freedom.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int last = N - 1;
  int wait_cnt [N];

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    req = 0; advance = 0;
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      req     = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp = '0;
      for (int k = 1; k <= N; k++) begin
        int i;
        i = (last + k) % N;
        if (req[i] && exp == 0) exp[i] = 1'b1;
      end
      check(gnt == exp, $sformatf("grant req=%b last=%0d gnt=%b exp=%b", req, last, gnt, exp));
      @(posedge clk);
      if (advance) for (int i = 0; i < N; i++) if (gnt[i]) last = i;
      for (int i = 0; i < N; i++) begin
        if (req[i] && !(gnt[i] && advance)) wait_cnt[i]++;
        else wait_cnt[i] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
