// Testbench for flit_fifo: random pushes and pops against a queue model.
// Checks data order, the full flag at DEPTH entries, the empty flag, and that
// a written word is readable in the next cycle.
module tb_flit_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready, "empty after reset");
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      in_valid = 1; in_data = W'(100 + i);
      @(posedge clk); model.push_back(in_data);
      @(negedge clk);
      check(out_valid, "valid one cycle after write");
    end
    in_valid = 0;
    check(!in_ready, "full after DEPTH writes");
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 1);
      in_data   = W'($urandom);
      out_ready = $urandom_range(0, 1);
      check(in_ready == (model.size() < DEPTH), "in_ready matches occupancy");
      check(out_valid == (model.size() > 0), "out_valid matches occupancy");
      if (out_valid && model.size() > 0) check(out_data == model[0], "data order");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
