// Testbench for secded_dec: reference-encoded words with no error, every
// single-bit error (data and check bits) and random double errors. Checks
// correction, the single and double flags.
module tb_secded_dec;
  import tb_ref_pkg::*;
  logic [31:0] data, corr;
  logic [6:0]  ecc;
  logic single_err, double_err;
  int checks = 0, failures = 0;

  secded_dec #(.DATA_W(32), .ECC_W(7)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [38:0] w);
    {ecc, data} = w;
    #1;
  endtask

  initial begin
    logic [38:0] cw, bad;
    logic [31:0] d;
    for (int c = 0; c < 300; c++) begin
      d  = $urandom;
      cw = {ref_ecc(d), d};
      apply(cw);
      check(corr == d && !single_err && !double_err, "clean word");
      for (int b = 0; b < 39; b++) begin
        bad = cw ^ (39'(1) << b);
        apply(bad);
        check(corr == d && single_err && !double_err, $sformatf("single bit %0d", b));
      end
      for (int t = 0; t < 10; t++) begin
        int b1, b2;
        b1 = $urandom_range(0, 38);
        b2 = (b1 + $urandom_range(1, 38)) % 39;
        bad = cw ^ (39'(1) << b1) ^ (39'(1) << b2);
        apply(bad);
        check(!single_err && double_err, $sformatf("double bits %0d %0d", b1, b2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
