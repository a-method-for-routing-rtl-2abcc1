// Testbench for secded_enc: compares the check bits with an independently
// written reference encoder on walking-one words and random words.
module tb_secded_enc;
  import tb_ref_pkg::*;
  logic [31:0] data;
  logic [6:0]  ecc;
  int checks = 0, failures = 0;

  secded_enc #(.DATA_W(32), .ECC_W(7)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 0; #1;
    check(ecc == 0, "zero word");
    for (int i = 0; i < 32; i++) begin
      data = 32'(1) << i; #1;
      check(ecc == ref_ecc(data), $sformatf("walking one %0d: %h vs %h", i, ecc, ref_ecc(data)));
    end
    for (int c = 0; c < 2000; c++) begin
      data = $urandom; #1;
      check(ecc == ref_ecc(data), $sformatf("random %h", data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
