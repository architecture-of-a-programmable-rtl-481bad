// tb_patgen_parity: self-checking test of the cross-channel parity.
//
// Random channel bits with valid high and low; the parity must be the count
// of ones modulo two when valid, and 0 otherwise.
module tb_patgen_parity;
  logic [7:0] pat_d = '0;
  logic valid = 0, parity;
  int checks = 0, failures = 0;

  patgen_parity dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int ones;
      pat_d = (t < 256) ? 8'(t) : 8'($urandom);
      valid = (t < 256) ? 1'b1 : 1'($urandom);
      ones = $countones(pat_d);
      #1;
      checks++;
      if (parity != (valid && (ones % 2 == 1))) begin
        failures++;
        if (failures < 10) $display("FAIL parity of %b", pat_d);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
