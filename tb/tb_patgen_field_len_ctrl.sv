// tb_patgen_field_len_ctrl: self-checking test of the field length control.
//
// Writes a random length into each of the eight length registers and, for
// every field select, compares the length output and both decoded enable
// vectors (one-hot tap at L-1, thermometer 0..L-1) with values computed here.
module tb_patgen_field_len_ctrl;
  logic clk = 0, rst_n = 0;
  logic len_we = 0;
  logic [2:0] len_idx = '0, sel = '0;
  logic [7:0] cfg_data = '0;
  logic [5:0] len_sel;
  logic [63:0] len_tap, len_act;
  int checks = 0, failures = 0;
  int lens [8];

  patgen_field_len_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 8; k++) begin
        lens[k] = (r == 0) ? k * 9 : $urandom_range(63, 0);
        len_we <= 1; len_idx <= 3'(k); cfg_data <= {2'($urandom), 6'(lens[k])};
        @(posedge clk);
      end
      len_we <= 0;
      for (int k = 0; k < 8; k++) begin
        logic [63:0] tap, act;
        sel <= 3'(k);
        @(posedge clk);
        #1;
        tap = 64'd1 << lens[k];
        act = (64'd1 << lens[k]) | ((64'd1 << lens[k]) - 64'd1);
        check(len_sel == 6'(lens[k]), "length");
        check(len_tap == tap, "tap decode");
        check(len_act == act, "active decode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
