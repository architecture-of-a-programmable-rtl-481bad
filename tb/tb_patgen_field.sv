// tb_patgen_field: self-checking test of one pattern field.
//
// Loads a random 64-bit pattern, then shifts it with a series of random
// lengths L, each for a random number of whole passes plus checks of every
// bit: the output must be pattern bit (t mod L) and, after whole passes, the
// bits above L must be untouched.  Then checks the loop counter: load,
// decrement to zero, the zero flag, reload.
module tb_patgen_field;
  localparam int unsigned W = 64;

  logic clk = 0, rst_n = 0;
  logic pat_we = 0, loop_we_lo = 0, loop_we_hi = 0;
  logic [2:0] pat_byte = '0;
  logic [7:0] cfg_data = '0;
  logic shift_en = 0, loop_dec = 0, loop_ld = 0;
  logic [W-1:0] len_tap = '0, len_act = '0;
  logic out_bit, loop_zero;
  int checks = 0, failures = 0;

  patgen_field dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
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

  logic [W-1:0] pat;
  int cnt;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pat = {$urandom, $urandom};
    for (int b = 0; b < 8; b++) begin
      pat_we <= 1; pat_byte <= 3'(b); cfg_data <= pat[8 * b +: 8];
      @(posedge clk);
    end
    pat_we <= 0;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      int len, passes;
      len    = (t == 0) ? 64 : $urandom_range(64, 1);
      passes = $urandom_range(3, 1);
      for (int i = 0; i < W; i++) begin
        len_tap[i] = (i == len - 1);
        len_act[i] = (i < len);
      end
      for (int k = 0; k < passes * len; k++) begin
        #1 check(out_bit == pat[k % len], $sformatf("bit %0d of length %0d", k, len));
        shift_en <= 1;
        @(posedge clk);
      end
      shift_en <= 0;
      @(posedge clk);
      #1 check(dut.sr == pat, "content restored after whole passes");
    end

    // Loop counter: 14-bit value 0x2a05 then count down.
    cnt = 'h2a05;
    cfg_data <= 8'h05; loop_we_lo <= 1; @(posedge clk);
    loop_we_lo <= 0; cfg_data <= 8'h2a; loop_we_hi <= 1; @(posedge clk);
    loop_we_hi <= 0; @(posedge clk);
    #1 check(dut.cnt == 14'h2a05 && !loop_zero, "loop counter loaded");
    // reload a small value to keep the run short
    cfg_data <= 8'h00; loop_we_hi <= 1; @(posedge clk);
    cfg_data <= 8'h04; loop_we_hi <= 0; loop_we_lo <= 1; @(posedge clk);
    loop_we_lo <= 0;
    for (int k = 4; k >= 0; k--) begin
      #1 check(loop_zero == (k == 0), $sformatf("loop zero at %0d", k));
      loop_dec <= (k != 0);
      @(posedge clk);
    end
    loop_dec <= 0;
    loop_ld <= 1; @(posedge clk);
    loop_ld <= 0; #1;
    check(!loop_zero && dut.cnt == 14'd4, "loop reload");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
