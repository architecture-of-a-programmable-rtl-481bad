// tb_patgen_bit_error: self-checking test of the bit error block.
//
// Writes a stored parity bit per channel through configuration writes, then
// streams random data with random pattern ends on each channel.  A model
// here keeps each channel's running parity and sticky error; the block's
// per-channel flags and the ORed bit_error are compared every clock.  Some
// patterns are built to match the stored bit and some not, so both outcomes
// occur.
module tb_patgen_bit_error;
  import patgen_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg = '0;
  logic clr = 1;
  logic [7:0] pat_d = '0, out_valid = '0, pat_last = '0, ch_err;
  logic bit_error;
  int checks = 0, failures = 0;

  patgen_bit_error dut (.*);

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

  bit [7:0] stored, acc, err;
  int nerr_ends = 0, ok_ends = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    stored = 8'($urandom);
    for (int c = 0; c < 8; c++) begin
      cfg <= '{we: 1'b1, ch: 3'(c), addr: 7'(OFS_MODE), data: {4'h0, stored[c], 3'($urandom)}};
      @(posedge clk);
      // a write to another address must not change the stored bit
      cfg <= '{we: 1'b1, ch: 3'(c), addr: 7'(OFS_GLEN), data: 8'hff};
      @(posedge clk);
    end
    cfg <= '0;
    clr <= 0;
    acc = 0; err = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] d, v, l;
      d = 8'($urandom); v = 8'($urandom) | 8'h0f; l = 8'($urandom) & 8'($urandom) & 8'($urandom);
      // during the first half, force matching parity at every pattern end
      if (t < 1500)
        for (int c = 0; c < 8; c++) if (v[c] && l[c]) d[c] = acc[c] ^ stored[c];
      pat_d <= d; out_valid <= v; pat_last <= l;
      @(posedge clk);
      for (int c = 0; c < 8; c++)
        if (v[c]) begin
          if (l[c]) begin
            if ((acc[c] ^ d[c]) != stored[c]) begin err[c] = 1; nerr_ends++; end
            else ok_ends++;
            acc[c] = 0;
          end else acc[c] ^= d[c];
        end
      #1;
      check(ch_err == err, "per-channel error flags");
      check(bit_error == (err != 0), "bit error");
      if (t == 1499) check(err == 0, "no error while parity matches");
    end
    check(nerr_ends > 0 && ok_ends > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
