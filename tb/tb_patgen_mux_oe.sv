// tb_patgen_mux_oe: self-checking test of the output mux and output enable.
//
// Drives random field bits and field numbers in binary and in mask mode and
// checks the registered pin value and enable one clock later, the hold when
// adv is low, and the field enables (one field, or the pair k / k+4).
module tb_patgen_mux_oe;
  logic clk = 0, rst_n = 0;
  logic mode_we = 0, adv = 0;
  logic [7:0] cfg_data = '0, fld_bit = '0, fld_en;
  logic [2:0] sel = '0;
  logic mask_mode, pat_o, pat_oe;
  int checks = 0, failures = 0;

  patgen_mux_oe dut (.*);

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
    for (int m = 0; m < 2; m++) begin
      mode_we <= 1; cfg_data <= m ? 8'h04 : 8'hfb;
      @(posedge clk);
      mode_we <= 0;
      @(posedge clk);
      #1 check(mask_mode == 1'(m), "mode bit");
      for (int t = 0; t < 200; t++) begin
        logic [7:0] b;
        logic [2:0] s;
        logic ed, eoe, pd, poe, a;
        logic [7:0] een;
        b = 8'($urandom); s = 3'($urandom); a = 1'($urandom);
        fld_bit <= b; sel <= s; adv <= a;
        pd = pat_o; poe = pat_oe;
        if (m == 1) begin
          ed = b[{1'b1, s[1:0]}]; eoe = !b[{1'b0, s[1:0]}];
          een = (8'd1 << {1'b1, s[1:0]}) | (8'd1 << {1'b0, s[1:0]});
        end else begin
          ed = b[s]; eoe = 1'b1; een = 8'd1 << s;
        end
        #1 check(fld_en == een, "field enables");
        @(posedge clk);
        #1;
        if (a) check(pat_o == ed && pat_oe == eoe, "pin value");
        else   check(pat_o == pd && pat_oe == poe, "pin hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
