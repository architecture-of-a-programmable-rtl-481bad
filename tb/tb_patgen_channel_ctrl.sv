// tb_patgen_channel_ctrl: self-checking test of the channel controller.
//
// Drives random status flags (selected length, field / group loop zero, last
// slot, last group) and random run / go levels, and compares every control
// strobe and the state with a model kept here: a bit counter that runs from
// 0 to the selected length while operating, and the looping rule that says
// which counter is stepped at the end of a field pass.
module tb_patgen_channel_ctrl;
  import patgen_pkg::*;
  logic clk = 0, rst_n = 0;
  logic go = 0, run = 0;
  logic [5:0] len_sel = '0;
  logic floop_zero = 0, step_last = 0, gloop_zero = 0, grp_last = 0;
  ch_state_e state;
  logic ld_all, shift_en, fld_dec, fld_ld, step_adv, gloop_dec, gloop_ld, grp_adv, pat_end;
  int checks = 0, failures = 0;

  patgen_channel_ctrl dut (.*);

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

  int  bcnt = 0;
  bit  oper = 0;
  int  ends = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit a, pe;
      go         <= (t % 5000) > 20;
      run        <= ($urandom_range(7, 0) != 0);
      len_sel    <= 6'($urandom_range(3, 0));
      floop_zero <= 1'($urandom);
      step_last  <= 1'($urandom);
      gloop_zero <= 1'($urandom);
      grp_last   <= 1'($urandom);
      #1;
      a  = oper && run;
      pe = a && (bcnt == int'(len_sel));
      check(state == (oper ? CH_OPERATING : CH_RESET), "state");
      check(ld_all == !oper && shift_en == a, "ld_all / shift_en");
      check(fld_dec == (pe && !floop_zero) && fld_ld == (pe && floop_zero), "field loop strobes");
      check(step_adv == (pe && floop_zero), "step strobe");
      check(gloop_dec == (pe && floop_zero && step_last && !gloop_zero), "group loop decrement");
      check(gloop_ld == (pe && floop_zero && step_last && gloop_zero) && grp_adv == gloop_ld, "group reload / advance");
      check(pat_end == (pe && floop_zero && step_last && gloop_zero && grp_last), "pattern end");
      if (pat_end) ends++;
      @(posedge clk);
      if (!oper) bcnt = 0;
      else if (a) bcnt = pe ? 0 : (bcnt + 1) % 64;
      oper = go;
    end
    check(ends > 0, "pattern end seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
