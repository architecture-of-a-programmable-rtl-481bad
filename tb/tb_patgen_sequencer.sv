// tb_patgen_sequencer: self-checking test of the sequencer.
//
// Configures random groups (field numbers, lengths, loop counts, sequence
// length), then plays the channel controller's part with one clock per
// field pass: each clock it checks the selected field number and the status
// flags against a list built here from the looping rule, and issues the
// strobes that list calls for.  Two whole sequences are checked per
// configuration, so the wrap-around to group 0 is covered too.
module tb_patgen_sequencer;
  logic clk = 0, rst_n = 0;
  logic gsel_we = 0, gsel_half = 0, gloop_we_lo = 0, gloop_we_hi = 0, glen_we = 0, seq_we = 0;
  logic [1:0] gsel_grp = '0, gloop_grp = '0;
  logic [7:0] cfg_data = '0;
  logic ld_all = 0, step_adv = 0, gloop_dec = 0, gloop_ld = 0, grp_adv = 0;
  logic [2:0] sel;
  logic step_last, gloop_zero, grp_last;
  logic [1:0] grp;
  int checks = 0, failures = 0;

  patgen_sequencer dut (.*);

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

  typedef struct { int f; bit last_slot; bit last_iter; bit last_grp; } ev_t;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int fld [4][4];
      int glen [4], gl [4], nseq;
      ev_t ev[$];
      ev.delete();
      nseq = $urandom_range(4, 1);
      for (int g = 0; g < 4; g++) begin
        glen[g] = $urandom_range(4, 1);
        gl[g]   = (t == 0 && g == 0) ? 1 : $urandom_range(4, 1);
        for (int s = 0; s < 4; s++) fld[g][s] = $urandom_range(7, 0);
        for (int h = 0; h < 2; h++) begin
          gsel_we <= 1; gsel_grp <= 2'(g); gsel_half <= 1'(h);
          cfg_data <= {1'b0, 3'(fld[g][2 * h + 1]), 1'b0, 3'(fld[g][2 * h])};
          @(posedge clk);
        end
        gsel_we <= 0;
        gloop_we_lo <= 1; gloop_grp <= 2'(g); cfg_data <= 8'(gl[g] - 1); @(posedge clk);
        gloop_we_lo <= 0; gloop_we_hi <= 1; cfg_data <= 8'h00; @(posedge clk);
        gloop_we_hi <= 0;
      end
      glen_we <= 1;
      cfg_data <= {2'(glen[3] - 1), 2'(glen[2] - 1), 2'(glen[1] - 1), 2'(glen[0] - 1)};
      @(posedge clk);
      glen_we <= 0; seq_we <= 1; cfg_data <= 8'(nseq - 1); @(posedge clk);
      seq_we <= 0; ld_all <= 1; @(posedge clk);
      ld_all <= 0;
      for (int g = 0; g < nseq; g++)
        for (int r = 0; r < gl[g]; r++)
          for (int s = 0; s < glen[g]; s++)
            ev.push_back('{fld[g][s], s == glen[g] - 1, r == gl[g] - 1, g == nseq - 1});
      for (int k = 0; k < 2 * ev.size(); k++) begin
        ev_t e;
        e = ev[k % ev.size()];
        #1;
        check(sel == 3'(e.f), $sformatf("field number, config %0d step %0d", t, k));
        check(step_last == e.last_slot, "last slot flag");
        if (e.last_slot) check(gloop_zero == e.last_iter, "group loop zero flag");
        if (e.last_slot && e.last_iter) check(grp_last == e.last_grp, "last group flag");
        step_adv  <= 1;
        gloop_dec <= e.last_slot && !e.last_iter;
        gloop_ld  <= e.last_slot && e.last_iter;
        grp_adv   <= e.last_slot && e.last_iter;
        @(posedge clk);
        step_adv <= 0; gloop_dec <= 0; gloop_ld <= 0; grp_adv <= 0;
        // an idle clock between passes
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
