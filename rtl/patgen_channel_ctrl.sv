// patgen_channel_ctrl: channel controller of a PATGEN channel.
//
// A two-state machine, reset and operating, plus the decode that drives the
// loading and decrementing of the channel's five kinds of counter: the bit
// counter of the field length (kept here), the field loop counters (in the
// fields), the group step counter, the group loop counters and the group
// counter (in the sequencer).  The two states and the five counters are the
// architecture's; the decode below is this design's reading of the looping
// structure (field bits, inside field iterations, inside group slots, inside
// group iterations, inside groups).
//
// In the reset state ld_all reloads every loop counter and the bit counter is
// cleared; go moves the machine to operating and its fall returns it to
// reset.  While operating, each clock with run high emits one pattern bit:
// shift_en shifts the selected field(s), and when the bit counter reaches the
// selected field's length (len_sel, length minus one) the pass ends and the
// counters are stepped.  pat_end is high, combinationally, in the clock that
// emits the last bit of the whole channel pattern.
module patgen_channel_ctrl #(
  parameter int unsigned FIELD_W = 64,
  localparam int unsigned LEN_W  = $clog2(FIELD_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             run,
  // status
  input  logic [LEN_W-1:0] len_sel,
  input  logic             floop_zero,
  input  logic             step_last,
  input  logic             gloop_zero,
  input  logic             grp_last,
  // control
  output patgen_pkg::ch_state_e state,
  output logic             ld_all,
  output logic             shift_en,
  output logic             fld_dec,
  output logic             fld_ld,
  output logic             step_adv,
  output logic             gloop_dec,
  output logic             gloop_ld,
  output logic             grp_adv,
  output logic             pat_end
);
  import patgen_pkg::*;

  logic [LEN_W-1:0] bcnt;
  logic             active, pass_end, grp_done;

  assign active    = (state == CH_OPERATING) && run;
  assign ld_all    = (state == CH_RESET);
  assign shift_en  = active;
  assign pass_end  = active && (bcnt == len_sel);
  assign fld_dec   = pass_end && !floop_zero;
  assign fld_ld    = pass_end && floop_zero;
  assign step_adv  = fld_ld;
  assign grp_done  = fld_ld && step_last;
  assign gloop_dec = grp_done && !gloop_zero;
  assign gloop_ld  = grp_done && gloop_zero;
  assign grp_adv   = gloop_ld;
  assign pat_end   = gloop_ld && grp_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CH_RESET;
      bcnt  <= '0;
    end else begin
      unique case (state)
        CH_RESET:     if (go) state <= CH_OPERATING;
        CH_OPERATING: if (!go) state <= CH_RESET;
        default:      state <= CH_RESET;
      endcase
      if (state == CH_RESET) bcnt <= '0;
      else if (active)       bcnt <= pass_end ? '0 : bcnt + 1'b1;
    end
  end

  // Counters only step in the operating state, and at most one action is
  // taken per counter each clock.
  a_idle_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
                                    state == CH_RESET |-> !(shift_en || fld_dec || step_adv || grp_adv));
  a_field_excl:    assert property (@(posedge clk) disable iff (!rst_n) !(fld_dec && fld_ld));
  a_group_excl:    assert property (@(posedge clk) disable iff (!rst_n) !(gloop_dec && gloop_ld));

endmodule
