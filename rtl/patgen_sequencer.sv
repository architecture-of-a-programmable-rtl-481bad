// patgen_sequencer: second level of looping of a PATGEN channel.
//
// Four groups, each made of three 4-bit cyclic shift registers.  Register b
// of a group holds bit b of up to four 3-bit field numbers, so position 0 of
// the three registers is the field number the group currently selects.  Each
// group also has a length register (how many of its four slots are used), a
// step counter that tracks the rotation, and a LOOP_W-bit loop counter with
// reload register (the group's iteration count).  A group counter picks the
// active group, and a 4-way 3-bit multiplexor brings its field number out as
// sel.  The sequence length register says how many groups are chained.
// These parts follow the architecture's sequencer; the "minus one" encoding
// of lengths and counts and the exact strobe set are this design's choices.
//
// Strobes from the channel controller act on the active group: step_adv
// rotates its registers by one slot within its length (after "length"
// rotations they are back in their loaded order), gloop_dec / gloop_ld
// decrement or reload its loop counter, grp_adv moves to the next group or
// wraps to group 0 after the last one.  ld_all reloads every loop counter and
// returns to group 0 and slot 0; it is used only before operation starts,
// right after configuration.  Status outputs are combinational.
module patgen_sequencer #(
  parameter int unsigned NUM_GROUPS  = 4,
  parameter int unsigned GROUP_STEPS = 4,
  parameter int unsigned LOOP_W      = 14,
  parameter int unsigned SEL_W       = 3,
  localparam int unsigned GW = $clog2(NUM_GROUPS),
  localparam int unsigned SW = $clog2(GROUP_STEPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             gsel_we,     // field numbers of one group, two slots per byte
  input  logic [GW-1:0]    gsel_grp,
  input  logic             gsel_half,   // 0: slots 0,1   1: slots 2,3
  input  logic             gloop_we_lo,
  input  logic             gloop_we_hi,
  input  logic [GW-1:0]    gloop_grp,
  input  logic             glen_we,     // lengths of all groups, 2 bits each
  input  logic             seq_we,      // sequence length in bits 1:0
  input  logic [7:0]       cfg_data,
  // control from the channel controller
  input  logic             ld_all,
  input  logic             step_adv,
  input  logic             gloop_dec,
  input  logic             gloop_ld,
  input  logic             grp_adv,
  // status
  output logic [SEL_W-1:0] sel,
  output logic             step_last,
  output logic             gloop_zero,
  output logic             grp_last,
  output logic [GW-1:0]    grp
);

  logic [GROUP_STEPS-1:0] sreg    [NUM_GROUPS][SEL_W];
  logic [SW-1:0]          glen    [NUM_GROUPS];
  logic [SW-1:0]          step    [NUM_GROUPS];
  logic [LOOP_W-1:0]      gcnt    [NUM_GROUPS];
  logic [LOOP_W-1:0]      grld    [NUM_GROUPS];
  logic [GW-1:0]          seq_len;

  // Field number selection: the 4(3:1) multiplexor over the groups' slot 0.
  always_comb begin
    for (int b = 0; b < SEL_W; b++) sel[b] = sreg[grp][b][0];
  end

  assign step_last  = (step[grp] == glen[grp]);
  assign gloop_zero = (gcnt[grp] == '0);
  assign grp_last   = (grp == seq_len);

  // Cyclic shift registers and step counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NUM_GROUPS; g++) begin
        for (int b = 0; b < SEL_W; b++) sreg[g][b] <= '0;
        step[g] <= '0;
        glen[g] <= '0;
      end
    end else begin
      if (gsel_we) begin
        for (int b = 0; b < SEL_W; b++) begin
          sreg[gsel_grp][b][2 * gsel_half]     <= cfg_data[b];
          sreg[gsel_grp][b][2 * gsel_half + 1] <= cfg_data[4 + b];
        end
        step[gsel_grp] <= '0;
      end else if (step_adv) begin
        for (int b = 0; b < SEL_W; b++)
          for (int i = 0; i < GROUP_STEPS; i++) begin
            if (i == int'(glen[grp]))     sreg[grp][b][i] <= sreg[grp][b][0];
            else if (i < int'(glen[grp])) sreg[grp][b][i] <= sreg[grp][b][(i + 1) % GROUP_STEPS];
          end
        step[grp] <= step_last ? '0 : step[grp] + 1'b1;
      end else if (ld_all) begin
        for (int g = 0; g < NUM_GROUPS; g++) step[g] <= '0;
      end
      if (glen_we)
        for (int g = 0; g < NUM_GROUPS; g++) glen[g] <= cfg_data[2 * g +: SW];
    end
  end

  // Group loop counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NUM_GROUPS; g++) begin
        gcnt[g] <= '0;
        grld[g] <= '0;
      end
    end else if (gloop_we_lo || gloop_we_hi) begin
      logic [LOOP_W-1:0] v;
      v = grld[gloop_grp];
      for (int b = 0; b < 8; b++) begin
        if (gloop_we_lo && b < LOOP_W)     v[b]     = cfg_data[b];
        if (gloop_we_hi && b + 8 < LOOP_W) v[b + 8] = cfg_data[b];
      end
      grld[gloop_grp] <= v;
      gcnt[gloop_grp] <= v;
    end else if (ld_all) begin
      for (int g = 0; g < NUM_GROUPS; g++) gcnt[g] <= grld[g];
    end else if (gloop_ld) begin
      gcnt[grp] <= grld[grp];
    end else if (gloop_dec) begin
      gcnt[grp] <= gcnt[grp] - 1'b1;
    end
  end

  // Group counter and sequence length register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp     <= '0;
      seq_len <= '0;
    end else begin
      if (seq_we) seq_len <= cfg_data[GW-1:0];
      if (ld_all)       grp <= '0;
      else if (grp_adv) grp <= grp_last ? '0 : grp + 1'b1;
    end
  end

endmodule
