// patgen_field: one pattern field of a PATGEN channel.
//
// A field is a cyclic shift register of up to FIELD_W bits plus a LOOP_W-bit
// down counter with its own reload register (the first level of looping).
// Bit 0 of the register is the field's output.  While shift_en is high the
// register moves one place towards bit 0 per clock, and the bit leaving
// position 0 re-enters at position L-1, where L is the active length chosen
// by the field length control: len_tap is one-hot at L-1 and selects the
// recirculation multiplexor there, len_act is set for bits 0..L-1.  Bits at
// and above L hold still, so a field keeps its whole content whatever length
// it is shifted with, and after L shifts it is back where it started; no
// second copy of the pattern is needed.  That recirculating structure is the
// architecture's; holding the unused upper bits is this design's choice.
//
// The loop counter holds "iterations minus one": loop_zero flags the last
// pass.  loop_dec decrements it, loop_ld copies the reload register back.
// Configuration writes a pattern byte (pat_we, pat_byte) or half of the
// reload value (loop_we_lo / loop_we_hi); a reload write also sets the
// counter.  Everything is synchronous to clk with active-low async reset.
module patgen_field #(
  parameter int unsigned FIELD_W = 64,
  parameter int unsigned LOOP_W  = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               pat_we,
  input  logic [2:0]         pat_byte,
  input  logic               loop_we_lo,
  input  logic               loop_we_hi,
  input  logic [7:0]         cfg_data,
  // operation
  input  logic               shift_en,
  input  logic [FIELD_W-1:0] len_tap,
  input  logic [FIELD_W-1:0] len_act,
  input  logic               loop_dec,
  input  logic               loop_ld,
  output logic               out_bit,
  output logic               loop_zero
);

  logic [FIELD_W-1:0] sr;
  logic [LOOP_W-1:0]  cnt, rld;

  // Next value of the shift register when shifting.
  logic [FIELD_W-1:0] sr_shift;
  always_comb begin
    for (int i = 0; i < FIELD_W; i++) begin
      if (!len_act[i])     sr_shift[i] = sr[i];
      else if (len_tap[i]) sr_shift[i] = sr[0];
      else if (i + 1 < FIELD_W) sr_shift[i] = sr[(i + 1) % FIELD_W];
      else                 sr_shift[i] = sr[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else if (pat_we) begin
      for (int b = 0; b < 8; b++)
        if (8 * int'(pat_byte) + b < FIELD_W) sr[8 * int'(pat_byte) + b] <= cfg_data[b];
    end else if (shift_en) begin
      sr <= sr_shift;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rld <= '0;
      cnt <= '0;
    end else if (loop_we_lo || loop_we_hi) begin
      logic [LOOP_W-1:0] v;
      v = rld;
      for (int b = 0; b < 8; b++) begin
        if (loop_we_lo && b < LOOP_W)     v[b]     = cfg_data[b];
        if (loop_we_hi && b + 8 < LOOP_W) v[b + 8] = cfg_data[b];
      end
      rld <= v;
      cnt <= v;
    end else if (loop_ld) begin
      cnt <= rld;
    end else if (loop_dec) begin
      cnt <= cnt - 1'b1;
    end
  end

  assign out_bit   = sr[0];
  assign loop_zero = (cnt == '0);

endmodule
