// patgen_field_len_ctrl: field length control of a PATGEN channel.
//
// Holds one length register per field (value = length minus one, so 0..63
// means 1..64 bits) and decodes the length of the field currently selected
// by the sequencer into the enables of the fields' recirculation
// multiplexors: len_tap is one-hot at bit L-1 and len_act is set for bits
// 0..L-1.  Only the selected field's length is decoded; the decode lines are
// shared by all fields and only the enabled field(s) shift.  len_sel gives
// the same length as a number, for the channel controller's bit counter.
// The registers, the select-driven decode and the shared lines follow the
// architecture; the "minus one" encoding and the thermometer len_act are
// this design's choices.  Writes are synchronous; outputs are combinational
// from sel.
module patgen_field_len_ctrl #(
  parameter int unsigned NUM_FIELDS = 8,
  parameter int unsigned FIELD_W    = 64,
  localparam int unsigned SEL_W     = $clog2(NUM_FIELDS),
  localparam int unsigned LEN_W     = $clog2(FIELD_W)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               len_we,
  input  logic [SEL_W-1:0]   len_idx,
  input  logic [7:0]         cfg_data,
  input  logic [SEL_W-1:0]   sel,
  output logic [LEN_W-1:0]   len_sel,
  output logic [FIELD_W-1:0] len_tap,
  output logic [FIELD_W-1:0] len_act
);

  logic [LEN_W-1:0] len_q [NUM_FIELDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_FIELDS; k++) len_q[k] <= LEN_W'(FIELD_W - 1);
    end else if (len_we) begin
      len_q[len_idx] <= cfg_data[LEN_W-1:0];
    end
  end

  assign len_sel = len_q[sel];

  always_comb begin
    for (int i = 0; i < FIELD_W; i++) begin
      len_tap[i] = (i == int'(len_sel));
      len_act[i] = (i <= int'(len_sel));
    end
  end

  // Exactly one recirculation tap is enabled.
  a_tap_onehot: assert final ($onehot(len_tap));

endmodule
