// patgen_mux_oe: output multiplexor and output enable of a PATGEN channel.
//
// Binary mode (mask bit clear): the field number sel from the sequencer picks
// one of the eight fields, whose bit drives the pin, and the pin is always
// driven.  Mask mode (mask bit set): the upper four fields carry the high/low
// value and the lower four say when the pin is tri-stated, so a pattern is at
// most four fields long.  Both modes and the upper/lower split are the
// architecture's.  This design pairs field k (k = 0..3) with field k+4: a
// field number s selects data from field {1,s[1:0]} and the tri-state flag
// from field {0,s[1:0]}, a flag bit of 1 meaning high impedance.  fld_en
// tells which fields shift (the selected one, or both of a pair).
//
// The pin value and its enable are registered: pat_o/pat_oe change on the
// clock edge after a cycle with adv high, and hold otherwise.  The mask bit
// is written by configuration (mode_we, bit 2 of the mode byte).
module patgen_mux_oe #(
  parameter int unsigned NUM_FIELDS = 8,
  localparam int unsigned SEL_W     = $clog2(NUM_FIELDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  mode_we,
  input  logic [7:0]            cfg_data,
  input  logic [NUM_FIELDS-1:0] fld_bit,
  input  logic [SEL_W-1:0]      sel,
  input  logic                  adv,
  output logic [NUM_FIELDS-1:0] fld_en,
  output logic                  mask_mode,
  output logic                  pat_o,
  output logic                  pat_oe
);

  logic [SEL_W-1:0] data_idx, flag_idx;
  logic             d_next, oe_next;

  always_comb begin
    data_idx = sel;
    flag_idx = sel;
    data_idx[SEL_W-1] = 1'b1;
    flag_idx[SEL_W-1] = 1'b0;
    fld_en = '0;
    if (mask_mode) begin
      fld_en[data_idx] = 1'b1;
      fld_en[flag_idx] = 1'b1;
      d_next  = fld_bit[data_idx];
      oe_next = !fld_bit[flag_idx];
    end else begin
      fld_en[sel] = 1'b1;
      d_next  = fld_bit[sel];
      oe_next = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_mode <= 1'b0;
      pat_o     <= 1'b0;
      pat_oe    <= 1'b0;
    end else begin
      if (mode_we) mask_mode <= cfg_data[2];
      if (adv) begin
        pat_o  <= d_next;
        pat_oe <= oe_next;
      end
    end
  end

endmodule
