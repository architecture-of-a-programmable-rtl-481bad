// patgen_channel: one output channel of the PATGEN pattern generator.
//
// Built as in the architecture from a channel controller, eight fields, the
// field length control, the sequencer and the output mux / output enable.
// The sequencer's field number (sel) selects which field shifts, which
// length is decoded for the fields' recirculation muxes and which field
// drives the pin.  One pattern bit is produced per clock while run is high
// and the controller is operating.  The channel pattern is:
//   for each group g up to the sequence length,
//     repeat the group's loop count times,
//       for each of the group's slots (its length),
//         repeat the selected field's loop count times,
//           emit the field's bits 0..length-1.
//
// Configuration is a byte write into the 128-byte channel image described in
// patgen_pkg (the layout is this design's choice).  The pin (pat_o, pat_oe)
// is registered, so it shows a bit one clock after the cycle that selected
// it; pat_end marks, combinationally, the cycle that selects the last bit of
// the pattern, and pat_last is its registered copy, high while that last bit
// is on the pin.  out_valid is high while the pin shows a freshly emitted bit.
module patgen_channel #(
  parameter int unsigned FIELD_W = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic [6:0] cfg_addr,
  input  logic [7:0] cfg_data,
  input  logic       go,
  input  logic       run,
  output logic       pat_o,
  output logic       pat_oe,
  output logic       pat_end,
  output logic       pat_last,
  output logic       out_valid,
  output logic       mask_mode
);
  import patgen_pkg::*;

  localparam int unsigned LW = $clog2(FIELD_W);

  // Configuration decode.
  logic       pat_we, len_we, floop_we, gsel_we, gloop_we, glen_we, mode_we;
  always_comb begin
    pat_we   = cfg_we && (cfg_addr < 7'(OFS_LEN));
    len_we   = cfg_we && (cfg_addr >= 7'(OFS_LEN))   && (cfg_addr < 7'(OFS_FLOOP));
    floop_we = cfg_we && (cfg_addr >= 7'(OFS_FLOOP)) && (cfg_addr < 7'(OFS_GSEL));
    gsel_we  = cfg_we && (cfg_addr >= 7'(OFS_GSEL))  && (cfg_addr < 7'(OFS_GLOOP));
    gloop_we = cfg_we && (cfg_addr >= 7'(OFS_GLOOP)) && (cfg_addr < 7'(OFS_GLEN));
    glen_we  = cfg_we && (cfg_addr == 7'(OFS_GLEN));
    mode_we  = cfg_we && (cfg_addr == 7'(OFS_MODE));
  end
  logic [6:0] floop_ofs;
  assign floop_ofs = cfg_addr - 7'(OFS_FLOOP);

  // Interconnect.
  logic [SEL_W-1:0]   sel;
  logic [LW-1:0]      len_sel;
  logic [FIELD_W-1:0] len_tap, len_act;
  logic [NUM_FIELDS-1:0] fld_bit, fld_zero, fld_en;
  logic step_last, gloop_zero, grp_last;
  logic ld_all, shift_en, fld_dec, fld_ld, step_adv, gloop_dec, gloop_ld, grp_adv;
  logic [1:0] grp;
  ch_state_e state;

  patgen_channel_ctrl #(.FIELD_W(FIELD_W)) u_ctrl (
    .clk, .rst_n, .go, .run,
    .len_sel, .floop_zero(fld_zero[sel]), .step_last, .gloop_zero, .grp_last,
    .state, .ld_all, .shift_en, .fld_dec, .fld_ld, .step_adv,
    .gloop_dec, .gloop_ld, .grp_adv, .pat_end
  );

  for (genvar k = 0; k < NUM_FIELDS; k++) begin : g_field
    patgen_field #(.FIELD_W(FIELD_W), .LOOP_W(LOOP_W)) u_field (
      .clk, .rst_n,
      .pat_we     (pat_we && cfg_addr[5:3] == 3'(k)),
      .pat_byte   (cfg_addr[2:0]),
      .loop_we_lo (floop_we && floop_ofs[3:1] == 3'(k) && !floop_ofs[0]),
      .loop_we_hi (floop_we && floop_ofs[3:1] == 3'(k) &&  floop_ofs[0]),
      .cfg_data,
      .shift_en   (shift_en && fld_en[k]),
      .len_tap, .len_act,
      .loop_dec   (fld_dec && sel == 3'(k)),
      .loop_ld    (ld_all || (fld_ld && sel == 3'(k))),
      .out_bit    (fld_bit[k]),
      .loop_zero  (fld_zero[k])
    );
  end

  patgen_field_len_ctrl #(.NUM_FIELDS(NUM_FIELDS), .FIELD_W(FIELD_W)) u_len (
    .clk, .rst_n, .len_we, .len_idx(cfg_addr[2:0]), .cfg_data,
    .sel, .len_sel, .len_tap, .len_act
  );

  patgen_sequencer #(.NUM_GROUPS(NUM_GROUPS), .GROUP_STEPS(GROUP_STEPS),
                     .LOOP_W(LOOP_W), .SEL_W(SEL_W)) u_seq (
    .clk, .rst_n,
    .gsel_we, .gsel_grp(cfg_addr[2:1]), .gsel_half(cfg_addr[0]),
    .gloop_we_lo(gloop_we && !cfg_addr[0]), .gloop_we_hi(gloop_we && cfg_addr[0]),
    .gloop_grp(cfg_addr[2:1]),
    .glen_we, .seq_we(mode_we), .cfg_data,
    .ld_all, .step_adv, .gloop_dec, .gloop_ld, .grp_adv,
    .sel, .step_last, .gloop_zero, .grp_last, .grp
  );

  patgen_mux_oe #(.NUM_FIELDS(NUM_FIELDS)) u_mux (
    .clk, .rst_n, .mode_we, .cfg_data,
    .fld_bit, .sel, .adv(shift_en), .fld_en, .mask_mode, .pat_o, .pat_oe
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_last  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      pat_last  <= pat_end;
      out_valid <= shift_en;
    end
  end

endmodule
