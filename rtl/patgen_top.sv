// patgen_top: the PATGEN programmable pattern generator chip.
//
// Eight identical channels generate clock and control patterns, one bit per
// clock each, from patterns loaded out of an external byte-wide PROM at
// start-up.  Each channel has eight fields of up to 64 bits, each repeated
// up to 16K times, chained by a sequencer into up to four groups of up to
// four fields, each group repeated up to 16K times; a whole pattern is
// single shot or continuous.  The chip controller runs configuration,
// start/stop and BIST; the parity block XORs the channel outputs; the bit
// error block checks each channel's pattern parity against a stored bit.
// That partitioning is the architecture's.
//
// Pins: pat_o/pat_oe carry each channel's value and its driver enable (the
// tri-state pads themselves are outside this RTL; pat_oe low means high
// impedance).  The PROM address bus is brought out as a driven value,
// prom_addr_o with enable prom_addr_oe (master only), and the bus as seen by
// the chip, prom_addr_i, so masters and slaves can share one PROM; chip_id
// says which PROM segment a chip loads.  pend pulses high while the last bit
// of channel 0's pattern is on the pins.  All outputs are registered or
// decoded from registers, one clock after the cycle that produced them.
module patgen_top #(
  parameter int unsigned FIELD_W = patgen_pkg::FIELD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ms,
  input  logic                 bist,
  input  logic                 begin_init,
  input  logic                 pstart,
  input  logic                 pen,
  input  logic [patgen_pkg::CHIP_ID_W-1:0] chip_id,
  output logic [patgen_pkg::PROM_AW-1:0]   prom_addr_o,
  output logic                 prom_addr_oe,
  input  logic [patgen_pkg::PROM_AW-1:0]   prom_addr_i,
  input  logic [7:0]           prom_data_i,
  output logic [patgen_pkg::NUM_CH-1:0]    pat_o,
  output logic [patgen_pkg::NUM_CH-1:0]    pat_oe,
  output logic                 pend,
  output logic                 parity,
  output logic                 bit_error,
  output logic                 init_done
);
  import patgen_pkg::*;

  cfg_wr_t           cfg;
  logic              ch_go, run, chip_oe;
  logic [NUM_CH-1:0] ch_o, ch_oe, ch_end, ch_last, ch_valid;

  patgen_chip_ctrl u_ctrl (
    .clk, .rst_n, .ms, .bist, .begin_init, .pstart, .pen, .chip_id,
    .prom_addr_o, .prom_addr_oe, .prom_addr_i, .prom_data_i,
    .ch0_pat_end(ch_end[0]),
    .cfg, .ch_go, .run, .chip_oe, .bist_mode(), .pend, .init_done, .state()
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    patgen_channel #(.FIELD_W(FIELD_W)) u_ch (
      .clk, .rst_n,
      .cfg_we   (cfg.we && cfg.ch == 3'(c)),
      .cfg_addr (cfg.addr),
      .cfg_data (cfg.data),
      .go       (ch_go),
      .run      (run),
      .pat_o    (ch_o[c]),
      .pat_oe   (ch_oe[c]),
      .pat_end  (ch_end[c]),
      .pat_last (ch_last[c]),
      .out_valid(ch_valid[c]),
      .mask_mode()
    );
  end

  patgen_parity #(.NUM_CH(NUM_CH)) u_par (
    .pat_d(ch_o), .valid(ch_valid[0]), .parity
  );

  patgen_bit_error #(.NUM_CH(NUM_CH)) u_berr (
    .clk, .rst_n, .cfg, .clr(!ch_go),
    .pat_d(ch_o), .out_valid(ch_valid), .pat_last(ch_last),
    .ch_err(), .bit_error
  );

  // Chip enable logic: the pins are driven only outside BIST mode.
  assign pat_o  = ch_o;
  assign pat_oe = ch_oe & {NUM_CH{chip_oe}};

endmodule
