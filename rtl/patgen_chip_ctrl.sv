// patgen_chip_ctrl: chip controller of the PATGEN pattern generator.
//
// Holds the chip enable logic, the PROM address generator and the chip state
// machine, whose behaviour is set by the levels on M/S, BIST, Begin_Init,
// PStart and PEN, as in the architecture.  The sequence of states and the
// PROM protocol are this design's reading of it:
//   RESET   after reset, waiting for Begin_Init.  BIST is sampled while the
//           reset input is low ("held high during a chip reset").
//   HEADER  (master only) Begin_Init started configuration; the master puts
//           address 0 on the PROM bus and reads the number of chips minus one.
//   LOAD    the master steps the PROM address by one per clock up to the end
//           of the last chip's image.  Every chip, master or slave, watches
//           the address bus (prom_addr_i) and copies the bytes of its own
//           1024-byte segment, chosen by its chip_id pins, into its channels.
//           A slave leaves LOAD after its last byte, the master after the
//           last byte of all images, when it also releases the bus.
//   READY   configured; channels are held ready, waiting for a rising PStart.
//   RUN     channels run one bit per clock.  When channel 0 ends its pattern
//           PEND pulses; if PEN is high the pattern continues (continuous
//           mode), otherwise the chip returns to READY (single shot).
// The PROM is read asynchronously: the byte for the address on the bus is
// sampled at the next clock edge, so configuration takes one clock per byte.
// Configuration writes leave this block registered (cfg), one clock later.
// In BIST mode the pattern pins are disabled (chip_oe low); the patterns are
// generated as usual and the parity output serves as pass/fail.
module patgen_chip_ctrl
  import patgen_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ms,          // 1 = master
  input  logic                 bist,
  input  logic                 begin_init,
  input  logic                 pstart,
  input  logic                 pen,
  input  logic [CHIP_ID_W-1:0] chip_id,
  output logic [PROM_AW-1:0]   prom_addr_o,
  output logic                 prom_addr_oe,
  input  logic [PROM_AW-1:0]   prom_addr_i,
  input  logic [7:0]           prom_data_i,
  input  logic                 ch0_pat_end,
  output cfg_wr_t              cfg,
  output logic                 ch_go,
  output logic                 run,
  output logic                 chip_oe,
  output logic                 bist_mode,
  output logic                 pend,
  output logic                 init_done,
  output chip_state_e          state
);

  localparam int unsigned SEG_W = $clog2(CHIP_IMG);

  logic [PROM_AW-1:0]   addr_q, seg_base, seg_last, all_last, ofs;
  logic [CHIP_ID_W-1:0] nchips_m1;
  logic                 pstart_q, in_seg;

  assign seg_base = PROM_AW'(1 + CHIP_IMG * int'(chip_id));
  assign seg_last = PROM_AW'(CHIP_IMG * (int'(chip_id) + 1));
  assign all_last = PROM_AW'(CHIP_IMG * (int'(nchips_m1) + 1));
  assign ofs      = prom_addr_i - seg_base;
  assign in_seg   = (prom_addr_i >= seg_base) && (prom_addr_i <= seg_last);

  assign prom_addr_o  = addr_q;
  assign prom_addr_oe = ms && (state == CHIP_HEADER || state == CHIP_LOAD);
  assign ch_go        = (state == CHIP_READY) || (state == CHIP_RUN);
  assign run          = (state == CHIP_RUN);
  assign chip_oe      = !bist_mode;
  assign init_done    = ch_go;

  // BIST is sampled on every clock while the chip is held in reset (the
  // clock must run during reset) and kept until the next reset.  This is the
  // one place where rst_n is used as a synchronous input: it acts here as the
  // load enable of the BIST latch, not as its reset.
  always_ff @(posedge clk) begin
    if (!rst_n) bist_mode <= bist;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CHIP_RESET;
      addr_q    <= '0;
      nchips_m1 <= '0;
      pstart_q  <= 1'b0;
      pend      <= 1'b0;
      cfg       <= '0;
    end else begin
      pstart_q <= pstart;
      pend     <= run && ch0_pat_end;
      cfg      <= '0;
      if (state == CHIP_LOAD && in_seg) begin
        cfg.we   <= 1'b1;
        cfg.ch   <= ofs[SEG_W-1:CFG_AW];
        cfg.addr <= ofs[CFG_AW-1:0];
        cfg.data <= prom_data_i;
      end
      unique case (state)
        CHIP_RESET: begin
          addr_q    <= '0;
          if (begin_init) state <= ms ? CHIP_HEADER : CHIP_LOAD;
        end
        CHIP_HEADER: begin
          nchips_m1 <= prom_data_i[CHIP_ID_W-1:0];
          addr_q    <= PROM_AW'(1);
          state     <= CHIP_LOAD;
        end
        CHIP_LOAD: begin
          if (ms) begin
            addr_q <= addr_q + 1'b1;
            if (addr_q == all_last) state <= CHIP_READY;
          end else if (prom_addr_i == seg_last) begin
            state <= CHIP_READY;
          end
        end
        CHIP_READY: if (pstart && !pstart_q) state <= CHIP_RUN;
        CHIP_RUN:   if (ch0_pat_end && !pen) state <= CHIP_READY;
        default:    state <= CHIP_RESET;
      endcase
    end
  end

  // Only a master ever drives the PROM address bus, and configuration
  // writes happen only while loading.
  a_addr_master: assert property (@(posedge clk) disable iff (!rst_n) prom_addr_oe |-> ms);
  a_cfg_in_load: assert property (@(posedge clk) disable iff (!rst_n)
                                  cfg.we |-> $past(state) == CHIP_LOAD);

endmodule
