// tb_patgen_chip_ctrl: self-checking test of the chip controller.
//
// A behavioural PROM (combinational read) holds a header saying there are
// two chips and random bytes for both.  Two controllers share the address
// bus: chip 0 is the master, chip 1 a slave.  Checks: the master walks every
// address once, one per clock, and releases the bus; each chip emits exactly
// the configuration writes of its own segment, in order, with the right
// channel and offset; both reach READY; a PStart rising edge starts RUN;
// with PEN high a channel-0 pattern end keeps RUN and pulses PEND, with PEN
// low it returns to READY; BIST sampled during reset turns chip_oe off.
module tb_patgen_chip_ctrl;
  import patgen_pkg::*;
  logic clk = 0, rst_n = 0;
  logic begin_init = 0, pstart = 0, pen = 0, bist = 0;
  logic [7:0] prom [1 + 2 * CHIP_IMG];
  logic [PROM_AW-1:0] bus, a0, a1;
  logic oe0, oe1;
  logic [7:0] data;
  logic end0 = 0, end1 = 0;
  cfg_wr_t cfg0, cfg1;
  logic go0, go1, run0, run1, coe0, coe1, bm0, bm1, pend0, pend1, id0, id1;
  chip_state_e st0, st1;
  int checks = 0, failures = 0;

  assign bus  = oe0 ? a0 : (oe1 ? a1 : '0);
  assign data = (int'(bus) < 1 + 2 * CHIP_IMG) ? prom[bus] : 8'hff;

  patgen_chip_ctrl u_m (.clk, .rst_n, .ms(1'b1), .bist, .begin_init, .pstart, .pen,
    .chip_id(3'd0), .prom_addr_o(a0), .prom_addr_oe(oe0), .prom_addr_i(bus), .prom_data_i(data),
    .ch0_pat_end(end0), .cfg(cfg0), .ch_go(go0), .run(run0), .chip_oe(coe0), .bist_mode(bm0),
    .pend(pend0), .init_done(id0), .state(st0));
  patgen_chip_ctrl u_s (.clk, .rst_n, .ms(1'b0), .bist, .begin_init, .pstart, .pen,
    .chip_id(3'd1), .prom_addr_o(a1), .prom_addr_oe(oe1), .prom_addr_i(bus), .prom_data_i(data),
    .ch0_pat_end(end1), .cfg(cfg1), .ch_go(go1), .run(run1), .chip_oe(coe1), .bist_mode(bm1),
    .pend(pend1), .init_done(id1), .state(st1));

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

  int nw0 = 0, nw1 = 0, cycles = 0, last_addr = -1;
  bit addr_ok = 1;
  // Collect configuration writes and address steps.
  always @(posedge clk) if (rst_n) begin
    if (cfg0.we) begin
      check(prom[1 + nw0] == cfg0.data && int'(cfg0.ch) * 128 + int'(cfg0.addr) == nw0, "master write");
      nw0++;
    end
    if (cfg1.we) begin
      check(prom[1 + CHIP_IMG + nw1] == cfg1.data && int'(cfg1.ch) * 128 + int'(cfg1.addr) == nw1, "slave write");
      nw1++;
    end
    if (oe0) begin
      if (int'(a0) != last_addr + 1) addr_ok = 0;
      last_addr = int'(a0);
      cycles++;
    end
    check(!oe1, "slave never drives the bus");
  end

  task automatic reset_chip(input bit b);
    rst_n = 0; bist = b; begin_init = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    bist <= 0;
  endtask

  initial begin
    prom[0] = 8'h01;
    for (int i = 1; i < 1 + 2 * CHIP_IMG; i++) prom[i] = 8'($urandom);
    reset_chip(1'b0);
    check(st0 == CHIP_RESET && st1 == CHIP_RESET, "wait for Begin_Init");
    begin_init <= 1;
    wait (st0 == CHIP_READY);
    @(posedge clk);
    #1;
    check(nw0 == CHIP_IMG && nw1 == CHIP_IMG, "each chip loaded its whole segment");
    check(addr_ok && last_addr == 2 * CHIP_IMG && cycles == 1 + 2 * CHIP_IMG, "master address walk");
    check(st1 == CHIP_READY && go0 && go1 && id0 && !run0, "both ready");
    check(!oe0, "bus released");
    check(coe0 && coe1, "pins enabled outside BIST");

    // Start, continuous while PEN is high.
    pen <= 1;
    repeat (3) @(posedge clk);
    check(st0 == CHIP_READY, "no start without PStart");
    pstart <= 1;
    @(posedge clk);
    @(posedge clk);
    #1 check(run0 && run1, "PStart edge starts RUN");
    repeat (5) @(posedge clk);
    end0 <= 1; @(posedge clk); end0 <= 0;
    #1 check(pend0 && run0, "continuous: PEND and still running");
    @(posedge clk);
    #1 check(!pend0, "PEND is one clock");
    // Single shot: PEN low ends at the next pattern end.
    pen <= 0;
    repeat (4) @(posedge clk);
    #1 check(run0, "running until the pattern end");
    end0 <= 1; @(posedge clk); end0 <= 0;
    #1 check(pend0 && st0 == CHIP_READY, "single shot: stop at the end");
    repeat (3) @(posedge clk);
    #1 check(st0 == CHIP_READY, "PStart held high does not restart");
    pstart <= 0; @(posedge clk); pstart <= 1; @(posedge clk); @(posedge clk);
    #1 check(run0, "new PStart edge restarts");

    // BIST held during reset.
    pstart <= 0;
    reset_chip(1'b1);
    #1 check(bm0 && bm1 && !coe0 && !coe1, "BIST mode disables the pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
