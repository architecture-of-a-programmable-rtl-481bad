// tb_patgen_top: end-to-end test of two PATGEN chips sharing one boot PROM.
//
// Chip 0 is the master and drives the PROM address bus, chip 1 is a slave
// that picks its segment off the same bus.  Both run at the default sizes
// (eight channels, 64-bit fields, 14-bit loop counters).  The PROM model is
// combinational and is filled here:
//   channel 0 of both chips: the four-field mask-mode example (fields 0, 7,
//                     5, 2); it sets the pattern period, so both chips stop
//                     together in single-shot mode,
//   chip 1 channel 7: one 1-bit field looped 16384 times, group looped twice,
//   chip 1 channel 6: one 2-bit field, group looped 16384 times (so both
//                     kinds of loop counter reach their largest value),
//   the other channels: random images (binary and mask mode), chip 1 with
//   fields up to 64 bits; chip 1 channel 3 gets a wrong stored parity bit.
// Every clock of the run every pin value and enable of both chips is
// compared with the reference model, parity is checked against the pins,
// and PEND must mark the last bit of the channel-0 pattern, one clock
// after the pattern's last selection.  The run is continuous (PEN high) until
// every channel has finished its pattern at least once, then single shot
// (PEN low) stops at the next end, and the pins must then hold.  A second
// start resumes.  Then both chips are reset with BIST high and reloaded with
// a self-test image in which channels 2k and 2k+1 are identical: the pins
// must be disabled and parity must stay 0; a corrupted self-test image must
// make parity go to 1.  Each mechanism is counted and must occur.
module tb_patgen_top;
  import patgen_pkg::*;
  import patgen_tb_pkg::*;

  localparam int unsigned PROM_N = 1 + 2 * CHIP_IMG;

  logic clk = 0, rst_n = 0;
  logic bist = 0, begin_init = 0, pstart = 0, pen = 0;
  logic [PROM_AW-1:0] bus, a0, a1;
  logic oe0, oe1;
  logic [7:0] data;
  logic [7:0] prom [PROM_N];
  logic [NUM_CH-1:0] po0, poe0, po1, poe1;
  logic pend0, pend1, par0, par1, berr0, berr1, id0, id1;
  int checks = 0, failures = 0;

  assign bus  = oe0 ? a0 : (oe1 ? a1 : '0);
  assign data = (int'(bus) < PROM_N) ? prom[bus] : 8'hff;

  patgen_top u_chip0 (.clk, .rst_n, .ms(1'b1), .bist, .begin_init, .pstart, .pen,
    .chip_id(3'd0), .prom_addr_o(a0), .prom_addr_oe(oe0), .prom_addr_i(bus), .prom_data_i(data),
    .pat_o(po0), .pat_oe(poe0), .pend(pend0), .parity(par0), .bit_error(berr0), .init_done(id0));
  patgen_top u_chip1 (.clk, .rst_n, .ms(1'b0), .bist, .begin_init, .pstart, .pen,
    .chip_id(3'd1), .prom_addr_o(a1), .prom_addr_oe(oe1), .prom_addr_i(bus), .prom_data_i(data),
    .pat_o(po1), .pat_oe(poe1), .pend(pend1), .parity(par1), .bit_error(berr1), .init_done(id1));

  always #5 clk = ~clk;

  initial begin
    #20_000_000_000;
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

  // Mechanism counters.
  int n_field_loop = 0, n_group_loop = 0, n_group_chain = 0, n_tristate = 0;
  int n_continuous = 0, n_single_shot = 0, n_bit_error = 0, n_slave_load = 0;
  int n_bist_pass = 0, n_bist_fail = 0, n_full_count = 0;
  bit normal_phase = 1;

  always @(posedge clk) begin
    if (u_chip0.g_ch[0].u_ch.fld_dec || u_chip1.g_ch[2].u_ch.fld_dec) n_field_loop++;
    if (u_chip0.g_ch[0].u_ch.gloop_dec || u_chip1.g_ch[2].u_ch.gloop_dec) n_group_loop++;
    if ((u_chip0.g_ch[1].u_ch.grp_adv && !u_chip0.g_ch[1].u_ch.pat_end) ||
        (u_chip1.g_ch[1].u_ch.grp_adv && !u_chip1.g_ch[1].u_ch.pat_end)) n_group_chain++;
    if (normal_phase && (u_chip1.g_ch[7].u_ch.pat_end || u_chip1.g_ch[6].u_ch.pat_end)) n_full_count++;
  end

  img_t imgs [2][NUM_CH];

  task automatic put_image(input int chip, input int ch, const ref img_t img);
    for (int a = 0; a < 128; a++) prom[1 + chip * CHIP_IMG + ch * 128 + a] = img[a];
  endtask

  task automatic example_image(ref img_t img);
    foreach (img[i]) img[i] = 8'h00;
    img[8 * 7] = 8'b1101_1011;
    img[8 * 5] = 8'b0000_0111;
    img[8 * 2] = 8'b0000_1111;
    img[64 + 0] = 4; img[64 + 7] = 7; img[64 + 5] = 2; img[64 + 2] = 3;
    img[72 + 2 * 7] = 1; img[72 + 2 * 2] = 2;
    img[88] = 8'h70; img[89] = 8'h25;
    img[96] = 2; img[104] = 8'h03;
    img[105] = 8'h04;
    img[105][3] = pattern_parity(img);
  endtask

  task automatic long_count_image(ref img_t img);
    foreach (img[i]) img[i] = 8'h00;
    img[0] = 8'h01;                     // field 0: "1", one bit long
    img[64] = 0;
    img[72] = 8'hff; img[73] = 8'h3f;   // 16384 iterations
    img[88] = 8'h00;
    img[96] = 8'h01;                    // group 0 twice
    img[104] = 8'h00; img[105] = 8'h00; // one slot, one group, binary
    img[105][3] = pattern_parity(img);
  endtask

  task automatic long_group_image(ref img_t img);
    foreach (img[i]) img[i] = 8'h00;
    img[0] = 8'h01;                     // field 0: "10", two bits long
    img[64] = 1;
    img[88] = 8'h00;
    img[96] = 8'hff; img[97] = 8'h3f;   // group 0: 16384 iterations
    img[104] = 8'h00; img[105] = 8'h00;
    img[105][3] = pattern_parity(img);
  endtask

  task automatic load_chips(input bit b);
    rst_n = 0; bist = b; begin_init = 0; pstart = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    bist <= 0;
    begin_init <= 1;
    fork
      begin
        wait (id0 && id1);
      end
      begin
        repeat (3 * PROM_N) @(posedge clk);
        check(1'b0, "configuration timed out");
      end
    join_any
    disable fork;
    begin_init <= 0;
    @(posedge clk);
  endtask

  // Runs the chips; compares pins with the model while running.
  // stop_mode 0: continuous until every channel ended once, then single shot.
  bit exp_d [2][NUM_CH][$], exp_oe [2][NUM_CH][$];
  int kpos [2][NUM_CH];
  int nend [2][NUM_CH];

  task automatic start_edge();
    pstart <= 0; @(posedge clk);
    pstart <= 1; @(posedge clk);   // edge sampled here, RUN from next clock
  endtask

  task automatic run_normal(input bit until_all_end, input int max_cycles);
    bit running, done, stop_next;
    int cyc;
    running = 1; done = 0; stop_next = 0; cyc = 0;
    // RUN starts after the clock that saw the PStart edge; the first bit
    // reaches the pins one clock later
    while (running && cyc < max_cycles) begin
      @(posedge clk);
      #1;
      cyc++;
      for (int ch = 0; ch < 2; ch++)
        for (int c = 0; c < NUM_CH; c++) begin
          int n, k;
          logic o, e;
          n = exp_d[ch][c].size();
          k = kpos[ch][c] % n;
          o = ch ? po1[c] : po0[c];
          e = ch ? poe1[c] : poe0[c];
          check(o == exp_d[ch][c][k] && e == exp_oe[ch][c][k],
                $sformatf("chip %0d channel %0d bit %0d", ch, c, k));
          if (!e) n_tristate++;
          if (k == n - 1) nend[ch][c]++;
          kpos[ch][c]++;
        end
      check(par0 == ^po0 && par1 == ^po1, "parity of the pins");
      begin
        int n0, k0;
        n0 = exp_d[0][0].size();
        k0 = (kpos[0][0] - 1) % n0;
        check(pend0 == (k0 == n0 - 1) && pend1 == (k0 == n0 - 1), "PEND at channel 0 pattern end");
        if (pend0) begin
          if (pen) n_continuous++;
          else begin
            running = 0;
            n_single_shot++;
          end
        end
      end
      if (until_all_end && !stop_next) begin
        done = 1;
        for (int ch = 0; ch < 2; ch++)
          for (int c = 0; c < NUM_CH; c++) if (nend[ch][c] == 0) done = 0;
        if (done) begin
          pen <= 0;
          stop_next = 1;
        end
      end
    end
    check(!running, "run ended by single shot");
    // pins hold after a single-shot stop
    begin
      logic [NUM_CH-1:0] h0, h1;
      h0 = po0; h1 = po1;
      repeat (5) @(posedge clk);
      #1 check(po0 == h0 && po1 == h1 && !pend0, "pins hold after stop");
    end
  endtask

  img_t tmp;

  initial begin
    // ---- normal configuration ----
    prom[0] = 8'h01;
    for (int ch = 0; ch < 2; ch++)
      for (int c = 0; c < NUM_CH; c++) begin
        if (c == 0) example_image(imgs[ch][c]);   // both chips: same reference channel
        else if (ch == 1 && c == 7) long_count_image(imgs[ch][c]);
        else if (ch == 1 && c == 6) long_group_image(imgs[ch][c]);
        else random_image(imgs[ch][c], ch ? 64 : 8, 3, c >= 4);
        if (c == 1) begin
          imgs[ch][c][105][1:0] = 2'd3;     // four groups chained
          imgs[ch][c][105][3] = pattern_parity(imgs[ch][c]);
        end
        if (c == 2) begin
          imgs[ch][c][72 + 2 * (imgs[ch][c][88] & 7)] = 8'd2;  // first field three times
          imgs[ch][c][96] = 8'd1;                              // group 0 twice
          imgs[ch][c][105][3] = pattern_parity(imgs[ch][c]);
        end
        tmp = imgs[ch][c];
        if (ch == 1 && c == 3) tmp[105][3] = !tmp[105][3];
        put_image(ch, c, tmp);
        expect_pattern(imgs[ch][c], exp_d[ch][c], exp_oe[ch][c]);
        kpos[ch][c] = 0;
        nend[ch][c] = 0;
      end
    check(exp_d[0][0].size() == 108, "example pattern length");
    check(exp_d[1][7].size() == 2 * 16384, "largest field loop count");
    check(exp_d[1][6].size() == 2 * 16384, "largest group loop count");

    load_chips(1'b0);
    check(id1, "slave configured from the shared bus");
    if (id1) n_slave_load++;
    pen <= 1;
    start_edge();
    run_normal(1'b1, 200000);
    check(!berr0, "chip 0: no bit error");
    check(berr1, "chip 1: wrong stored parity reported");
    if (berr1) n_bit_error++;
    // resume: a new PStart edge continues each channel where it stopped
    start_edge();
    run_normal(1'b0, 200000);

    // ---- BIST ----
    normal_phase = 0;
    for (int ch = 0; ch < 2; ch++)
      for (int c = 0; c < NUM_CH; c += 2) begin
        random_image(tmp, 16, 2, 1'b0);
        put_image(ch, c, tmp);
        put_image(ch, c + 1, tmp);
      end
    for (int pass = 0; pass < 2; pass++) begin
      int ones;
      if (pass == 1)   // corrupt one channel's field data
        for (int a = 0; a < 64; a++) prom[1 + 128 + a] = ~prom[1 + 128 + a];
      load_chips(1'b1);
      check(poe0 == '0 && poe1 == '0, "BIST: pins disabled");
      pen <= 1;
      start_edge();
      ones = 0;
      repeat (3000) begin
        @(posedge clk);
        #1;
        if (par0 || par1) ones++;
        check(poe0 == '0 && poe1 == '0, "BIST: pins disabled while running");
      end
      pen <= 0;
      if (pass == 0) begin
        check(ones == 0, "BIST: even parity on a good image");
        if (ones == 0) n_bist_pass++;
      end else begin
        check(ones > 0, "BIST: corrupted image detected");
        if (ones > 0) n_bist_fail++;
      end
    end

    $display("mechanisms: field_loop=%0d group_loop=%0d group_chain=%0d tristate=%0d continuous=%0d single_shot=%0d bit_error=%0d slave_load=%0d bist_pass=%0d bist_fail=%0d full_count=%0d",
             n_field_loop, n_group_loop, n_group_chain, n_tristate, n_continuous, n_single_shot,
             n_bit_error, n_slave_load, n_bist_pass, n_bist_fail, n_full_count);
    check(n_field_loop > 0, "field looping happened");
    check(n_group_loop > 0, "group looping happened");
    check(n_group_chain > 0, "group chaining happened");
    check(n_tristate > 0, "mask-mode tri-state happened");
    check(n_continuous > 0, "continuous mode happened");
    check(n_single_shot > 1, "single shot happened");
    check(n_bit_error > 0, "bit error happened");
    check(n_slave_load > 0, "slave configuration happened");
    check(n_bist_pass > 0 && n_bist_fail > 0, "BIST pass and fail happened");
    check(n_full_count > 0, "16K-iteration counters ran out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
