// tb_patgen_proto: the reduced prototype configuration, 32-bit fields.
//
// One master chip built with FIELD_W = 32 boots from a combinational PROM
// model holding a one-chip image.  Channels 0 and 1 carry random patterns
// with fields of up to 32 bits (channel 0 with every field at the full 32
// bits); the other channels hold a one-bit pattern of 0.  Every pin is
// compared with the reference model, clock by clock, over several periods of
// channel 0 in continuous mode, then single shot ends the run and PEND must
// mark the end of channel 0's pattern.
module tb_patgen_proto;
  import patgen_pkg::*;
  import patgen_tb_pkg::*;

  localparam int unsigned PROM_N = 1 + CHIP_IMG;

  logic clk = 0, rst_n = 0;
  logic begin_init = 0, pstart = 0, pen = 0;
  logic [PROM_AW-1:0] a0;
  logic oe0;
  logic [7:0] data;
  logic [7:0] prom [PROM_N];
  logic [NUM_CH-1:0] po, poe;
  logic pend, par, berr, idone;
  int checks = 0, failures = 0;

  assign data = (int'(a0) < PROM_N) ? prom[a0] : 8'hff;

  patgen_top #(.FIELD_W(32)) u_chip (.clk, .rst_n, .ms(1'b1), .bist(1'b0), .begin_init, .pstart, .pen,
    .chip_id(3'd0), .prom_addr_o(a0), .prom_addr_oe(oe0), .prom_addr_i(a0), .prom_data_i(data),
    .pat_o(po), .pat_oe(poe), .pend, .parity(par), .bit_error(berr), .init_done(idone));

  always #5 clk = ~clk;

  initial begin
    #2_000_000_000;
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

  img_t img;
  bit exp_d [NUM_CH][$], exp_oe [NUM_CH][$];
  int periods = 0;

  initial begin
    prom[0] = 8'h00;
    for (int c = 0; c < NUM_CH; c++) begin
      if (c < 2) begin
        random_image(img, 32, 3, c == 1);
        if (c == 0) begin
          for (int f = 0; f < 8; f++) img[64 + f] = 31;
          img[105][3] = pattern_parity(img);
        end
      end else begin
        foreach (img[i]) img[i] = 8'h00;
      end
      for (int a = 0; a < 128; a++) prom[1 + c * 128 + a] = img[a];
      expect_pattern(img, exp_d[c], exp_oe[c]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin_init <= 1;
    wait (idone);
    @(posedge clk);
    pen <= 1;
    pstart <= 1;
    @(posedge clk);
    for (int k = 0; ; k++) begin
      @(posedge clk);
      #1;
      for (int c = 0; c < NUM_CH; c++)
        check(po[c] == exp_d[c][k % exp_d[c].size()] && poe[c] == exp_oe[c][k % exp_d[c].size()],
              $sformatf("channel %0d bit %0d", c, k));
      check(pend == (k % exp_d[0].size() == exp_d[0].size() - 1), "PEND");
      check(!berr, "no bit error");
      if (pend) begin
        periods++;
        if (!pen) break;
      end
      if (periods == 3) pen <= 0;
      if (k > 1_000_000) break;
    end
    check(periods == 4, "three continuous periods then a single shot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
