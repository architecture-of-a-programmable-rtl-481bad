// tb_patgen_channel: self-checking test of one PATGEN channel.
//
// Loads a configuration image byte by byte, releases the channel and
// compares every pin value and enable, clock by clock, with the reference
// model over two whole pattern periods, checking that pat_last marks exactly
// the last bit of each period.  Images: the four-field example of the
// architecture (fields 0, 7, 5, 2 with lengths 5, 8, 3, 4 and counts 1, 2,
// 1, 3, group repeated three times, field 2 tri-stated), the longest
// pattern without looping (eight 64-bit fields once each), and random images in
// binary and mask mode, with pauses of run in the middle.
module tb_patgen_channel;
  import patgen_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [6:0] cfg_addr = '0;
  logic [7:0] cfg_data = '0;
  logic go = 0, run = 0;
  logic pat_o, pat_oe, pat_end, pat_last, out_valid, mask_mode;
  int checks = 0, failures = 0;

  patgen_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  task automatic load(const ref img_t img);
    go = 0;
    run = 0;
    @(posedge clk);
    for (int a = 0; a < 128; a++) begin
      cfg_we <= 1; cfg_addr <= 7'(a); cfg_data <= img[a];
      @(posedge clk);
    end
    cfg_we <= 0;
    @(posedge clk);
    @(posedge clk);
    go <= 1;
    @(posedge clk);
  endtask

  // Runs two periods, pausing run at random when pause is set.
  task automatic run_and_compare(const ref img_t img, input bit pause, input string name);
    bit d[$], oe[$];
    int n, k, errs;
    expect_pattern(img, d, oe);
    n = d.size();
    k = 0;
    errs = failures;
    while (k < 2 * n) begin
      run <= pause ? ($urandom_range(3, 0) != 0) : 1'b1;
      @(posedge clk);
      #1;
      if (out_valid) begin
        check(pat_o == d[k % n] && pat_oe == oe[k % n], name);
        check(pat_last == (k % n == n - 1), {name, " pat_last"});
        k++;
      end
    end
    run <= 0;
    @(posedge clk);
    if (failures != errs) $display("  %s: %0d bits per period", name, n);
  endtask

  img_t img;
  bit d[$], oe[$];
  string s;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Example pattern: 00000 11011011 11011011 111 ZZZZ ZZZZ ZZZZ, three times.
    foreach (img[i]) img[i] = 8'h00;
    img[8 * 7]    = 8'b1101_1011;       // field 7: 11011011 (bit 0 first)
    img[8 * 5]    = 8'b0000_0111;       // field 5: 111
    img[8 * 2]    = 8'b0000_1111;       // field 2 used as tri-state flags: ZZZZ
    img[8 * 1]    = 8'h00;              // field 1: flags of field 5, driven
    img[64 + 0] = 4; img[64 + 7] = 7; img[64 + 5] = 2; img[64 + 2] = 3;
    img[72 + 2 * 7] = 1;                // field 7 twice
    img[72 + 2 * 2] = 2;                // field 2 three times
    img[88] = 8'h70;                    // slots 0,1: fields 0, 7
    img[89] = 8'h25;                    // slots 2,3: fields 5, 2
    img[96] = 2;                        // group 0 three times
    img[104] = 8'h03;                   // group 0 has four slots
    img[105] = 8'h04;                   // one group, mask mode
    expect_pattern(img, d, oe);
    check(d.size() == 3 * (5 + 2 * 8 + 3 + 3 * 4), "example length");
    load(img);
    check(mask_mode == 1'b1, "mask mode");
    run_and_compare(img, 1'b0, "example");

    // Longest pattern without looping: eight 64-bit fields played once each,
    // two groups of four slots (fields 0..3, then 4..7): 512 bits.
    for (int i = 0; i < 64; i++) img[i] = 8'($urandom);
    for (int f = 0; f < 8; f++) begin
      img[64 + f] = 63; img[72 + 2 * f] = 0; img[73 + 2 * f] = 0;
    end
    img[88] = 8'h10; img[89] = 8'h32; img[90] = 8'h54; img[91] = 8'h76;
    img[96] = 0; img[97] = 0; img[98] = 0; img[99] = 0;
    img[104] = 8'h0f; img[105] = 8'h01;
    expect_pattern(img, d, oe);
    check(d.size() == 512, "unlooped length");
    load(img);
    run_and_compare(img, 1'b0, "unlooped 512");

    for (int t = 0; t < 20; t++) begin
      random_image(img, (t % 2) ? 64 : 6, 3, t >= 10);
      load(img);
      s = $sformatf("random %0d", t);
      run_and_compare(img, t % 3 == 0, s);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
