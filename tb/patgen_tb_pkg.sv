// patgen_tb_pkg: reference model of a PATGEN channel for the testbenches.
//
// Works from a channel's 128-byte configuration image (layout in patgen_pkg)
// and lists, bit by bit, what the channel pin must show over one whole
// pattern: data value and driver enable.  It is written straight from the
// looping rule (groups, group iterations, slots, field iterations, field
// bits), independently of the RTL's counters and shift registers.  It also
// builds random images with small lengths and counts so patterns stay short.
package patgen_tb_pkg;

  typedef byte unsigned img_t [128];

  function automatic bit fbit(const ref img_t img, input int f, input int i);
    return img[8 * f + i / 8][i % 8];
  endfunction

  function automatic int loop14(const ref img_t img, input int ofs);
    return int'(img[ofs]) + 256 * int'(img[ofs + 1] & 8'h3f) + 1;
  endfunction

  // Expected pin values for one whole pattern.
  function automatic void expect_pattern(const ref img_t img, ref bit d[$], ref bit oe[$]);
    bit mask;
    int nseq;
    mask = img[105][2];
    nseq = int'(img[105] & 8'h03) + 1;
    d.delete();
    oe.delete();
    for (int g = 0; g < nseq; g++) begin
      int glen, gl;
      glen = int'((img[104] >> (2 * g)) & 8'h03) + 1;
      gl   = loop14(img, 96 + 2 * g);
      for (int r = 0; r < gl; r++)
        for (int s = 0; s < glen; s++) begin
          int f, flen, fl;
          byte unsigned b;
          b    = img[88 + 2 * g + s / 2];
          f    = (s % 2 == 1) ? int'((b >> 4) & 8'h07) : int'(b & 8'h07);
          flen = int'(img[64 + f] & 8'h3f) + 1;
          fl   = loop14(img, 72 + 2 * f);
          for (int k = 0; k < fl; k++)
            for (int i = 0; i < flen; i++) begin
              if (mask) begin
                d.push_back(fbit(img, f | 4, i));
                oe.push_back(!fbit(img, f & 3, i));
              end else begin
                d.push_back(fbit(img, f, i));
                oe.push_back(1'b1);
              end
            end
        end
    end
  endfunction

  // Parity of the data bits of one whole pattern.
  function automatic bit pattern_parity(const ref img_t img);
    bit d[$], oe[$];
    bit p;
    expect_pattern(img, d, oe);
    p = 0;
    foreach (d[i]) p ^= d[i];
    return p;
  endfunction

  // Random image: lengths up to maxlen bits, loop counts up to maxloop.
  function automatic void random_image(ref img_t img, input int maxlen, input int maxloop,
                                       input bit allow_mask);
    for (int i = 0; i < 128; i++) img[i] = 8'($urandom);
    for (int f = 0; f < 8; f++) begin
      img[64 + f]     = 8'($urandom_range(maxlen - 1, 0));
      img[72 + 2 * f] = 8'($urandom_range(maxloop - 1, 0));
      img[73 + 2 * f] = 8'h00;
    end
    for (int g = 0; g < 4; g++) begin
      img[96 + 2 * g] = 8'($urandom_range(maxloop - 1, 0));
      img[97 + 2 * g] = 8'h00;
    end
    img[105] = {4'h0, 1'b0, allow_mask ? 1'($urandom) : 1'b0, 2'($urandom)};
    img[105][3] = pattern_parity(img);
  endfunction

endpackage
