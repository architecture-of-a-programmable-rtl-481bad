// patgen_bit_error: single-event-upset detection on the channel outputs.
//
// For each channel a running parity is kept over the data bits the channel
// emits (each clock with out_valid).  On the channel's last bit of a pattern
// (pat_last) the parity of the whole pattern is compared with the parity bit
// stored for that channel in the configuration, and the accumulator starts
// again.  A mismatch sets that channel's sticky error flag; the flags are
// ORed into bit_error, which only a reset (and so a reload of the patterns)
// clears.  That is the architecture's scheme.  The stored bit is taken, by
// this design's choice, from bit 3 of each channel's mode byte: this block
// snoops the configuration writes for it.  clr restarts the accumulators
// (held during configuration).
module patgen_bit_error #(
  parameter int unsigned NUM_CH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  patgen_pkg::cfg_wr_t           cfg,
  input  logic              clr,
  input  logic [NUM_CH-1:0] pat_d,
  input  logic [NUM_CH-1:0] out_valid,
  input  logic [NUM_CH-1:0] pat_last,
  output logic [NUM_CH-1:0] ch_err,
  output logic              bit_error
);

  import patgen_pkg::*;

  logic [NUM_CH-1:0] stored, acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored <= '0;
      acc    <= '0;
      ch_err <= '0;
    end else begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (cfg.we && int'(cfg.ch) == c && cfg.addr == CFG_AW'(OFS_MODE))
          stored[c] <= cfg.data[3];
        if (clr) begin
          acc[c] <= 1'b0;
        end else if (out_valid[c]) begin
          if (pat_last[c]) begin
            acc[c] <= 1'b0;
            if ((acc[c] ^ pat_d[c]) != stored[c]) ch_err[c] <= 1'b1;
          end else begin
            acc[c] <= acc[c] ^ pat_d[c];
          end
        end
      end
    end
  end

  assign bit_error = |ch_err;

endmodule
