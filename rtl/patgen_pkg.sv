// patgen_pkg: constants and types shared by the PATGEN pattern generator.
//
// The chip has eight channels; each channel holds eight fields of up to
// 64 bits, every field and every group carries a 14-bit loop counter, and
// the sequencer chains up to four groups of up to four fields.  Those sizes
// come from the architecture.  The configuration image layout below (byte
// addresses inside the boot PROM) is this design's own choice: the
// architecture only says that the chip boots its patterns from an external
// byte PROM.
//
// Channel image, 128 bytes per channel, channel c at chip offset c*128:
//   0..63    field patterns, field k in bytes 8k..8k+7, byte j holds pattern
//            bits 8j..8j+7, bit 0 is emitted first
//   64..71   field k length minus one (bits 5:0)
//   72..87   field k loop count minus one, low byte at 72+2k, high 6 bits at 73+2k
//   88..95   group g field numbers: byte 88+2g = {step1, step0}, 89+2g = {step3, step2},
//            each a 3-bit field number in a nibble
//   96..103  group g loop count minus one, low byte at 96+2g, high 6 bits at 97+2g
//   104      group g length minus one in bits 2g+1:2g
//   105      bits 1:0 sequence length (groups) minus one, bit 2 mask mode,
//            bit 3 stored even/odd parity of one whole channel pattern
// PROM image: byte 0 holds the number of chips minus one, chip i's 1024 bytes
// start at 1 + 1024*i.
package patgen_pkg;

  localparam int unsigned NUM_CH      = 8;
  localparam int unsigned NUM_FIELDS  = 8;
  localparam int unsigned FIELD_W     = 64;
  localparam int unsigned LOOP_W      = 14;
  localparam int unsigned NUM_GROUPS  = 4;
  localparam int unsigned GROUP_STEPS = 4;
  localparam int unsigned SEL_W       = 3;   // field number width
  localparam int unsigned CFG_AW      = 7;   // byte address inside one channel image
  localparam int unsigned CH_IMG      = 128; // bytes per channel image
  localparam int unsigned CHIP_IMG    = NUM_CH * CH_IMG;
  localparam int unsigned CHIP_ID_W   = 3;   // up to 8 chips on one PROM
  localparam int unsigned PROM_AW     = 14;  // 1 + 8*1024 bytes

  // Byte offsets inside one channel image.
  localparam int unsigned OFS_LEN   = 64;
  localparam int unsigned OFS_FLOOP = 72;
  localparam int unsigned OFS_GSEL  = 88;
  localparam int unsigned OFS_GLOOP = 96;
  localparam int unsigned OFS_GLEN  = 104;
  localparam int unsigned OFS_MODE  = 105;

  // One configuration byte write, broadcast from the chip controller.
  typedef struct packed {
    logic                we;
    logic [2:0]          ch;    // channel index
    logic [CFG_AW-1:0]   addr;  // byte inside the channel image
    logic [7:0]          data;
  } cfg_wr_t;

  // Chip controller states.
  typedef enum logic [2:0] {
    CHIP_RESET,   // waiting for Begin_Init
    CHIP_HEADER,  // reading the chip count from PROM byte 0
    CHIP_LOAD,    // copying PROM bytes into the channels
    CHIP_READY,   // configured, waiting for a PStart rising edge
    CHIP_RUN      // generating patterns
  } chip_state_e;

  // Channel controller states (the two named by the architecture).
  typedef enum logic {
    CH_RESET,
    CH_OPERATING
  } ch_state_e;

endpackage
