// Shared constants of the space-probe control unit.
//
// The 11-bit Barker code 11100010010 is the sequence each fold of the code
// generator produces; bit 0 of BARKER11 is the first chip sent after a counter
// reset. The word width of 4 bits follows the 4-bit A-D converter; the frame
// layout (8 word slots) is this design's own choice. The gate signal
// directions are those of the P-channel gate truth tables.
package cu_pkg;

  localparam int unsigned BARKER_LEN = 11;
  // Chip k of the code is BARKER11[k]: 1 1 1 0 0 0 1 0 0 1 0 read from k = 0.
  localparam logic [BARKER_LEN-1:0] BARKER11 = 11'b010_0100_0111;

  localparam int unsigned WORD_BITS = 4;   // A-D converter resolution and telemetry word width
  localparam int unsigned N_ANALOG  = 4;   // thermistor channels on the analogue bus
  localparam int unsigned N_BUF     = 3;   // buffered digital words
  localparam int unsigned N_DIRECT  = 4;   // digital words taken straight into the multiplexer
  localparam int unsigned N_SLOTS   = 8;   // words per telemetry frame

  typedef logic [WORD_BITS-1:0] word_t;

  // Signal direction of a P-channel gate block: positive means 0 V is logic 0
  // and the positive level is logic 1; negative is the reverse. The same
  // transistor network is a NOR in one direction and a NAND in the other.
  typedef enum logic {DIR_POSITIVE = 1'b0, DIR_NEGATIVE = 1'b1} signal_dir_e;

  // Reference chip of the double-folded code: chip n of the 121-chip period.
  function automatic logic barker_chip(input int unsigned n);
    return BARKER11[(n / BARKER_LEN) % BARKER_LEN] ^ BARKER11[n % BARKER_LEN];
  endfunction

endpackage
