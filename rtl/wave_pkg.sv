// wave_pkg: widths, screen constants and the sample conversion shared by the
// audio waveform display (capture FSM, waveform RAM, display logic).
//
// The waveform buffer holds 256 words of 8 bits. Audio samples are 16-bit
// two's complement; the VGA scan counters give an 11-bit X and a 10-bit Y.
// The display uses the middle half of a 1024-wide X range, two X pixels per
// stored sample, and the upper 8 bits of a 9-bit Y.
//
// Sample conversion (this design's choice of the two "simple operations"):
//   1. invert the sign bit: two's complement becomes offset binary, so +1
//      and -1 become neighbouring codes and the two halves of a wave join;
//   2. keep the upper 7 of those bits and add Y_CENTER - 64, so the full
//      16-bit range fills 128 of the 240 visible 8-bit Y rows and is centred
//      on row 120, the middle of the 480-line screen.
package wave_pkg;

  localparam int unsigned SAMPLE_W = 16;  // audio sample width
  localparam int unsigned ADDR_W   = 8;   // waveform RAM address width
  localparam int unsigned DATA_W   = 8;   // waveform RAM word width
  localparam int unsigned DEPTH    = 1 << ADDR_W;
  localparam int unsigned X_W      = 11;  // VGA X counter width
  localparam int unsigned Y_W      = 10;  // VGA Y counter width
  localparam int unsigned RGB_W    = 6;   // 2 bits each of red, green, blue

  // Visible screen height in lines, and its centre in 8-bit Y units (Y/2).
  localparam int unsigned SCREEN_H = 480;
  localparam logic [DATA_W-1:0] Y_CENTER = DATA_W'(SCREEN_H / 4);

  localparam logic [RGB_W-1:0] RGB_WHITE = 6'b111111;
  localparam logic [RGB_W-1:0] RGB_BLACK = 6'b000000;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [ADDR_W-1:0]          addr_t;
  typedef logic [DATA_W-1:0]          word_t;

  // Capture FSM states.
  typedef enum logic {
    CAP_ARMED  = 1'b0,
    CAP_ACTIVE = 1'b1
  } cap_state_t;

  // Convert a signed audio sample to the unsigned 8-bit screen row stored in
  // the RAM: offset binary (sign bit inverted), halved to 7 bits, centred.
  function automatic word_t sample_to_row(sample_t s);
    logic [DATA_W-1:0] offset_bin;
    offset_bin = {~s[SAMPLE_W-1], s[SAMPLE_W-2 -: DATA_W-1]};
    return word_t'(offset_bin >> 1) + (Y_CENTER - word_t'(DEPTH / 4));
  endfunction

endpackage
