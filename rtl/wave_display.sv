// wave_display: decides, pixel by pixel, whether the VGA beam is on the
// stored waveform.
//
// Address generation: the middle half of the screen (X = 256..767) is
// mapped onto the 256 RAM words, two X pixels per word. X[10] is dropped.
// Of the remaining 10 bits, the second MSB X[8] and the LSB X[0] are dropped
// too, so read_address = {X[9], X[7:1]}. The VGA X counter steps once every
// two clocks, so the read address changes once every four clocks.
//
// Sample pipeline: a register remembers the last read address. In the cycle
// the address changes, a one-cycle flag is raised. The RAM answers one cycle
// later, and then the flag makes the word in read_value the current sample;
// the old current sample becomes the previous one. So the pair is shifted
// exactly once per RAM word, and a word read in several cycles is never
// taken twice.
//
// Pixel rule: the pixel is lit when vga_valid is high, when
// X_FIRST <= X <= X_LAST (all 11 bits), and when Y[8:1] lies between the
// previous and the current sample, both ends included, whichever of the two
// is larger. The two samples and the two X values together bound a rectangle
// on screen. With the timing above, the pair (word A-1, word A) is in the
// registers for X = 2A+257 and 2A+258. X_FIRST = 259 is the first X where
// the older sample is word 0. X_LAST = 768 is the last X where the newer
// sample is word 255. So exactly the 255 segments of one pass through the
// RAM are drawn, 510 pixels wide.
//
// Timing: read_address and valid_pixel are combinational from the inputs and
// the registers; the sample registers update on the clock. The scan must hold
// each X for two clocks.
//
// Taken from the lab description: the address mapping, the dropped Y LSB,
// the last-two-samples rectangle, the need for both orderings, the 11-bit X
// bounds, and accepting a sample only after the read address changes. This
// design's own choices: the inclusive comparison, the reset values, and
// computing the exact bounds 259 and 768 from the pipeline above.
module wave_display
  import wave_pkg::*;
#(
  parameter logic [X_W-1:0] X_FIRST = 11'd259,
  parameter logic [X_W-1:0] X_LAST  = 11'd768
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [X_W-1:0]    xpos,
  input  logic [Y_W-1:0]    ypos,
  input  logic              vga_valid,
  output logic [ADDR_W-1:0] read_address,
  input  logic [DATA_W-1:0] read_value,
  output logic              valid_pixel
);

  addr_t last_address;    // read address of the previous cycle
  logic  addr_changed;    // read address differs from last cycle's
  logic  take_sample;     // RAM output now holds the new address's word
  word_t curr_sample;     // newest word read
  word_t prev_sample;     // word before it
  word_t y_eff;           // 8-bit Y
  word_t lo, hi;          // rectangle bounds in Y
  logic  in_x, in_y;

  assign read_address = {xpos[9], xpos[7:1]};
  assign addr_changed = (read_address != last_address);

  always_ff @(posedge clk) begin
    if (reset) begin
      last_address <= '0;
      take_sample  <= 1'b0;
      curr_sample  <= '0;
      prev_sample  <= '0;
    end else begin
      last_address <= read_address;
      take_sample  <= addr_changed;
      if (take_sample) begin
        prev_sample <= curr_sample;
        curr_sample <= read_value;
      end
    end
  end

  always_comb begin
    y_eff = ypos[8:1];
    if (prev_sample > curr_sample) begin
      hi = prev_sample;
      lo = curr_sample;
    end else begin
      hi = curr_sample;
      lo = prev_sample;
    end
    in_x        = (xpos >= X_FIRST) && (xpos <= X_LAST);
    in_y        = (y_eff >= lo) && (y_eff <= hi);
    valid_pixel = vga_valid && in_x && in_y;
  end

endmodule
