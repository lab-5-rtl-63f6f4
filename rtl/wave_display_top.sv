// wave_display_top: real-time audio waveform display.
//
// Audio samples arrive at 48 kHz with a one-cycle new_sample strobe. The VGA
// scan counters run at 50 MHz on the 100 MHz system clock. wave_capture
// waits for a rising zero crossing and writes the next 256 samples, converted
// to screen rows, into port A of a 256 x 8 dual-port RAM (ram_1w2r). At the
// same time, wave_display reads that RAM through port B as the beam sweeps
// the screen. It draws the stored waveform across the middle half of the
// screen as white vertical bars joining neighbouring samples. Everything
// else is black. All logic runs on the single clock; the slow sample rate and
// pixel rate are handled with enables, not divided clocks.
//
// Interface: clk, reset (synchronous, active high); xpos[10:0], ypos[9:0]
// and vga_valid from the VGA scan counters; sample[15:0] (two's complement)
// and new_sample from the audio source; vga_rgb[5:0] = {R1,R0,G1,G0,B1,B0},
// combinational from the scan inputs and the display registers. A board top
// is expected to register vga_rgb.
//
// Taken from the lab description: the three blocks and their connections,
// and white on black. This design's own choice: the read/write port's read
// data is not used, since the capture side only writes.
module wave_display_top
  import wave_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic [X_W-1:0]      xpos,
  input  logic [Y_W-1:0]      ypos,
  input  logic                vga_valid,
  output logic [RGB_W-1:0]    vga_rgb,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic                new_sample
);

  addr_t write_address, read_address;
  word_t write_sample, read_value, porta_read;
  logic  write_enable, valid_pixel;

  wave_capture u_capture (
    .clk             (clk),
    .reset           (reset),
    .new_sample_ready(new_sample),
    .new_sample_in   (sample),
    .write_address   (write_address),
    .write_enable    (write_enable),
    .write_sample    (write_sample)
  );

  ram_1w2r #(.WIDTH(DATA_W), .ADDR_W(ADDR_W)) u_ram (
    .clk  (clk),
    .wea  (write_enable),
    .addra(write_address),
    .dina (write_sample),
    .douta(porta_read),
    .addrb(read_address),
    .doutb(read_value)
  );

  wave_display u_display (
    .clk         (clk),
    .reset       (reset),
    .xpos        (xpos),
    .ypos        (ypos),
    .vga_valid   (vga_valid),
    .read_address(read_address),
    .read_value  (read_value),
    .valid_pixel (valid_pixel)
  );

  assign vga_rgb = valid_pixel ? RGB_WHITE : RGB_BLACK;

endmodule
