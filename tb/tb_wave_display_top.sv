// tb_wave_display_top: end-to-end test of the waveform display at its
// default size.
//
// A behavioural scan model sweeps the screen: 1288 x 480 visible, X held for
// two 100 MHz clocks. An audio source plays sine tones. It sends one sample
// every 2083 clocks (48 kHz) with a one-cycle new_sample strobe, and its
// frequency and amplitude change from phase to phase. Starting at a random
// point of the wave, the source first plays some noise. The testbench keeps
// its own shadow of the waveform buffer. For that shadow it applies the
// capture rules to the same sample stream: wait for a negative sample
// followed by a non-negative one, store 256 samples from there, and convert
// each to row = ((sample + 32768) >> 9) + 56.
//
// Each phase plays audio long enough for captures to finish while the screen
// is being drawn, then stops the audio. It then checks every pixel of a whole
// frame against the picture expected from the shadow: white where Y/2 lies
// between neighbouring stored samples A-1 and A, for X = 2A+257 and 2A+258,
// and black elsewhere, including outside the visible area. Counted
// mechanisms, each required at least once: capture started on a zero
// crossing, capture ended on address wrap, a crossing ignored during a
// capture, a sample ignored while armed, RAM written while the screen is
// drawn, rising, falling and flat segments drawn, pixels blanked outside the
// visible area. After the first phase, the picture must change when a new
// tone is captured.
module tb_wave_display_top;
  import wave_pkg::*;

  localparam int unsigned SAMPLE_PERIOD = 2083;  // 100 MHz / 48 kHz
  localparam int unsigned FRAME_CYCLES  = 2 * 1600 * 525;  // scan model frame

  logic clk = 1'b0, reset = 1'b1;
  logic [X_W-1:0] xpos;
  logic [Y_W-1:0] ypos;
  logic vga_valid, frame_start;
  logic [RGB_W-1:0] vga_rgb;
  logic [SAMPLE_W-1:0] sample = '0;
  logic new_sample = 1'b0;

  int checks = 0, failures = 0;
  int n_capture_start = 0, n_capture_wrap = 0, n_cross_ignored = 0, n_armed_ignored = 0;
  int n_write_while_drawing = 0, n_rising = 0, n_falling = 0, n_flat = 0, n_blanked = 0;
  int frame_diffs = 0;

  vga_scan_model scan (.clk, .reset, .xpos, .ypos, .vga_valid, .frame_start);
  wave_display_top dut (.*);

  always #5 clk = ~clk;

  // shadow of the waveform buffer and of the capture rules
  logic [7:0] shadow [256];
  logic [7:0] last_frame [256];
  bit s_active = 0, s_prev_neg = 0;
  int s_addr = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL %s at %0t", msg, $time);
  endtask

  task automatic shadow_sample(input int s);
    bit is_cross;
    is_cross = s_prev_neg && (s >= 0);
    if (s_active) begin
      if (is_cross) n_cross_ignored++;
      shadow[s_addr] = 8'(((s + 32768) >>> 9) + 56);
      if (s_addr == 255) begin
        s_active = 0; s_addr = 0; n_capture_wrap++;
      end else s_addr++;
    end else if (is_cross) begin
      shadow[0] = 8'(((s + 32768) >>> 9) + 56);
      s_active = 1; s_addr = 1; n_capture_start++;
    end else n_armed_ignored++;
    s_prev_neg = (s < 0);
  endtask

  // play n samples of a tone (or noise when period == 0)
  task automatic play(input int n, input int amp, input real period, input real phase0);
    int s;
    for (int i = 0; i < n; i++) begin
      repeat (SAMPLE_PERIOD - 1) @(negedge clk);
      if (period == 0.0) s = int'($signed(16'($urandom)));
      else s = $rtoi(amp * $sin(phase0 + 2.0 * 3.14159265 * i / period));
      sample = 16'(s);
      new_sample = 1'b1;
      if (vga_valid && xpos >= 259 && xpos <= 768 && s_active) n_write_while_drawing++;
      shadow_sample(s);
      @(negedge clk);
      new_sample = 1'b0;
    end
  endtask

  function automatic bit expected(int x, int y, bit v);
    int a, p, c, ye;
    if (!v || x < 259 || x > 768) return 0;
    a = (x - 257) / 2;
    p = shadow[a - 1]; c = shadow[a]; ye = y / 2;
    return (ye >= (p < c ? p : c)) && (ye <= (p < c ? c : p));
  endfunction

  // check one full frame, every cycle, against the shadow
  task automatic check_frame();
    bit e;
    int a, bad;
    bad = 0;
    @(posedge frame_start);
    #1;
    for (int cyc = 0; cyc < FRAME_CYCLES; cyc++) begin
      e = expected(int'(xpos), int'(ypos), vga_valid);
      checks++;
      if (vga_rgb !== (e ? RGB_WHITE : RGB_BLACK)) begin
        bad++;
        fail($sformatf("pixel X=%0d Y=%0d rgb=%b expected %0b", xpos, ypos, vga_rgb, e));
      end
      if (!vga_valid && ((xpos >= 259 && xpos <= 768) || ypos >= 480)) n_blanked++;
      if (e && xpos >= 259 && xpos <= 768) begin
        a = (int'(xpos) - 257) / 2;
        if (shadow[a] > shadow[a-1]) n_rising++;
        else if (shadow[a] < shadow[a-1]) n_falling++;
        else n_flat++;
      end
      @(negedge clk);
    end
    $display("frame checked at %0t, %0d mismatches", $time, bad);
  endtask

  initial begin
    real ph;
    for (int i = 0; i < 256; i++) shadow[i] = '0;
    repeat (4) @(negedge clk);
    reset = 0;
    // phase 1: noise, then a 440 Hz full-scale tone starting at a random phase
    ph = $urandom_range(0, 359) * 3.14159265 / 180.0;
    play(20, 0, 0.0, 0.0);
    play(900, 32767, 48000.0 / 440.0, ph);
    check_frame();
    for (int i = 0; i < 256; i++) last_frame[i] = shadow[i];
    // phase 2: a quieter, higher tone
    play(700, 12000, 48000.0 / 1000.0, 1.0);
    for (int i = 0; i < 256; i++) if (last_frame[i] != shadow[i]) frame_diffs++;
    check_frame();
    // phase 3: a low tone with a square-ish clipped wave (flat runs)
    ph = 0.5;
    for (int i = 0; i < 600; i++) begin
      int s;
      repeat (SAMPLE_PERIOD - 1) @(negedge clk);
      s = $rtoi(60000.0 * $sin(ph + 2.0 * 3.14159265 * i / 160.0));
      if (s > 20000) s = 20000;
      if (s < -20000) s = -20000;
      sample = 16'(s); new_sample = 1'b1;
      shadow_sample(s);
      @(negedge clk);
      new_sample = 1'b0;
    end
    check_frame();

    checks++; if (n_capture_start == 0) fail("no capture started");
    checks++; if (n_capture_wrap == 0) fail("no capture wrapped");
    checks++; if (n_cross_ignored == 0) fail("no crossing ignored while active");
    checks++; if (n_armed_ignored == 0) fail("no sample ignored while armed");
    checks++; if (n_write_while_drawing == 0) fail("no write while drawing");
    checks++; if (n_rising == 0) fail("no rising segment drawn");
    checks++; if (n_falling == 0) fail("no falling segment drawn");
    checks++; if (n_flat == 0) fail("no flat segment drawn");
    checks++; if (n_blanked == 0) fail("no blanked pixel checked");
    checks++; if (frame_diffs == 0) fail("picture did not change with a new tone");
    $display("captures started=%0d wrapped=%0d crossings ignored=%0d armed ignored=%0d",
             n_capture_start, n_capture_wrap, n_cross_ignored, n_armed_ignored);
    $display("writes while drawing=%0d rising=%0d falling=%0d flat=%0d blanked=%0d changed words=%0d",
             n_write_while_drawing, n_rising, n_falling, n_flat, n_blanked, frame_diffs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
