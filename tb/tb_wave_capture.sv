// tb_wave_capture: self-checking test of the zero-crossing capture FSM.
//
// A stream of audio samples is fed with new_sample_ready pulses spaced a
// random 1 to 6 clocks apart. The stream mixes sine bursts of several
// periods and amplitudes, random noise and runs of zero. A reference model
// in the testbench, written from the capture rules alone, predicts every
// RAM write: which sample triggers a capture, the address of each write, and
// the converted word. Every cycle, the write port of the module is compared
// with the model. The test also checks these points:
//   - each capture is exactly 256 writes, to addresses 0..255 in order;
//   - the word at address 0 comes from the first non-negative sample, and
//     that sample follows a negative one;
//   - no write happens without a new_sample_ready pulse;
//   - between captures, at least one crossing is missed because the FSM is
//     still active (re-arming only happens after the wrap);
//   - the conversion is checked against a worked formula: row =
//     ((sample + 32768) >> 9) + 56.
module tb_wave_capture;
  import wave_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic new_sample_ready = 1'b0;
  logic [SAMPLE_W-1:0] new_sample_in = '0;
  logic [ADDR_W-1:0] write_address;
  logic write_enable;
  logic [DATA_W-1:0] write_sample;

  int checks = 0, failures = 0;
  int captures = 0, ignored_crossings = 0, writes_in_capture = 0;

  wave_capture dut (.*);

  always #5 clk = ~clk;

  // reference model state
  bit m_active = 0;
  int m_addr = 0;
  bit m_prev_neg = 0;

  function automatic int exp_row(int s);
    return ((s + 32768) >>> 9) + 56;
  endfunction

  function automatic int clamp16(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // drive one sample: pulse for one cycle, check the write port in that cycle
  task automatic send(input int s);
    bit is_cross, exp_we;
    int exp_addr;
    new_sample_in = SAMPLE_W'(s);
    new_sample_ready = 1'b1;
    is_cross = m_prev_neg && (s >= 0);
    exp_we = m_active || is_cross;
    exp_addr = m_active ? m_addr : 0;
    #1;
    checks++;
    if (write_enable !== exp_we) fail($sformatf("write_enable %0b expected %0b (sample %0d)", write_enable, exp_we, s));
    if (exp_we) begin
      checks++;
      if (write_address !== ADDR_W'(exp_addr)) fail($sformatf("address %0d expected %0d", write_address, exp_addr));
      checks++;
      if (write_sample !== DATA_W'(exp_row(s))) fail($sformatf("row %0d expected %0d for sample %0d", write_sample, exp_row(s), s));
      if (!m_active) begin
        // start of a capture: first non-negative sample after a negative one
        checks++;
        if (!(s >= 0 && m_prev_neg)) fail("capture did not start on a rising crossing");
        m_active = 1; m_addr = 1; writes_in_capture = 1;
      end else begin
        writes_in_capture++;
        if (m_addr == 255) begin
          m_active = 0; m_addr = 0; captures++;
          checks++;
          if (writes_in_capture != 256) fail($sformatf("capture had %0d writes", writes_in_capture));
        end else m_addr++;
      end
    end
    if (m_active && is_cross && exp_addr != 0) ignored_crossings++;
    m_prev_neg = (s < 0);
    @(negedge clk);
    new_sample_ready = 1'b0;
    // gap cycles: no writes may happen
    repeat ($urandom_range(0, 5)) begin
      new_sample_in = SAMPLE_W'($urandom);
      #1;
      checks++;
      if (write_enable) fail("write without a new sample");
      @(negedge clk);
    end
  endtask

  initial begin
    real ph;
    int amp, period, smp;
    @(negedge clk);
    @(negedge clk);
    // samples while in reset must not start anything
    new_sample_ready = 1; new_sample_in = 16'h8000;
    @(negedge clk);
    new_sample_ready = 0; reset = 0;
    @(negedge clk);
    // a positive start must not trigger (no preceding negative)
    for (int i = 0; i < 5; i++) send(1000 + i);
    for (int burst = 0; burst < 16; burst++) begin
      amp = (burst % 4 == 0) ? 32767 : $urandom_range(1, 32000);
      period = $urandom_range(8, 300);
      ph = $urandom_range(0, 359) * 3.14159265 / 180.0;
      for (int i = 0; i < 700; i++) begin
        smp = $rtoi(amp * $sin(ph + 2.0 * 3.14159265 * i / period));
        smp = clamp16(smp);
        send(smp);
      end
      // noise and zero runs between bursts
      for (int i = 0; i < 50; i++) send(int'($signed(16'($urandom))));
      for (int i = 0; i < 20; i++) send(0);
      send(-1); send(0);
      send(-32768); send(32767);
    end
    checks++;
    if (captures < 20) fail($sformatf("only %0d captures completed", captures));
    checks++;
    if (ignored_crossings == 0) fail("no crossing arrived while a capture was active");
    $display("captures=%0d ignored_crossings=%0d", captures, ignored_crossings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
