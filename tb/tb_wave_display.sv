// tb_wave_display: self-checking test of the waveform display logic.
//
// The display reads a 256 x 8 memory modelled in the testbench, with one
// clock of read latency like the real RAM. Row by row, the testbench sweeps
// X over 0..1599, holding each X for two clocks. It picks a random Y for the
// row and drops vga_valid at random. Between rows it loads new memory
// contents: random words, ramps, a sine, or constant runs. In every cycle two
// things are checked against values worked out from the memory alone:
//   - read_address = {X[9], X[7:1]};
//   - valid_pixel = vga_valid and 259 <= X <= 768 and Y[8:1] lies between
//     mem[A-1] and mem[A] inclusive, where A = (X - 257) / 2.
// The second rule is the intended picture: the segment joining samples A-1
// and A fills X = 2A+257 and 2A+258. So the first segment starts where the
// older sample is word 0, and the last ends where the newer one is word 255.
// The test counts lit pixels on rising, falling and flat segments, pixels
// outside the X window (including X >= 1024, whose low ten bits fall inside
// it), and pixels masked by vga_valid. It fails if any of these never occurs.
module tb_wave_display;
  import wave_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic [X_W-1:0] xpos = '0;
  logic [Y_W-1:0] ypos = '0;
  logic vga_valid = 1'b0;
  logic [ADDR_W-1:0] read_address;
  logic [DATA_W-1:0] read_value;
  logic valid_pixel;

  int checks = 0, failures = 0;
  int lit_rising = 0, lit_falling = 0, lit_flat = 0, outside_x_hi = 0, masked = 0, unlit_in_window = 0;

  logic [DATA_W-1:0] mem [256];

  wave_display dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) read_value <= mem[read_address];

  task automatic fill(input int kind);
    for (int i = 0; i < 256; i++) begin
      case (kind)
        0: mem[i] = 8'($urandom);
        1: mem[i] = 8'(i);
        2: mem[i] = 8'(255 - i);
        3: mem[i] = 8'($rtoi(120.0 + 60.0 * $sin(2.0 * 3.14159265 * i / 97.0)));
        default: mem[i] = 8'((i / 16) * 13);
      endcase
    end
  endtask

  function automatic bit expected(int x, int y, bit v);
    int a, p, c, ye;
    if (!v || x < 259 || x > 768) return 0;
    a = (x - 257) / 2;
    p = mem[a - 1]; c = mem[a]; ye = (y % 512) / 2;
    return (ye >= (p < c ? p : c)) && (ye <= (p < c ? c : p));
  endfunction

  initial begin
    int y, a;
    bit v, e;
    fill(3);
    repeat (3) @(negedge clk);
    reset = 0;
    for (int row = 0; row < 300; row++) begin
      y = (row < 20) ? row * 24 : $urandom_range(0, 479);
      if (row % 7 == 3) y = $urandom_range(480, 1023);  // Y beyond the screen
      for (int x = 0; x < 1600; x++) begin
        v = (x < 1288) && (($urandom % 16) != 0);
        for (int k = 0; k < 2; k++) begin
          xpos = 11'(x); ypos = 10'(y); vga_valid = v;
          #1;
          checks++;
          if (read_address !== {xpos[9], xpos[7:1]}) begin
            failures++;
            $display("FAIL read_address %0d for X=%0d", read_address, x);
          end
          e = expected(x, y, v);
          checks++;
          if (valid_pixel !== e) begin
            failures++;
            if (failures < 20) $display("FAIL pixel X=%0d Y=%0d got %0b expected %0b", x, y, valid_pixel, e);
          end
          if (x >= 259 && x <= 768) begin
            a = (x - 257) / 2;
            if (e && mem[a] > mem[a-1]) lit_rising++;
            if (e && mem[a] < mem[a-1]) lit_falling++;
            if (e && mem[a] == mem[a-1]) lit_flat++;
            if (!v && expected(x, y, 1)) masked++;
            if (v && !e) unlit_in_window++;
          end
          if (x >= 1024 + 259 && x <= 1024 + 768 && v && !e) outside_x_hi++;
          @(negedge clk);
        end
      end
      // new contents for the next row, loaded during horizontal blanking
      if (row % 5 == 4) fill($urandom_range(0, 4));
    end
    checks++;
    if (lit_rising == 0 || lit_falling == 0 || lit_flat == 0 || outside_x_hi == 0 || masked == 0 || unlit_in_window == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("rising=%0d falling=%0d flat=%0d x_ge_1024=%0d masked=%0d unlit=%0d",
             lit_rising, lit_falling, lit_flat, outside_x_hi, masked, unlit_in_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
