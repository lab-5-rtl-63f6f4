// tb_ram_1w2r: self-checking test of the 256 x 8 dual-port waveform RAM.
//
// Random writes on port A and random reads on both ports are compared with a
// reference array kept in the testbench. Reads must return the word one
// clock after the address is presented. When a port reads the address being
// written in the same cycle, it must return the old word (read-first). Every
// address is first written with a known pattern and read back through port
// B. Outputs must not move when the addresses change between clock edges.
// A watchdog ends the run if it hangs.
module tb_ram_1w2r;
  localparam int unsigned WIDTH = 8, ADDR_W = 8, DEPTH = 256;

  logic clk = 1'b0;
  logic wea;
  logic [ADDR_W-1:0] addra, addrb;
  logic [WIDTH-1:0] dina, douta, doutb;
  int checks = 0, failures = 0;
  int collisions = 0;

  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;

  ram_1w2r dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    wea = 0; addra = 0; addrb = 0; dina = 0;
    @(negedge clk);
    // fill every word with a pattern through port A
    for (int i = 0; i < DEPTH; i++) begin
      wea = 1; addra = ADDR_W'(i); dina = WIDTH'((i * 37 + 11) % 256);
      model[i] = dina;
      @(negedge clk);
    end
    wea = 0;
    // read everything back through port B, one cycle latency
    for (int i = 0; i < DEPTH; i++) begin
      addrb = ADDR_W'(i);
      @(negedge clk);
      check(doutb, WIDTH'((i * 37 + 11) % 256), "fill readback");
    end
    // random traffic with read-first expectations
    exp_a = douta; exp_b = doutb;
    for (int n = 0; n < 4000; n++) begin
      wea   = ($urandom % 2) == 0;
      addra = ADDR_W'($urandom);
      addrb = (($urandom % 4) == 0) ? addra : ADDR_W'($urandom);
      dina  = WIDTH'($urandom);
      // new addresses must not reach the outputs before the clock edge
      #1;
      check(douta, exp_a, "port A held until the edge");
      check(doutb, exp_b, "port B held until the edge");
      exp_a = model[addra];
      exp_b = model[addrb];
      if (wea && addra == addrb) collisions++;
      if (wea) model[addra] = dina;
      @(negedge clk);
      check(douta, exp_a, "port A read");
      check(doutb, exp_b, "port B read");
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("FAIL no same-address read/write collision was exercised");
    end
    $display("collisions exercised: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
