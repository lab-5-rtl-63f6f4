// ram_1w2r: dual-port waveform buffer, DEPTH words of WIDTH bits
// (256 x 8 by default).
//
// Port A is a read/write port and port B a read-only port. The two run on
// the same clock and are independent. Both ports read synchronously: the
// address is registered on a clock edge and the data appear after that
// edge, one cycle of latency. When port A writes, douta returns the word's
// old contents (read-first). The same read-first rule holds when port B
// reads the address that port A writes in the same cycle: doutb then gives
// the old word. The memory has no reset, as in a block RAM. The contents
// start as zero in simulation only.
//
// Taken from the lab description: the 256 x 8 size, one read/write port and
// one read port, and the one-cycle read latency. The read-first behaviour on
// a collision is this design's choice, because the description leaves the
// collision case open.
module ram_1w2r #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  // port A: read/write
  input  logic              wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [WIDTH-1:0]  dina,
  output logic [WIDTH-1:0]  douta,
  // port B: read only
  input  logic [ADDR_W-1:0] addrb,
  output logic [WIDTH-1:0]  doutb
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wea) mem[addra] <= dina;
    douta <= mem[addra];
    doutb <= mem[addrb];
  end

endmodule
