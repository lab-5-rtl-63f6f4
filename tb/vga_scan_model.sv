// vga_scan_model: behavioural stand-in for the VGA scan counters, used only
// by testbenches.
//
// On the 100 MHz system clock it produces X and Y positions that sweep the
// screen row by row from (0, 0). X steps once every PIX_DIV clocks (50 MHz
// pixel rate). vga_valid is high while X < H_VISIBLE and Y < V_VISIBLE. The
// visible 1288 x 480 area follows the scan's coordinate ranges. The blanking
// lengths (H_TOTAL, V_TOTAL) are placeholders for the real driver's, and no
// sync pulses are modelled. frame_start pulses in the first cycle of (0, 0).
module vga_scan_model #(
  parameter int unsigned PIX_DIV   = 2,
  parameter int unsigned H_VISIBLE = 1288,
  parameter int unsigned H_TOTAL   = 1600,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_TOTAL   = 525
) (
  input  logic        clk,
  input  logic        reset,
  output logic [10:0] xpos,
  output logic [9:0]  ypos,
  output logic        vga_valid,
  output logic        frame_start
);
  int unsigned div;

  always_ff @(posedge clk) begin
    if (reset) begin
      div <= 0; xpos <= '0; ypos <= '0;
    end else if (div == PIX_DIV - 1) begin
      div <= 0;
      if (xpos == 11'(H_TOTAL - 1)) begin
        xpos <= '0;
        ypos <= (ypos == 10'(V_TOTAL - 1)) ? '0 : ypos + 1'b1;
      end else begin
        xpos <= xpos + 1'b1;
      end
    end else begin
      div <= div + 1;
    end
  end

  assign vga_valid   = (xpos < 11'(H_VISIBLE)) && (ypos < 10'(V_VISIBLE));
  assign frame_start = !reset && (xpos == '0) && (ypos == '0) && (div == 0);
endmodule
