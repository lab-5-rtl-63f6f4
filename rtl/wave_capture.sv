// wave_capture: captures one 256-sample stretch of audio into the waveform
// RAM, starting at a rising zero crossing.
//
// A two-state FSM does the work. In ARMED, the address register is held at
// zero. Each new sample is compared with the previous one. A negative
// sample followed by a non-negative one is a rising zero crossing. The
// crossing sample itself, the first non-negative one, is written to address
// 0 in the same cycle, and the FSM moves to ACTIVE with the address at 1.
// In ACTIVE, every new sample is written at the address register, which then
// increments. When the address wraps from 255 to 0, the FSM returns to
// ARMED. So one capture is exactly 256 consecutive samples. Samples are only
// looked at when new_sample_ready pulses. The module runs on the system
// clock with that pulse as an enable.
//
// Interface: new_sample_ready is a one-cycle pulse and new_sample_in is valid
// with it. The write port (write_enable, write_address, write_sample) is
// combinational from the inputs and the state, so a write happens in the
// same cycle as the pulse. Each sample is converted to an unsigned screen
// row (wave_pkg::sample_to_row) before it is stored.
//
// Taken from the lab description: the two states, the zero-crossing rule,
// the 256-sample capture, the first positive sample at address 0, and the
// return to ARMED on wrap. This design's own choices: zero counts as
// positive, and the previous sample is remembered in both states. The exact
// sample-to-row conversion is also this design's choice.
module wave_capture
  import wave_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                new_sample_ready,
  input  logic [SAMPLE_W-1:0] new_sample_in,
  output logic [ADDR_W-1:0]   write_address,
  output logic                write_enable,
  output logic [DATA_W-1:0]   write_sample
);

  cap_state_t state;
  addr_t      addr;
  logic       prev_negative;   // sign of the previous new sample
  logic       crossing;        // negative followed by non-negative

  assign crossing = new_sample_ready && prev_negative && !new_sample_in[SAMPLE_W-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= CAP_ARMED;
      addr          <= '0;
      prev_negative <= 1'b0;
    end else begin
      if (new_sample_ready) prev_negative <= new_sample_in[SAMPLE_W-1];
      unique case (state)
        CAP_ARMED: begin
          addr <= '0;
          if (crossing) begin
            // the crossing sample goes to address 0 in this cycle
            addr  <= addr_t'(1);
            state <= CAP_ACTIVE;
          end
        end
        CAP_ACTIVE: begin
          if (new_sample_ready) begin
            addr <= addr + 1'b1;
            if (addr == addr_t'(DEPTH - 1)) state <= CAP_ARMED;
          end
        end
        default: state <= CAP_ARMED;
      endcase
    end
  end

  assign write_enable  = (state == CAP_ACTIVE) ? new_sample_ready : crossing;
  assign write_address = addr;
  assign write_sample  = sample_to_row(sample_t'(new_sample_in));

  // The RAM is written only when a new sample arrives.
  a_write_on_sample: assert property (@(posedge clk) disable iff (reset)
    write_enable |-> new_sample_ready);

endmodule
