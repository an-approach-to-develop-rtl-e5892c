// pin_electronics: digital side of the tester's pin drivers and comparators.
//
// Every pin is either driven by the tester or watched by it, as set by the
// direction register (1 = tester drives). The compare mask says which of
// the watched pins are checked; the rest, such as the DUT's address bus
// during memory pseudo-emulation, are ignored. Both registers are loaded
// from the vector with dir_load and mask_load.
//
// On 'fire' from event analysis the block latches the vector into the drive
// register, so the driven pins change on the next clock and hold until the
// next vector. If 'compare' is high at the same time, the synchronised pin
// levels are compared with the vector on every masked, non-driven pin. One
// cycle after fire, 'ack' is high for one cycle with 'fail' and the
// failing pins in fail_pins.
//
// The DUT is asynchronous to the tester, so pin_in passes the same two
// flip-flops as the event lines in event_analysis: a compare sees the pins
// as they were at the instant the event was seen. Driver levels, timing
// edges and analog comparators are outside this model. The bidirectional
// pins are split into pin_out, pin_oe and pin_in. The block's existence
// and its place between multiplexer, control block and DUT follow the
// architecture; the registers and timing are this design's choices.
module pin_electronics
  import tester_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PINS-1:0] vector,
  input  logic            fire,
  input  logic            compare,
  input  logic            dir_load,
  input  logic            mask_load,
  output logic [PINS-1:0] pin_out,
  output logic [PINS-1:0] pin_oe,
  input  logic [PINS-1:0] pin_in,
  output logic            ack,
  output logic            fail,
  output logic [PINS-1:0] fail_pins
);

  logic [PINS-1:0] dir_q, mask_q, drive_q, sync1, sync2, mismatch;

  assign pin_out  = drive_q;
  assign pin_oe   = dir_q;
  assign mismatch = (sync2 ^ vector) & mask_q & ~dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_q     <= '0;
      mask_q    <= '0;
      drive_q   <= '0;
      sync1     <= '0;
      sync2     <= '0;
      ack       <= 1'b0;
      fail      <= 1'b0;
      fail_pins <= '0;
    end else begin
      sync1 <= pin_in;
      sync2 <= sync1;
      if (dir_load)  dir_q  <= vector;
      if (mask_load) mask_q <= vector;
      if (fire)      drive_q <= vector;
      ack       <= fire;
      fail      <= fire && compare && (mismatch != '0);
      fail_pins <= (fire && compare) ? mismatch : '0;
    end
  end

endmodule
