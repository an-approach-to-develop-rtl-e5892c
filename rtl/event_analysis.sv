// event_analysis: decides when the current test vector is to be applied.
//
// The test program is a list of IF/THEN/DO clauses: the event field of a
// program word says on which state of the DUT's event outputs the vector is
// applied. The control block loads the field with 'load'; the block is then
// armed and compares the synchronised event lines against it every tester
// clock. The condition is (ev & mask) == (value & mask); with edge_only set
// it must also have been false one clock before, so one long strobe does
// not start two vectors. When the condition holds while armed, 'fire' is
// high for exactly that cycle and the block disarms itself. A field with an
// all-zero mask fires in the first armed cycle. Fire goes straight to the
// pin electronics as their apply/compare strobe.
//
// Timing: the DUT runs from its own clock, so ev_in passes two flip-flops
// first; fire therefore comes two to three tester clocks after the DUT's
// lines change. Coding events on DUT output lines follows the architecture;
// the mask/value/edge encoding and the synchroniser are this design's.
module event_analysis
  import tester_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [EV_W-1:0] ev_in,
  input  logic            load,
  input  ev_field_t       ev_field,
  output logic            fire,
  output logic            armed
);

  logic [EV_W-1:0] sync1, sync2, prev;
  ev_field_t       field_q;
  logic            cond_now, cond_prev, match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      prev  <= '0;
    end else begin
      sync1 <= ev_in;
      sync2 <= sync1;
      prev  <= sync2;
    end
  end

  always_comb begin
    cond_now  = ((sync2 ^ field_q.value) & field_q.mask) == '0;
    cond_prev = ((prev  ^ field_q.value) & field_q.mask) == '0;
    match     = cond_now && (!field_q.edge_only || !cond_prev);
    fire      = armed && match;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      field_q <= '0;
    end else if (load) begin
      armed   <= 1'b1;
      field_q <= ev_field;
    end else if (fire) begin
      armed   <= 1'b0;
    end
  end

endmodule
