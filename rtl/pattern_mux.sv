// pattern_mux: the multiplexer that composes each test vector.
//
// In the normal mode (src = SRC_NONE) the vector is the pattern field of
// the program word. In a mixing mode a window of the pattern, win_w pins
// starting at pin win_lsb, is replaced by the low win_w bits of the word
// read from the VAR, OP or ET array; this is how a symbolic value in the
// test program (var, op or et) becomes a real value. Window pins past the
// last tester pin are dropped, and win_w above DW is taken as DW. The
// mixing of program and data words through a window set by the instruction
// follows the architecture; the lsb-plus-width encoding is this design's
// choice. Purely combinational.
module pattern_mux
  import tester_pkg::*;
(
  input  logic [PINS-1:0]      pattern,
  input  logic [DW-1:0]        data,
  input  src_e                 src,
  input  logic [WIN_LSB_W-1:0] win_lsb,
  input  logic [WIN_W_W-1:0]   win_w,
  output logic [PINS-1:0]      vector
);

  logic [WIN_W_W-1:0]     width;
  logic [DW-1:0]          field_mask;
  logic [PINS-1:0]        win_mask, win_data;

  always_comb begin
    width      = (win_w > WIN_W_W'(DW)) ? WIN_W_W'(DW) : win_w;
    field_mask = DW'(({{DW{1'b0}}, 1'b1} << width) - 1'b1);
    // Bits shifted past the last pin are lost, which drops them.
    win_mask   = PINS'(field_mask) << win_lsb;
    win_data   = PINS'(data & field_mask) << win_lsb;
    if (src == SRC_NONE) begin
      vector = pattern;
    end else begin
      vector = (pattern & ~win_mask) | win_data;
    end
  end

endmodule
