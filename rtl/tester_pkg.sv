// tester_pkg: widths, encodings and the program word layout shared by the
// blocks of the algorithmic test system.
//
// A test is stored compactly as a program P plus three data arrays: VAR
// (values that modify the program from one loop pass to the next), OP
// (operands) and ET (expected results). Every program word carries three
// fields, left to right: an event field (when to apply the vector), an
// instruction field (what to do with it and how to mix data into it) and
// the pattern, one bit per tester pin. The split into these three parts and
// the three arrays follow the architecture this design implements; all
// widths below and the instruction encoding are this design's own choices.
// To change a width, edit the constants here; memory depths are module
// parameters.
package tester_pkg;

  // Tester pins. 8 data + 16 address + 8 control lines of an 8-bit
  // microprocessor board.
  localparam int unsigned PINS      = 32;
  // DUT output lines watched by event analysis.
  localparam int unsigned EV_W      = 4;
  // Width of one word of VAR, OP and ET.
  localparam int unsigned DW        = 8;
  // Address widths of the program memory and of each data array.
  localparam int unsigned PROG_AW   = 10;
  localparam int unsigned DATA_AW   = 8;
  // Field widths of the multiplexer window.
  localparam int unsigned WIN_LSB_W = $clog2(PINS);
  localparam int unsigned WIN_W_W   = $clog2(DW + 1);
  // Width of the failure counter.
  localparam int unsigned ERR_W     = 16;

  // Instruction opcodes.
  //   OP_DRV     : when the event occurs, drive the vector on the tester-driven pins
  //   OP_CMP     : as OP_DRV, and compare the other (masked) pins with the vector
  //   OP_SETDIR  : load the pin direction register from the vector (1 = tester drives)
  //   OP_SETMASK : load the compare mask from the vector (1 = compare this pin)
  //   OP_LOOP    : end of a loop over the array named by src; jump to
  //                pattern[PROG_AW-1:0] until the loop count is reached,
  //                advancing the array's base address by 'offset' each pass
  //   OP_HALT    : end of the test
  typedef enum logic [2:0] {
    OP_DRV     = 3'd0,
    OP_CMP     = 3'd1,
    OP_SETDIR  = 3'd2,
    OP_SETMASK = 3'd3,
    OP_LOOP    = 3'd4,
    OP_HALT    = 3'd5
  } opcode_e;

  // Source of the multiplexer window: SRC_NONE is the normal mode, where
  // the vector comes from the program word alone.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_VAR  = 2'd1,
    SRC_OP   = 2'd2,
    SRC_ET   = 2'd3
  } src_e;

  // Event field: IF (masked event lines == value) THEN apply the vector.
  // mask == 0 means no condition. With edge set, the condition has to
  // become true (it was false one tester clock earlier).
  typedef struct packed {
    logic            edge_only;
    logic [EV_W-1:0] mask;
    logic [EV_W-1:0] value;
  } ev_field_t;

  // Instruction field.
  typedef struct packed {
    opcode_e              op;
    src_e                 src;
    logic [WIN_LSB_W-1:0] win_lsb;  // lowest pin replaced by data
    logic [WIN_W_W-1:0]   win_w;    // number of pins replaced (0..DW)
    logic [DATA_AW-1:0]   offset;   // data address offset; loop stride for OP_LOOP
  } instr_t;

  typedef struct packed {
    ev_field_t       ev;
    instr_t          ins;
    logic [PINS-1:0] pattern;
  } prog_word_t;

endpackage
