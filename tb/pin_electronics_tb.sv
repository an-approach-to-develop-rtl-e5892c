// pin_electronics_tb: self-checking test of the pin drivers and comparators.
//
// Loads direction and mask registers, applies vectors with fire and checks
// that the driven pins and enables follow one clock later and hold until
// the next fire. A loopback DUT model copies the driven pins to pin_in and
// returns chosen values on the watched pins; compares with and without
// mismatches check ack, fail and fail_pins one clock after fire, that
// driven and unmasked pins never fail, and that a compare sees the pins
// two clocks before fire (the synchroniser). Watchdog included.
module pin_electronics_tb;
  import tester_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic [PINS-1:0] vector = '0;
  logic            fire = 1'b0, compare = 1'b0, dir_load = 1'b0, mask_load = 1'b0;
  logic [PINS-1:0] pin_out, pin_oe, pin_in;
  logic            ack, fail;
  logic [PINS-1:0] fail_pins;
  logic [PINS-1:0] dut_drive = '0;
  int              checks = 0, failures = 0;

  pin_electronics dut (.*);

  // Board model: a pin carries the tester's value where the tester drives,
  // otherwise the DUT's value.
  assign pin_in = (pin_oe & pin_out) | (~pin_oe & dut_drive);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic chk(input logic [PINS-1:0] got, input logic [PINS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_regs(input logic [PINS-1:0] dir, input logic [PINS-1:0] mask);
    vector = dir; dir_load = 1'b1; tick(); dir_load = 1'b0;
    vector = mask; mask_load = 1'b1; tick(); mask_load = 1'b0;
  endtask

  task automatic apply(input logic [PINS-1:0] v, input logic cmp);
    vector = v; fire = 1'b1; compare = cmp;
    tick();
    fire = 1'b0; compare = 1'b0;
  endtask

  initial begin
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    chk(pin_oe, '0, "no pin driven after reset");
    // Tester drives the low byte; the DUT drives the rest; compare bits 8..15.
    load_regs(32'h0000_00FF, 32'h0000_FF00);
    chk(pin_oe, 32'h0000_00FF, "direction register");
    apply(32'h1234_56A5, 1'b0);
    chk(pin_out & pin_oe, 32'h0000_00A5, "driven value");
    chk({31'b0, ack}, 32'd1, "ack after drive");
    chk({31'b0, fail}, 32'd0, "no fail on drive-only vector");
    tick();
    chk({31'b0, ack}, 32'd0, "ack is one clock");
    chk(pin_out & pin_oe, 32'h0000_00A5, "drive held");
    // Matching compare.
    dut_drive = 32'hDEAD_3C00;
    tick(); tick();
    apply(32'h0000_3C5A, 1'b1);
    chk({31'b0, ack}, 32'd1, "ack after compare");
    chk({31'b0, fail}, 32'd0, "matching compare passes");
    chk(pin_out & pin_oe, 32'h0000_005A, "compare vector also drives");
    // Mismatch in bits 9 and 12, plus differences on unmasked bits.
    dut_drive = 32'h0000_2C00 ^ 32'h0000_1200;
    tick(); tick();
    apply(32'hFFFF_2C00, 1'b1);
    chk({31'b0, fail}, 32'd1, "mismatch fails");
    chk(fail_pins, 32'h0000_1200, "failing pins");
    tick();
    chk({31'b0, fail}, 32'd0, "fail is one clock");
    // Synchroniser: a change one clock before fire is not seen yet.
    dut_drive = 32'h0000_7700;
    tick(); tick();
    dut_drive = 32'h0000_8800;
    apply(32'h0000_7700, 1'b1);
    chk({31'b0, fail}, 32'd0, "compare sees pins two clocks back");
    tick();
    // Random vectors, directions and masks against a reference.
    for (int n = 0; n < 500; n++) begin
      logic [PINS-1:0] dir, mask, v, d, exp_fail;
      dir  = $urandom();
      mask = $urandom();
      v    = $urandom();
      d    = $urandom();
      load_regs(dir, mask);
      dut_drive = d;
      tick(); tick();
      apply(v, 1'b1);
      exp_fail = (d ^ v) & ~dir & mask;
      chk(fail_pins, exp_fail, "random failing pins");
      chk({31'b0, fail}, {31'b0, exp_fail != '0}, "random fail");
      chk(pin_out & pin_oe, v & dir, "random drive");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
