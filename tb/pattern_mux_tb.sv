// pattern_mux_tb: self-checking test of the vector multiplexer.
//
// Applies random patterns, data words, sources, window positions and
// widths (including windows that run past the last pin and widths above
// DW) and compares the vector with a bit-by-bit reference: in the normal
// mode the pattern, otherwise the pattern with pins win_lsb..win_lsb+w-1
// taken from data bits 0..w-1. Directed cases cover the Fig. 2 style
// 2-bit instruction field. Watchdog included.
module pattern_mux_tb;
  import tester_pkg::*;

  logic [PINS-1:0]      pattern;
  logic [DW-1:0]        data;
  src_e                 src;
  logic [WIN_LSB_W-1:0] win_lsb;
  logic [WIN_W_W-1:0]   win_w;
  logic [PINS-1:0]      vector;
  int                   checks = 0, failures = 0;

  pattern_mux dut (.*);

  function automatic logic [PINS-1:0] model();
    logic [PINS-1:0] v = pattern;
    int w = (int'(win_w) > int'(DW)) ? int'(DW) : int'(win_w);
    if (src != SRC_NONE)
      for (int i = 0; i < w; i++)
        if (int'(win_lsb) + i < int'(PINS)) v[int'(win_lsb) + i] = data[i];
    return v;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (vector !== model()) begin
      failures++;
      $display("FAIL src=%s lsb=%0d w=%0d pat=%h data=%h: got %h expected %h",
               src.name(), win_lsb, win_w, pattern, data, vector, model());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: 2-bit field at pins 0..1 from VAR, rest from the pattern.
    pattern = 32'hFFFF_FF3C; data = 8'h02; src = SRC_VAR; win_lsb = 0; win_w = 2;
    check();
    checks++;
    if (vector !== 32'hFFFF_FF3E) begin failures++; $display("FAIL directed 1"); end
    // Full byte at pins 8..15 from ET.
    pattern = 32'h0; data = 8'hA5; src = SRC_ET; win_lsb = 8; win_w = 8;
    check();
    checks++;
    if (vector !== 32'h0000_A500) begin failures++; $display("FAIL directed 2"); end
    // Normal mode ignores data.
    pattern = 32'h1234_5678; data = 8'hFF; src = SRC_NONE; win_lsb = 0; win_w = 8;
    check();
    checks++;
    if (vector !== 32'h1234_5678) begin failures++; $display("FAIL directed 3"); end
    for (int n = 0; n < 5000; n++) begin
      pattern = $urandom();
      data    = DW'($urandom());
      src     = src_e'($urandom_range(3));
      win_lsb = WIN_LSB_W'($urandom());
      win_w   = WIN_W_W'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
