// prog_mem_tb: self-checking test of the test program memory.
//
// Writes random program words to random addresses of a 64-word memory,
// keeps a reference copy, then reads every written address back and checks
// the word appears exactly one clock after rd_en and is held while rd_en is
// low. A watchdog ends the run with a failure if it hangs.
module prog_mem_tb;
  import tester_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  prog_word_t    wr_data = '0, rd_data;
  prog_word_t    ref_mem [DEPTH];
  logic          written [DEPTH];
  int            checks = 0, failures = 0;

  prog_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic prog_word_t rand_word();
    logic [$bits(prog_word_t)-1:0] w;
    for (int i = 0; i < $bits(prog_word_t); i += 32) w = {w, $urandom()};
    return prog_word_t'(w);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (written[i]) written[i] = 1'b0;
    @(posedge clk);
    // Download phase.
    for (int n = 0; n < 200; n++) begin
      wr_en   <= 1'b1;
      wr_addr <= AW'($urandom_range(DEPTH - 1));
      wr_data <= rand_word();
      @(posedge clk);
      ref_mem[wr_addr] = wr_data;
      written[wr_addr] = 1'b1;
    end
    wr_en <= 1'b0;
    // Read back with one-cycle latency.
    for (int a = 0; a < DEPTH; a++) begin
      if (!written[a]) continue;
      rd_en   <= 1'b1;
      rd_addr <= AW'(a);
      @(posedge clk);
      rd_en   <= 1'b0;
      rd_addr <= AW'(a + 1);
      #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: read %h expected %h", a, rd_data, ref_mem[a]);
      end
      // Output must hold while no read is issued.
      @(posedge clk); #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: word not held", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
