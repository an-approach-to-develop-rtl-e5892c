// data_mem_blocks_tb: self-checking test of the VAR, OP and ET memories.
//
// Fills all three arrays of a 32-word instance with different random
// contents through the shared write port, then reads random (array,
// address) pairs and checks the word of the right array appears one clock
// after rd_en. Also checks that a write to one array leaves the other two
// unchanged, and that reading SRC_NONE gives zero. Watchdog included.
module data_mem_blocks_tb;
  import tester_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  src_e          wr_sel = SRC_VAR, rd_sel = SRC_VAR;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [DW-1:0] ref_mem [4][DEPTH];
  int            checks = 0, failures = 0;

  data_mem_blocks #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input src_e s, input int a, input logic [DW-1:0] exp);
    rd_en   <= 1'b1;
    rd_sel  <= s;
    rd_addr <= AW'(a);
    @(posedge clk);
    rd_en   <= 1'b0;
    #1;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL read %s[%0d] = %h, expected %h", s.name(), a, rd_data, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int s = 1; s < 4; s++) begin
      for (int a = 0; a < DEPTH; a++) begin
        wr_en   <= 1'b1;
        wr_sel  <= src_e'(s);
        wr_addr <= AW'(a);
        wr_data <= DW'($urandom());
        @(posedge clk);
        ref_mem[s][a] = wr_data;
      end
    end
    wr_en <= 1'b0;
    for (int n = 0; n < 300; n++) begin
      int s, a;
      s = $urandom_range(3, 1);
      a = $urandom_range(DEPTH - 1);
      read_check(src_e'(s), a, ref_mem[s][a]);
    end
    // A write to OP must not disturb VAR or ET at the same address.
    wr_en   <= 1'b1;
    wr_sel  <= SRC_OP;
    wr_addr <= AW'(5);
    wr_data <= ~ref_mem[2][5];
    @(posedge clk);
    wr_en <= 1'b0;
    ref_mem[2][5] = ~ref_mem[2][5];
    read_check(SRC_VAR, 5, ref_mem[1][5]);
    read_check(SRC_OP,  5, ref_mem[2][5]);
    read_check(SRC_ET,  5, ref_mem[3][5]);
    read_check(SRC_NONE, 5, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
