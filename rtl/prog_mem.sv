// prog_mem: test program memory block.
//
// Holds the test program, one prog_word_t (event field, instruction field,
// pattern) per address. The host downloads the program through the write
// port before a run; the control block reads one word per fetch. Both ports
// are synchronous to the tester clock: a read issued with rd_en in one
// cycle presents its word on rd_data in the next and holds it until the
// next read. The memory holding the program separately from the data
// arrays follows the architecture; depth and timing are this design's
// choices.
module prog_mem
  import tester_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  prog_word_t               wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output prog_word_t               rd_data
);

  prog_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
