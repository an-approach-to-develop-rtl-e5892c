// data_mem_blocks: the three independent data memories VAR, OP and ET.
//
// VAR holds the values that modify the program from one pass of the
// program loop to the next, OP the operands, ET the expected results.
// Keeping them in separate memories, apart from the program, follows the
// architecture; it lets the tester build long vector sequences from short
// downloads. The host writes any of the three through one port (wr_sel
// picks the array). The control block reads one array per vector: rd_sel
// and rd_addr with rd_en in one cycle, the word on rd_data in the next, held
// until the next read. rd_sel = SRC_NONE reads nothing useful (zero).
// Depth and width are this design's choices.
module data_mem_blocks
  import tester_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  src_e                     wr_sel,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [DW-1:0]            wr_data,
  input  logic                     rd_en,
  input  src_e                     rd_sel,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data
);

  logic [DW-1:0] var_q, op_q, et_q;
  src_e          sel_q;

  data_mem #(.DEPTH(DEPTH), .WIDTH(DW)) u_var (
    .clk, .wr_en(wr_en && wr_sel == SRC_VAR), .wr_addr, .wr_data,
    .rd_en(rd_en && rd_sel == SRC_VAR), .rd_addr, .rd_data(var_q)
  );
  data_mem #(.DEPTH(DEPTH), .WIDTH(DW)) u_op (
    .clk, .wr_en(wr_en && wr_sel == SRC_OP), .wr_addr, .wr_data,
    .rd_en(rd_en && rd_sel == SRC_OP), .rd_addr, .rd_data(op_q)
  );
  data_mem #(.DEPTH(DEPTH), .WIDTH(DW)) u_et (
    .clk, .wr_en(wr_en && wr_sel == SRC_ET), .wr_addr, .wr_data,
    .rd_en(rd_en && rd_sel == SRC_ET), .rd_addr, .rd_data(et_q)
  );

  // Remember which array the last read went to.
  always_ff @(posedge clk) begin
    if (rd_en) sel_q <= rd_sel;
  end

  always_comb begin
    unique case (sel_q)
      SRC_VAR: rd_data = var_q;
      SRC_OP:  rd_data = op_q;
      SRC_ET:  rd_data = et_q;
      default: rd_data = '0;
    endcase
  end

endmodule
