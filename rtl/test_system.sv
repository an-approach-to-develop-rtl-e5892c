// test_system: algorithmic, event-driven digital test equipment.
//
// The tester rebuilds long test sequences on line from a compact test: a
// program whose words hold symbolic places for values, and three arrays
// (VAR, OP, ET) whose words fill those places pass by pass. Its blocks are
// wired as follows:
//   prog_mem        program words -> event field to event_analysis,
//                   instruction to control_block, pattern to pattern_mux
//   data_mem_blocks the VAR, OP and ET words -> pattern_mux
//   pattern_mux     pattern with a data window -> pin_electronics
//   event_analysis  watches the DUT event lines, fires the pin electronics
//   pin_electronics drives and checks the DUT pins, acknowledges to
//                   control_block
//   control_block   sequences all of it and keeps the failure log
//
// Memory pseudo-emulation (the tester acting as the DUT's program memory,
// with the address bus ignored and the CPU held in WAIT between vectors) is
// programmed, not built in: the read strobe is an event line, READY and the
// on-board memory disable are driven pins, and the address pins are left
// out of the compare mask.
//
// Host side: program and data arrays are written through host_prog_* and
// host_data_* while the tester is idle; host_var_count and host_op_count
// give the loop lengths; host_start runs the program from address 0 and
// done rises at HALT. The block structure follows the architecture; the
// widths (tester_pkg), memory depths and host interface are this design's.
module test_system
  import tester_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 1024,
  parameter int unsigned DATA_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host download and control
  input  logic                          host_prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] host_prog_addr,
  input  prog_word_t                    host_prog_wdata,
  input  logic                          host_data_we,
  input  src_e                          host_data_sel,
  input  logic [$clog2(DATA_DEPTH)-1:0] host_data_addr,
  input  logic [DW-1:0]                 host_data_wdata,
  input  logic [DATA_AW:0]              host_var_count,
  input  logic [DATA_AW:0]              host_op_count,
  input  logic                          host_start,
  // DUT side
  output logic [PINS-1:0]               pin_out,
  output logic [PINS-1:0]               pin_oe,
  input  logic [PINS-1:0]               pin_in,
  input  logic [EV_W-1:0]               ev_in,
  // status
  output logic                          busy,
  output logic                          done,
  output logic [ERR_W-1:0]              err_count,
  output logic [PROG_AW-1:0]            first_fail_pc,
  output logic [PINS-1:0]               last_fail_pins
);

  logic                 prog_rd_en;
  logic [PROG_AW-1:0]   prog_rd_addr;
  prog_word_t           prog_rd_data;
  logic                 data_rd_en;
  src_e                 data_rd_sel;
  logic [DATA_AW-1:0]   data_rd_addr;
  logic [DW-1:0]        data_rd_data;
  src_e                 mux_src;
  logic [WIN_LSB_W-1:0] mux_win_lsb;
  logic [WIN_W_W-1:0]   mux_win_w;
  logic [PINS-1:0]      vector;
  logic                 ev_load, fire, armed;
  logic                 pe_compare, pe_dir_load, pe_mask_load;
  logic                 pe_ack, pe_fail;
  logic [PINS-1:0]      fail_pins;

  prog_mem #(.DEPTH(PROG_DEPTH)) u_prog_mem (
    .clk,
    .wr_en   (host_prog_we),
    .wr_addr (host_prog_addr),
    .wr_data (host_prog_wdata),
    .rd_en   (prog_rd_en),
    .rd_addr ($clog2(PROG_DEPTH)'(prog_rd_addr)),
    .rd_data (prog_rd_data)
  );

  data_mem_blocks #(.DEPTH(DATA_DEPTH)) u_data_mem (
    .clk,
    .wr_en   (host_data_we),
    .wr_sel  (host_data_sel),
    .wr_addr (host_data_addr),
    .wr_data (host_data_wdata),
    .rd_en   (data_rd_en),
    .rd_sel  (data_rd_sel),
    .rd_addr ($clog2(DATA_DEPTH)'(data_rd_addr)),
    .rd_data (data_rd_data)
  );

  pattern_mux u_mux (
    .pattern (prog_rd_data.pattern),
    .data    (data_rd_data),
    .src     (mux_src),
    .win_lsb (mux_win_lsb),
    .win_w   (mux_win_w),
    .vector  (vector)
  );

  event_analysis u_event (
    .clk, .rst_n,
    .ev_in,
    .load     (ev_load),
    .ev_field (prog_rd_data.ev),
    .fire     (fire),
    .armed    (armed)
  );

  pin_electronics u_pins (
    .clk, .rst_n,
    .vector    (vector),
    .fire      (fire),
    .compare   (pe_compare),
    .dir_load  (pe_dir_load),
    .mask_load (pe_mask_load),
    .pin_out, .pin_oe, .pin_in,
    .ack       (pe_ack),
    .fail      (pe_fail),
    .fail_pins (fail_pins)
  );

  control_block u_ctrl (
    .clk, .rst_n,
    .start        (host_start),
    .var_count    (host_var_count),
    .op_count     (host_op_count),
    .prog_rd_en, .prog_rd_addr, .prog_rd_data,
    .data_rd_en, .data_rd_sel, .data_rd_addr,
    .mux_src, .mux_win_lsb, .mux_win_w,
    .ev_load,
    .pe_compare, .pe_dir_load, .pe_mask_load,
    .pe_ack, .pe_fail,
    .busy, .done, .err_count, .first_fail_pc
  );

  // Failing pins of the most recent failing compare, for diagnosis.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 last_fail_pins <= '0;
    else if (pe_ack && pe_fail) last_fail_pins <= fail_pins;
  end

  // Event analysis fires only while armed.
  a_fire_armed: assert property (@(posedge clk) disable iff (!rst_n) fire |-> armed);

endmodule
