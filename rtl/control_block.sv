// control_block: sequencer of the algorithmic test system.
//
// It executes the test program word by word. A vector instruction (OP_DRV,
// OP_CMP) arms event analysis (which takes the word's event field straight
// from the program memory), points the
// multiplexer at its window and reads the data word the window needs, then
// waits for the pin electronics to acknowledge that the event came and the
// vector was applied (and, for OP_CMP, checked). OP_SETDIR and OP_SETMASK
// load the pin registers at once. OP_LOOP closes a loop over the VAR or OP
// array: while fewer than var_count (op_count) passes have been made it
// jumps back to pattern[PROG_AW-1:0] and moves that array's base address on
// by the instruction's offset field, so one program is run once per VAR
// value, with a nested loop over OP sets wherever the program puts one.
// Data addresses are base + offset for VAR and OP. ET is read in run
// order: its pointer moves on by one after each vector that used ET, so the
// ET array holds the expected results in the order they are observed.
//
// Failures reported by the pin electronics are counted (saturating) and
// the address of the first failing word is kept; the run does not stop.
//
// Timing: 'start' (in IDLE or DONE) begins at address 0. A program word
// is read in one cycle and decoded in the next; a vector whose event is
// already present takes three tester clocks (decode, fire, acknowledge),
// other instructions one. HALT leaves the block in DONE.
//
// The program memory plus three data arrays, mixing by a window chosen by
// the instruction and the cyclic run over VAR with a nested OP loop follow
// the architecture. The instruction set, the loop counters given by the
// host, the ET pointer and the failure log are this design's choices.
module control_block
  import tester_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [DATA_AW:0]     var_count,
  input  logic [DATA_AW:0]     op_count,
  // program memory read port
  output logic                 prog_rd_en,
  output logic [PROG_AW-1:0]   prog_rd_addr,
  input  prog_word_t           prog_rd_data,
  // data memory read request
  output logic                 data_rd_en,
  output src_e                 data_rd_sel,
  output logic [DATA_AW-1:0]   data_rd_addr,
  // multiplexer mode
  output src_e                 mux_src,
  output logic [WIN_LSB_W-1:0] mux_win_lsb,
  output logic [WIN_W_W-1:0]   mux_win_w,
  // event analysis
  output logic                 ev_load,
  // pin electronics
  output logic                 pe_compare,
  output logic                 pe_dir_load,
  output logic                 pe_mask_load,
  input  logic                 pe_ack,
  input  logic                 pe_fail,
  // status
  output logic                 busy,
  output logic                 done,
  output logic [ERR_W-1:0]     err_count,
  output logic [PROG_AW-1:0]   first_fail_pc
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_WAIT, S_DONE} state_e;

  state_e             state, state_n;
  logic [PROG_AW-1:0] pc, pc_n;
  opcode_e              ir_op;
  src_e                 ir_src;
  logic [WIN_LSB_W-1:0] ir_win_lsb;
  logic [WIN_W_W-1:0]   ir_win_w;
  instr_t             ins;
  logic [DATA_AW-1:0] var_base, op_base, et_ptr;
  logic [DATA_AW:0]   var_cnt, op_cnt;
  logic [DATA_AW:0]   loop_count, loop_cnt;
  logic               loop_last;
  logic               have_fail;

  assign ins = prog_rd_data.ins;

  // Loop bookkeeping of the array named by a LOOP instruction.
  always_comb begin
    loop_count = (ins.src == SRC_OP) ? op_count : var_count;
    loop_cnt   = (ins.src == SRC_OP) ? op_cnt   : var_cnt;
    loop_last  = (loop_count <= 1) || (loop_cnt >= loop_count - 1'b1);
  end

  // Next state, next address and strobes.
  always_comb begin
    state_n      = state;
    pc_n         = pc;
    prog_rd_en   = 1'b0;
    prog_rd_addr = pc;
    data_rd_en   = 1'b0;
    data_rd_sel  = ins.src;
    data_rd_addr = '0;
    ev_load      = 1'b0;
    pe_dir_load  = 1'b0;
    pe_mask_load = 1'b0;
    unique case (ins.src)
      SRC_VAR: data_rd_addr = var_base + ins.offset;
      SRC_OP:  data_rd_addr = op_base  + ins.offset;
      SRC_ET:  data_rd_addr = et_ptr   + ins.offset;
      default: data_rd_addr = '0;
    endcase
    unique case (state)
      S_IDLE, S_DONE: begin
        if (start) state_n = S_FETCH;
      end
      S_FETCH: begin
        pc_n         = '0;
        prog_rd_en   = 1'b1;
        prog_rd_addr = '0;
        state_n      = S_DECODE;
      end
      S_DECODE: begin
        unique case (ins.op)
          OP_DRV, OP_CMP: begin
            ev_load    = 1'b1;
            data_rd_en = (ins.src != SRC_NONE);
            state_n    = S_WAIT;
          end
          OP_SETDIR, OP_SETMASK: begin
            pe_dir_load  = (ins.op == OP_SETDIR);
            pe_mask_load = (ins.op == OP_SETMASK);
            pc_n         = pc + 1'b1;
          end
          OP_LOOP: begin
            if ((ins.src == SRC_VAR || ins.src == SRC_OP) && !loop_last)
              pc_n = prog_rd_data.pattern[PROG_AW-1:0];
            else
              pc_n = pc + 1'b1;
          end
          default: begin  // OP_HALT and unused codes end the run
            state_n = S_DONE;
          end
        endcase
        if (state_n == S_DECODE) begin
          prog_rd_en   = 1'b1;
          prog_rd_addr = pc_n;
        end
      end
      S_WAIT: begin
        if (pe_ack) begin
          pc_n         = pc + 1'b1;
          prog_rd_en   = 1'b1;
          prog_rd_addr = pc_n;
          state_n      = S_DECODE;
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc       <= '0;
      ir_op      <= OP_DRV;
      ir_src     <= SRC_NONE;
      ir_win_lsb <= '0;
      ir_win_w   <= '0;
      var_base <= '0;
      op_base  <= '0;
      et_ptr   <= '0;
      var_cnt  <= '0;
      op_cnt   <= '0;
    end else begin
      state <= state_n;
      pc    <= pc_n;
      if ((state == S_IDLE || state == S_DONE) && start) begin
        var_base <= '0;
        op_base  <= '0;
        et_ptr   <= '0;
        var_cnt  <= '0;
        op_cnt   <= '0;
      end
      if (state == S_DECODE && (ins.op == OP_DRV || ins.op == OP_CMP)) begin
        ir_op      <= ins.op;
        ir_src     <= ins.src;
        ir_win_lsb <= ins.win_lsb;
        ir_win_w   <= ins.win_w;
      end
      if (state == S_DECODE && ins.op == OP_LOOP) begin
        if (ins.src == SRC_VAR) begin
          var_cnt  <= loop_last ? '0 : var_cnt + 1'b1;
          var_base <= loop_last ? '0 : var_base + ins.offset;
        end
        if (ins.src == SRC_OP) begin
          op_cnt  <= loop_last ? '0 : op_cnt + 1'b1;
          op_base <= loop_last ? '0 : op_base + ins.offset;
        end
      end
      if (state == S_WAIT && pe_ack && ir_src == SRC_ET) et_ptr <= et_ptr + 1'b1;
    end
  end

  // Failure log.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_count     <= '0;
      first_fail_pc <= '0;
      have_fail     <= 1'b0;
    end else if ((state == S_IDLE || state == S_DONE) && start) begin
      err_count     <= '0;
      first_fail_pc <= '0;
      have_fail     <= 1'b0;
    end else if (pe_ack && pe_fail) begin
      if (err_count != '1) err_count <= err_count + 1'b1;
      if (!have_fail) first_fail_pc <= pc;
      have_fail <= 1'b1;
    end
  end

  // The multiplexer follows the latched instruction while a vector waits
  // for its event; otherwise it passes the pattern unchanged (SETDIR and
  // SETMASK take their value from the pattern).
  always_comb begin
    mux_src     = (state == S_WAIT) ? ir_src : SRC_NONE;
    mux_win_lsb = ir_win_lsb;
    mux_win_w   = ir_win_w;
    pe_compare  = (state == S_WAIT) && (ir_op == OP_CMP);
    busy        = (state != S_IDLE) && (state != S_DONE);
    done        = (state == S_DONE);
  end

  // The pin electronics acknowledge only a vector that is waiting.
  a_ack_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    pe_ack |-> state == S_WAIT);

endmodule
