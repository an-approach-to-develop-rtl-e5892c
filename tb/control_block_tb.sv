// control_block_tb: self-checking test of the test program sequencer.
//
// The testbench models the program memory (one-clock read latency) and the
// event/pin path (acknowledge a set number of clocks after a vector is
// armed, with a chosen fail flag). It runs a program with an outer loop over
// VAR (3 passes), a nested loop over OP sets of two operands (2 passes),
// direction and mask loads, and compares against ET, and checks against a
// reference interpreter written here:
//   - the order of executed vectors and, for each, the data array and
//     address it reads and the multiplexer source while it waits;
//   - the number of direction/mask loads;
//   - the failure count and the address of the first failing word;
//   - the run time in clocks with immediate events (three per vector, one
//     per other instruction, plus start-up), then a rerun with random event
//     delays that must give the same trace.
// Watchdog included.
module control_block_tb;
  import tester_pkg::*;

  logic                 clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [DATA_AW:0]     var_count = 3, op_count = 2;
  logic                 prog_rd_en;
  logic [PROG_AW-1:0]   prog_rd_addr;
  prog_word_t           prog_rd_data;
  logic                 data_rd_en;
  src_e                 data_rd_sel;
  logic [DATA_AW-1:0]   data_rd_addr;
  src_e                 mux_src;
  logic [WIN_LSB_W-1:0] mux_win_lsb;
  logic [WIN_W_W-1:0]   mux_win_w;
  logic                 ev_load;
  logic                 pe_compare, pe_dir_load, pe_mask_load;
  logic                 pe_ack = 1'b0, pe_fail = 1'b0;
  logic                 busy, done;
  logic [ERR_W-1:0]     err_count;
  logic [PROG_AW-1:0]   first_fail_pc;
  int                   checks = 0, failures = 0;

  control_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  prog_word_t prog [64];

  function automatic prog_word_t w(opcode_e op, src_e src, int lsb, int wd, int off, logic [PINS-1:0] pat);
    prog_word_t x;
    x.ev.edge_only = 1'b0;
    x.ev.mask      = 4'b0001;
    x.ev.value     = 4'b0001;
    x.ins.op       = op;
    x.ins.src      = src;
    x.ins.win_lsb  = WIN_LSB_W'(lsb);
    x.ins.win_w    = WIN_W_W'(wd);
    x.ins.offset   = DATA_AW'(off);
    x.pattern      = pat;
    return x;
  endfunction

  initial begin
    foreach (prog[i]) prog[i] = w(OP_HALT, SRC_NONE, 0, 0, 0, '0);
    prog[0] = w(OP_SETDIR,  SRC_NONE, 0, 0, 0, 32'h0F00_00FF);
    prog[1] = w(OP_SETMASK, SRC_NONE, 0, 0, 0, 32'h0000_FF00);
    prog[2] = w(OP_DRV,     SRC_NONE, 0, 0, 0, 32'h1);
    prog[3] = w(OP_DRV,     SRC_OP,   0, 8, 0, 32'h2);
    prog[4] = w(OP_DRV,     SRC_OP,   0, 8, 1, 32'h3);
    prog[5] = w(OP_LOOP,    SRC_OP,   0, 0, 2, 32'd3);
    prog[6] = w(OP_DRV,     SRC_VAR,  2, 2, 0, 32'h4);
    prog[7] = w(OP_CMP,     SRC_ET,   8, 8, 0, 32'h5);
    prog[8] = w(OP_LOOP,    SRC_VAR,  0, 0, 1, 32'd2);
    prog[9] = w(OP_HALT,    SRC_NONE, 0, 0, 0, '0);
  end

  // Program memory model.
  always @(posedge clk) if (prog_rd_en) prog_rd_data <= prog[prog_rd_addr];

  // ---------------- reference interpreter ----------------
  typedef struct { int pc; src_e sel; int addr; } step_t;
  step_t exp_trace [$];
  int    exp_loads, exp_cycles;

  task automatic interpret();
    int pc = 0, vb = 0, ob = 0, et = 0, vc = 0, oc = 0;
    exp_trace.delete();
    exp_loads  = 0;
    exp_cycles = 2;  // start sampled, first fetch
    forever begin
      prog_word_t x = prog[pc];
      if (x.ins.op == OP_HALT) begin exp_cycles += 1; break; end
      case (x.ins.op)
        OP_DRV, OP_CMP: begin
          step_t s;
          s.pc = pc; s.sel = x.ins.src;
          s.addr = (x.ins.src == SRC_VAR) ? vb + x.ins.offset :
                   (x.ins.src == SRC_OP)  ? ob + x.ins.offset :
                   (x.ins.src == SRC_ET)  ? et + x.ins.offset : 0;
          exp_trace.push_back(s);
          if (x.ins.src == SRC_ET) et++;
          exp_cycles += 3;
          pc++;
        end
        OP_SETDIR, OP_SETMASK: begin exp_loads++; exp_cycles += 1; pc++; end
        OP_LOOP: begin
          exp_cycles += 1;
          if (x.ins.src == SRC_VAR) begin
            if (vc + 1 < var_count) begin vc++; vb += x.ins.offset; pc = x.pattern; end
            else begin vc = 0; vb = 0; pc++; end
          end else begin
            if (oc + 1 < op_count) begin oc++; ob += x.ins.offset; pc = x.pattern; end
            else begin oc = 0; ob = 0; pc++; end
          end
        end
        default: pc++;
      endcase
    end
  endtask

  // ---------------- event / pin model ----------------
  int    delay_max = 0;
  int    wc;
  logic  pend = 1'b0, pend_cmp;
  int    cmp_seen = 0;
  step_t got_trace [$];
  int    got_loads = 0;
  logic  in_wait_src_ok = 1'b1;
  src_e  cur_src;

  always @(posedge clk) begin
    pe_ack  <= 1'b0;
    pe_fail <= 1'b0;
    if (pe_dir_load || pe_mask_load) got_loads++;
    if (ev_load) begin
      step_t s;
      s.pc = dut.pc;
      s.sel = data_rd_en ? data_rd_sel : SRC_NONE;
      s.addr = data_rd_en ? int'(data_rd_addr) : 0;
      got_trace.push_back(s);
      cur_src = s.sel;
      pend <= 1'b1;
      wc   <= (delay_max == 0) ? 0 : $urandom_range(delay_max);
    end else if (pend) begin
      if (mux_src != cur_src) in_wait_src_ok = 1'b0;
      if (wc == 0) begin
        pe_ack  <= 1'b1;
        if (pe_compare) begin
          cmp_seen++;
          pe_fail <= (cmp_seen == 2 || cmp_seen == 3);
        end
        pend <= 1'b0;
      end else wc <= wc - 1;
    end
  end

  task automatic run_and_check(input string tag);
    int cycles = 0;
    got_trace.delete();
    got_loads = 0;
    cmp_seen  = 0;
    in_wait_src_ok = 1'b1;
    interpret();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (got_trace.size() != exp_trace.size()) begin
      failures++;
      $display("FAIL %s: %0d vectors executed, expected %0d", tag, got_trace.size(), exp_trace.size());
    end
    for (int i = 0; i < exp_trace.size() && i < got_trace.size(); i++) begin
      checks++;
      if (got_trace[i] != exp_trace[i]) begin
        failures++;
        $display("FAIL %s: vector %0d got pc %0d %s@%0d expected pc %0d %s@%0d", tag, i,
                 got_trace[i].pc, got_trace[i].sel.name(), got_trace[i].addr,
                 exp_trace[i].pc, exp_trace[i].sel.name(), exp_trace[i].addr);
      end
    end
    checks++;
    if (got_loads != exp_loads) begin failures++; $display("FAIL %s: loads %0d", tag, got_loads); end
    checks++;
    if (!in_wait_src_ok) begin failures++; $display("FAIL %s: mux source wrong while waiting", tag); end
    // The event/pin model fails the 2nd and 3rd compares, all at word 7.
    begin
      int ncmp = 0, exp_err;
      foreach (exp_trace[i]) if (prog[exp_trace[i].pc].ins.op == OP_CMP) ncmp++;
      exp_err = (ncmp >= 3) ? 2 : (ncmp == 2) ? 1 : 0;
      checks++;
      if (int'(err_count) != exp_err || first_fail_pc != ((exp_err > 0) ? 7 : 0)) begin
        failures++;
        $display("FAIL %s: err_count %0d first_fail_pc %0d, expected %0d", tag, err_count,
                 first_fail_pc, exp_err);
      end
    end
    if (delay_max == 0) begin
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL %s: run took %0d clocks, expected %0d", tag, cycles, exp_cycles);
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL %s: busy after HALT", tag); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after reset"); end
    delay_max = 0;
    run_and_check("immediate events");
    delay_max = 5;
    run_and_check("random event delays");
    // Loop counts of one: each loop body runs once.
    var_count = 1; op_count = 1;
    run_and_check("single pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
