// test_system_tb: end-to-end test of the test equipment on a device model.
//
// The tester, at its default sizes, tests the fig2_dut device with the
// compact test of an alternative-graph node: the program applies the
// instruction I = var for every var in VAR = (0, 1, 2, 3) with the flags
// {x1,x2,x3,x4} = 1110, for two operand sets from OP in a nested loop, and
// checks each result against ET. The tester acts as the device's program
// memory (pseudo-emulation): every byte the device fetches comes from the
// tester on a read strobe event, READY is raised with the byte and dropped
// when the strobe ends, the memory-disable pin is held high and the
// address bus is left out of the compare. The result is awaited on the
// rising edge of the device's write strobe. The device runs from its own
// clock, faster than the tester's.
//
// The ET array is computed here by walking the alternative graph
// independently of the device model. Run 1 uses a good device: no
// failures, 8 compares, 56 bus reads and 8 writes. Run 2 uses the same
// program on a device whose x2 branch is stuck at 0: exactly the two
// compares with I = 1 must fail, at the compare word, on data pins only.
// Every mechanism (normal and VAR/OP/ET mixing vectors, unconditional,
// level and edge events, waiting for an event, both loop jumps, direction
// and mask loads, device wait states, passing and failing compares) is
// counted, and one that never happened counts as a failure. Watchdog
// included.
module test_system_tb;
  import tester_pkg::*;

  localparam int PROG_DEPTH = 1024;
  localparam int DATA_DEPTH = 256;
  // Pin map of the board.
  localparam int P_RD = 24, P_WR = 25, P_RDY = 26, P_MD = 27;
  localparam logic [PINS-1:0] RDY = PINS'(1) << P_RDY;
  localparam logic [PINS-1:0] MD  = PINS'(1) << P_MD;

  logic                          clk = 1'b0, dut_clk = 1'b0, rst_n = 1'b0, dut_rst_n = 1'b0;
  logic                          host_prog_we = 1'b0;
  logic [$clog2(PROG_DEPTH)-1:0] host_prog_addr = '0;
  prog_word_t                    host_prog_wdata = '0;
  logic                          host_data_we = 1'b0;
  src_e                          host_data_sel = SRC_VAR;
  logic [$clog2(DATA_DEPTH)-1:0] host_data_addr = '0;
  logic [DW-1:0]                 host_data_wdata = '0;
  logic [DATA_AW:0]              host_var_count = '0, host_op_count = '0;
  logic                          host_start = 1'b0;
  logic [PINS-1:0]               pin_out, pin_oe, pin_in;
  logic [EV_W-1:0]               ev_in;
  logic                          busy, done;
  logic [ERR_W-1:0]              err_count;
  logic [PROG_AW-1:0]            first_fail_pc;
  logic [PINS-1:0]               last_fail_pins;

  test_system dut (.*);

  // Device under test and board wiring.
  logic        fault = 1'b0;
  logic [7:0]  d_db_out, db;
  logic        d_db_oe, d_rd, d_wr;
  logic [15:0] d_ab;
  int          n_reads, n_writes, n_wait, n_bad;
  logic        ready, memdis;

  assign ready  = pin_oe[P_RDY] & pin_out[P_RDY];
  assign memdis = pin_oe[P_MD]  & pin_out[P_MD];
  assign db     = d_db_oe ? d_db_out : (pin_oe[7:0] & pin_out[7:0]);
  assign pin_in = {4'b0, memdis, ready, d_wr, d_rd, d_ab, db};
  assign ev_in  = {2'b0, d_wr, d_rd};

  fig2_dut u_dev (
    .clk(dut_clk), .rst_n(dut_rst_n), .fault,
    .db_in(db), .db_out(d_db_out), .db_oe(d_db_oe), .ab(d_ab),
    .rd(d_rd), .wr(d_wr), .ready, .memdis,
    .n_reads, .n_writes, .n_wait, .n_bad
  );

  always #5   clk = ~clk;      // tester: 100 MHz
  always #3.5 dut_clk = ~dut_clk;  // device: about 143 MHz, unrelated

  int checks = 0, failures = 0;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- the compact test ----------------
  localparam logic [7:0] X_FLAGS = 8'b0000_1110;  // {x1,x2,x3,x4} = 1110
  localparam logic [7:0] C_LDA = 8'h40, C_LDB = 8'h80, C_EXE = 8'hC0, C_OUT = 8'hD0;
  localparam int N_VAR = 4, N_OPSET = 2;
  logic [7:0] var_a [N_VAR]      = '{8'd0, 8'd1, 8'd2, 8'd3};
  logic [7:0] op_a  [2*N_OPSET]  = '{8'h5A, 8'h33, 8'hC3, 8'h0F};
  logic [7:0] et_a  [N_VAR*N_OPSET];

  // Expected result: walk the alternative graph from node I.
  function automatic logic [7:0] ag_eval(input int i, input logic x1, x2, x3, x4,
                                         input logic [7:0] a, b);
    logic [7:0] f [1:8];
    f[1] = a + b; f[2] = a - b; f[3] = a & b; f[4] = a | b;
    f[5] = a ^ b; f[6] = ~a;    f[7] = a + 8'd1; f[8] = {b[6:0], 1'b0};
    if (i == 0) return f[1];
    if (i == 1) return !x1 ? f[4] : (x2 ? f[2] : f[3]);
    if (i == 2) return x3 ? f[5] : f[6];
    return x4 ? f[7] : f[8];
  endfunction

  prog_word_t prog [$];
  int L_VAR, L_OP, PC_CMP;

  function automatic prog_word_t word(opcode_e op, src_e src, int lsb, int wd, int off,
                                      logic [PINS-1:0] pat, logic e, logic [EV_W-1:0] m,
                                      logic [EV_W-1:0] v);
    prog_word_t x;
    x.ev      = '{edge_only: e, mask: m, value: v};
    x.ins     = '{op: op, src: src, win_lsb: WIN_LSB_W'(lsb), win_w: WIN_W_W'(wd),
                  offset: DATA_AW'(off)};
    x.pattern = pat;
    return x;
  endfunction

  // One pseudo-emulated read: IF rd = 1 THEN db = byte, READY = 1;
  // IF rd = 0 THEN READY = 0.
  task automatic emit_read(input src_e src, input int off, input logic [7:0] b, input int wd);
    prog.push_back(word(OP_DRV, src, 0, wd, off, MD | RDY | PINS'(b), 1'b0, 4'b0001, 4'b0001));
    prog.push_back(word(OP_DRV, SRC_NONE, 0, 0, 0, MD | PINS'(b), 1'b0, 4'b0001, 4'b0000));
  endtask

  task automatic build_program();
    prog.delete();
    prog.push_back(word(OP_SETDIR,  SRC_NONE, 0, 0, 0, MD | RDY | 32'hFF, 1'b0, '0, '0));
    prog.push_back(word(OP_SETMASK, SRC_NONE, 0, 0, 0, 32'hFF, 1'b0, '0, '0));
    prog.push_back(word(OP_DRV,     SRC_NONE, 0, 0, 0, MD, 1'b0, '0, '0));
    L_VAR = prog.size();
    L_OP  = prog.size();
    emit_read(SRC_NONE, 0, X_FLAGS, 0);
    emit_read(SRC_NONE, 0, C_LDA, 0);
    emit_read(SRC_OP,   0, 8'h00, 8);
    emit_read(SRC_NONE, 0, C_LDB, 0);
    emit_read(SRC_OP,   1, 8'h00, 8);
    emit_read(SRC_VAR,  0, C_EXE, 2);
    emit_read(SRC_NONE, 0, C_OUT, 0);
    prog.push_back(word(OP_SETDIR, SRC_NONE, 0, 0, 0, MD | RDY, 1'b0, '0, '0));
    PC_CMP = prog.size();
    // IF wr rises THEN compare db with et and raise READY.
    prog.push_back(word(OP_CMP, SRC_ET, 0, 8, 0, MD | RDY, 1'b1, 4'b0010, 4'b0010));
    prog.push_back(word(OP_DRV, SRC_NONE, 0, 0, 0, MD, 1'b0, 4'b0010, 4'b0000));
    prog.push_back(word(OP_SETDIR, SRC_NONE, 0, 0, 0, MD | RDY | 32'hFF, 1'b0, '0, '0));
    prog.push_back(word(OP_LOOP, SRC_OP,  0, 0, 2, PINS'(L_OP), 1'b0, '0, '0));
    prog.push_back(word(OP_LOOP, SRC_VAR, 0, 0, 1, PINS'(L_VAR), 1'b0, '0, '0));
    prog.push_back(word(OP_HALT, SRC_NONE, 0, 0, 0, '0, 1'b0, '0, '0));
  endtask

  task automatic download();
    build_program();
    foreach (prog[i]) begin
      @(negedge clk);
      host_prog_we = 1'b1; host_prog_addr = 10'(i); host_prog_wdata = prog[i];
    end
    for (int v = 0; v < N_VAR; v++)
      for (int s = 0; s < N_OPSET; s++)
        et_a[v*N_OPSET + s] = ag_eval(v, X_FLAGS[3], X_FLAGS[2], X_FLAGS[1], X_FLAGS[0],
                                      op_a[2*s], op_a[2*s+1]);
    @(negedge clk);
    host_prog_we = 1'b0;
    foreach (var_a[i]) begin
      host_data_we = 1'b1; host_data_sel = SRC_VAR; host_data_addr = 8'(i);
      host_data_wdata = var_a[i]; @(negedge clk);
    end
    foreach (op_a[i]) begin
      host_data_we = 1'b1; host_data_sel = SRC_OP; host_data_addr = 8'(i);
      host_data_wdata = op_a[i]; @(negedge clk);
    end
    foreach (et_a[i]) begin
      host_data_we = 1'b1; host_data_sel = SRC_ET; host_data_addr = 8'(i);
      host_data_wdata = et_a[i]; @(negedge clk);
    end
    host_data_we   = 1'b0;
    host_var_count = (DATA_AW+1)'(N_VAR);
    host_op_count  = (DATA_AW+1)'(N_OPSET);
  endtask

  // ---------------- mechanism counters ----------------
  int n_normal, n_mix_var, n_mix_op, n_mix_et, n_ev_none, n_ev_level, n_ev_edge;
  int n_ev_waiting, n_jump_var, n_jump_op, n_dir, n_mask, n_cmp_pass, n_cmp_fail;

  always @(posedge clk) if (rst_n) begin
    if (dut.fire) begin
      case (dut.mux_src)
        SRC_NONE: n_normal++;
        SRC_VAR:  n_mix_var++;
        SRC_OP:   n_mix_op++;
        default:  n_mix_et++;
      endcase
      if (dut.u_event.field_q.mask == '0)     n_ev_none++;
      else if (dut.u_event.field_q.edge_only) n_ev_edge++;
      else                                    n_ev_level++;
    end
    if (dut.armed && !dut.fire) n_ev_waiting++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_DECODE && dut.prog_rd_data.ins.op == OP_LOOP &&
        dut.u_ctrl.pc_n != dut.u_ctrl.pc + 1'b1) begin
      if (dut.prog_rd_data.ins.src == SRC_VAR) n_jump_var++;
      else                                     n_jump_op++;
    end
    if (dut.pe_dir_load)  n_dir++;
    if (dut.pe_mask_load) n_mask++;
    if (dut.pe_ack && dut.u_pins.ack && dut.u_ctrl.ir_op == OP_CMP) begin
      if (dut.pe_fail) n_cmp_fail++; else n_cmp_pass++;
    end
  end

  task automatic run(output int cycles);
    @(negedge clk); host_start = 1'b1;
    @(negedge clk); host_start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc1, cyc2, reads0, writes0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    download();
    dut_rst_n = 1'b1;
    // Run 1: good device.
    run(cyc1);
    $display("run 1: %0d tester clocks, %0d errors, %0d reads, %0d writes, %0d wait clocks",
             cyc1, err_count, n_reads, n_writes, n_wait);
    check(err_count == 0, "good device passes");
    check(n_cmp_pass == N_VAR*N_OPSET && n_cmp_fail == 0, "8 compares, all passing");
    check(n_reads == 7*N_VAR*N_OPSET, "56 pseudo-emulated reads");
    check(n_writes == N_VAR*N_OPSET, "8 result writes");
    check(n_bad == 0, "memory disabled on every read");
    check(u_dev.y_q == et_a[N_VAR*N_OPSET-1], "last device result is the last ET value");
    // Run 2: device with the x2 branch stuck at 0.
    reads0  = n_reads;
    writes0 = n_writes;
    fault = 1'b1;
    run(cyc2);
    $display("run 2: %0d tester clocks, %0d errors, first at word %0d, pins %h",
             cyc2, err_count, first_fail_pc, last_fail_pins);
    check(err_count == N_OPSET, "faulty device: both I = 1 compares fail");
    check(first_fail_pc == PC_CMP[PROG_AW-1:0], "first failure at the compare word");
    check(last_fail_pins != '0 && (last_fail_pins & ~32'hFF) == '0, "failures only on data pins");
    check(n_cmp_fail == N_OPSET && n_cmp_pass == 2*N_VAR*N_OPSET - N_OPSET, "compare tallies");
    check(n_reads - reads0 == 7*N_VAR*N_OPSET && n_writes - writes0 == N_VAR*N_OPSET,
          "second run bus cycles");
    // Every mechanism happened.
    check(n_normal > 0,     "normal-mode vectors");
    check(n_mix_var > 0,    "VAR mixing");
    check(n_mix_op > 0,     "OP mixing");
    check(n_mix_et > 0,     "ET mixing");
    check(n_ev_none > 0,    "unconditional vectors");
    check(n_ev_level > 0,   "level events");
    check(n_ev_edge > 0,    "edge events");
    check(n_ev_waiting > 0, "waiting for events");
    check(n_jump_var == 2*(N_VAR-1), "VAR loop jumps");
    check(n_jump_op == 2*N_VAR*(N_OPSET-1), "OP loop jumps");
    check(n_dir > 0 && n_mask > 0, "direction and mask loads");
    check(n_wait > 0,       "device wait states");
    $display("mechanisms: normal %0d var %0d op %0d et %0d | events none %0d level %0d edge %0d wait-clocks %0d | jumps var %0d op %0d | cmp pass %0d fail %0d",
             n_normal, n_mix_var, n_mix_op, n_mix_et, n_ev_none, n_ev_level, n_ev_edge,
             n_ev_waiting, n_jump_var, n_jump_op, n_cmp_pass, n_cmp_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
