// shld_workload_tb: the SHLD example run on the tester at its default sizes.
//
// The test observes the store-H-and-L-direct instruction (opcode 22h,
// fields 00 100 010) of an 8-bit microprocessor: at its 4th machine cycle
// the data bus must carry L and the address bus the two address bytes
// fetched in cycles 2 and 3 (IN3.IN2); at its 5th, H and IN3.IN2 + 1. The
// tester supplies every byte the processor fetches (pseudo-emulation: the
// fetch address is not looked at) and finds the 4th and 5th machine cycles
// as the rising edges of the write strobe. While the processor waits in its
// write cycle (READY low) the tester makes three compares, data, address
// low and address high, each against the next ET byte, then releases it.
//
// The compact test: VAR holds three addresses (one with a carry from the
// low into the high byte), OP two (L, H) pairs; the program loops over VAR
// with OP nested, 6 passes, 36 compares. ET is computed here. Run 1: good
// processor, no failure. Run 2: a processor whose address increment loses
// its carry must fail exactly the two address-high compares of the 5th
// machine cycle at the carry address. Watchdog included.
module shld_workload_tb;
  import tester_pkg::*;

  localparam int P_RDY = 26, P_MD = 27;
  localparam logic [PINS-1:0] RDY  = PINS'(1) << P_RDY;
  localparam logic [PINS-1:0] MD   = PINS'(1) << P_MD;
  localparam logic [PINS-1:0] M_DB = 32'h0000_00FF;
  localparam logic [PINS-1:0] M_AL = 32'h0000_FF00;
  localparam logic [PINS-1:0] M_AH = 32'h00FF_0000;

  logic                 clk = 1'b0, dut_clk = 1'b0, rst_n = 1'b0, dut_rst_n = 1'b0;
  logic                 host_prog_we = 1'b0;
  logic [9:0]           host_prog_addr = '0;
  prog_word_t           host_prog_wdata = '0;
  logic                 host_data_we = 1'b0;
  src_e                 host_data_sel = SRC_VAR;
  logic [7:0]           host_data_addr = '0;
  logic [DW-1:0]        host_data_wdata = '0;
  logic [DATA_AW:0]     host_var_count = '0, host_op_count = '0;
  logic                 host_start = 1'b0;
  logic [PINS-1:0]      pin_out, pin_oe, pin_in;
  logic [EV_W-1:0]      ev_in;
  logic                 busy, done;
  logic [ERR_W-1:0]     err_count;
  logic [PROG_AW-1:0]   first_fail_pc;
  logic [PINS-1:0]      last_fail_pins;

  test_system dut (.*);

  logic        fault = 1'b0;
  logic [7:0]  d_db_out, db;
  logic        d_db_oe, d_rd, d_wr, ready;
  logic [15:0] d_ab;
  int          n_reads, n_writes, n_wait;

  assign ready  = pin_oe[P_RDY] & pin_out[P_RDY];
  assign db     = d_db_oe ? d_db_out : (pin_oe[7:0] & pin_out[7:0]);
  assign pin_in = {4'b0, pin_oe[P_MD] & pin_out[P_MD], ready, d_wr, d_rd, d_ab, db};
  assign ev_in  = {2'b0, d_wr, d_rd};

  shld_dut u_cpu (
    .clk(dut_clk), .rst_n(dut_rst_n), .fault,
    .db_in(db), .db_out(d_db_out), .db_oe(d_db_oe), .ab(d_ab),
    .rd(d_rd), .wr(d_wr), .ready, .n_reads, .n_writes, .n_wait
  );

  always #5   clk = ~clk;
  always #3.5 dut_clk = ~dut_clk;

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

  localparam int N_ADDR = 3, N_LH = 2;
  logic [7:0] var_a [2*N_ADDR] = '{8'h34, 8'h12, 8'hFF, 8'h12, 8'h00, 8'h80};
  logic [7:0] op_a  [2*N_LH]   = '{8'hA5, 8'h5A, 8'h0F, 8'hF0};
  logic [7:0] et_a  [$];

  prog_word_t prog [$];
  int L_VAR, L_OP, PC_T5_AH;

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

  function automatic prog_word_t imm(opcode_e op, logic [PINS-1:0] pat);
    return word(op, SRC_NONE, 0, 0, 0, pat, 1'b0, '0, '0);
  endfunction

  task automatic emit_read(input src_e src, input int off, input logic [7:0] b);
    prog.push_back(word(OP_DRV, src, 0, (src == SRC_NONE) ? 0 : 8, off, MD | RDY | PINS'(b),
                        1'b0, 4'b0001, 4'b0001));
    prog.push_back(word(OP_DRV, SRC_NONE, 0, 0, 0, MD, 1'b0, 4'b0001, 4'b0000));
  endtask

  // One observed write cycle: three compares while the processor waits.
  task automatic emit_observe(input bit t5);
    prog.push_back(imm(OP_SETMASK, M_DB));
    prog.push_back(word(OP_CMP, SRC_ET, 0, 8, 0, MD, 1'b1, 4'b0010, 4'b0010));
    prog.push_back(imm(OP_SETMASK, M_AL));
    prog.push_back(word(OP_CMP, SRC_ET, 8, 8, 0, MD, 1'b0, 4'b0010, 4'b0010));
    prog.push_back(imm(OP_SETMASK, M_AH));
    if (t5) PC_T5_AH = prog.size();
    prog.push_back(word(OP_CMP, SRC_ET, 16, 8, 0, MD, 1'b0, 4'b0010, 4'b0010));
    prog.push_back(word(OP_DRV, SRC_NONE, 0, 0, 0, MD | RDY, 1'b0, 4'b0010, 4'b0010));
    prog.push_back(word(OP_DRV, SRC_NONE, 0, 0, 0, MD, 1'b0, 4'b0010, 4'b0000));
  endtask

  task automatic build_program();
    prog.delete();
    prog.push_back(imm(OP_SETDIR, MD | RDY | M_DB));
    prog.push_back(imm(OP_SETMASK, M_DB));
    prog.push_back(imm(OP_DRV, MD));
    L_VAR = prog.size();
    L_OP  = prog.size();
    emit_read(SRC_NONE, 0, 8'h2E);  // MVI L
    emit_read(SRC_OP,   0, 8'h00);
    emit_read(SRC_NONE, 0, 8'h26);  // MVI H
    emit_read(SRC_OP,   1, 8'h00);
    emit_read(SRC_NONE, 0, 8'h22);  // SHLD: 00 100 010
    emit_read(SRC_VAR,  0, 8'h00);  // IN2
    emit_read(SRC_VAR,  1, 8'h00);  // IN3
    prog.push_back(imm(OP_SETDIR, MD | RDY));
    emit_observe(1'b0);             // t = 4
    emit_observe(1'b1);             // t = 5
    prog.push_back(imm(OP_SETDIR, MD | RDY | M_DB));
    prog.push_back(word(OP_LOOP, SRC_OP,  0, 0, 2, PINS'(L_OP), 1'b0, '0, '0));
    prog.push_back(word(OP_LOOP, SRC_VAR, 0, 0, 2, PINS'(L_VAR), 1'b0, '0, '0));
    prog.push_back(imm(OP_HALT, '0));
  endtask

  task automatic download();
    build_program();
    et_a.delete();
    for (int v = 0; v < N_ADDR; v++)
      for (int s = 0; s < N_LH; s++) begin
        logic [15:0] a  = {var_a[2*v+1], var_a[2*v]};
        logic [15:0] a1 = a + 16'd1;
        et_a.push_back(op_a[2*s]);     // t = 4: DB = L
        et_a.push_back(a[7:0]);        //        AB = IN3.IN2
        et_a.push_back(a[15:8]);
        et_a.push_back(op_a[2*s+1]);   // t = 5: DB = H
        et_a.push_back(a1[7:0]);       //        AB = IN3.IN2 + 1
        et_a.push_back(a1[15:8]);
      end
    foreach (prog[i]) begin
      @(negedge clk);
      host_prog_we = 1'b1; host_prog_addr = 10'(i); host_prog_wdata = prog[i];
    end
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
    host_var_count = (DATA_AW+1)'(N_ADDR);
    host_op_count  = (DATA_AW+1)'(N_LH);
  endtask

  int n_cmp, n_edge;
  always @(posedge clk) if (rst_n && dut.fire) begin
    if (dut.pe_compare) n_cmp++;
    if (dut.u_event.field_q.edge_only) n_edge++;
  end

  task automatic run();
    @(negedge clk); host_start = 1'b1;
    @(negedge clk); host_start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    n_cmp = 0; n_edge = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    download();
    dut_rst_n = 1'b1;
    run();
    $display("run 1: %0d errors, %0d compares, %0d reads, %0d writes, %0d wait clocks",
             err_count, n_cmp, n_reads, n_writes, n_wait);
    check(err_count == 0, "good processor passes");
    check(n_cmp == 36, "36 compares");
    check(n_edge == 12, "12 write-strobe edges (machine cycles 4 and 5)");
    check(n_reads == 7*N_ADDR*N_LH, "42 pseudo-emulated reads");
    check(n_writes == 2*N_ADDR*N_LH, "12 writes");
    check(n_wait > 0, "processor wait states");
    fault = 1'b1;
    run();
    $display("run 2: %0d errors, first at word %0d, pins %h", err_count, first_fail_pc,
             last_fail_pins);
    check(err_count == N_LH, "lost carry fails twice");
    check(first_fail_pc == PC_T5_AH[PROG_AW-1:0], "at the 5th-cycle address-high compare");
    check(last_fail_pins == 32'h0001_0000, "on address bit 8 only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
