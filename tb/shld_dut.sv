// shld_dut: behavioural model of an 8-bit microprocessor subset (testbench only).
//
// It executes three 8080 instructions over a bus it masters from its own
// clock: MVI L,d (2Eh), MVI H,d (26h) and SHLD a16 (22h), which stores L
// at address a16 and H at a16+1. Other opcodes are executed as NOP. Its
// machine cycles follow the 8080's: an opcode fetch, then one memory read
// per immediate byte (the address bus shows PC), then for SHLD two memory
// writes with DB = L, AB = a16 and DB = H, AB = a16 + 1.
//   read cycle : address on ab, rd high; wait (WAIT state) until ready is
//                high, take db, drop rd. A read starts only while ready is
//                low.
//   write cycle: address and data out, then wr high; wait for ready, drop
//                wr, release db. Each write is preceded by 12 clocks of
//                internal work.
// With 'fault' set the address increment between the two writes loses its
// carry into the high byte. Counters report completed reads and writes and
// wait-state clocks.
module shld_dut (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fault,
  input  logic [7:0]  db_in,
  output logic [7:0]  db_out,
  output logic        db_oe,
  output logic [15:0] ab,
  output logic        rd,
  output logic        wr,
  input  logic        ready,
  output int          n_reads,
  output int          n_writes,
  output int          n_wait
);

  logic [7:0]  l_q, h_q;
  logic [15:0] pc;

  task automatic bus_read(output logic [7:0] v);
    while (ready) @(posedge clk);
    ab <= pc;
    @(posedge clk);
    rd <= 1'b1;
    @(posedge clk);
    while (!ready) begin
      n_wait++;
      @(posedge clk);
    end
    v  = db_in;
    rd <= 1'b0;
    pc <= pc + 16'd1;
    n_reads++;
    @(posedge clk);
  endtask

  task automatic bus_write(input logic [15:0] a, input logic [7:0] v);
    repeat (12) @(posedge clk);
    while (ready) @(posedge clk);
    ab     <= a;
    db_out <= v;
    db_oe  <= 1'b1;
    @(posedge clk);
    wr <= 1'b1;
    @(posedge clk);
    while (!ready) begin
      n_wait++;
      @(posedge clk);
    end
    wr <= 1'b0;
    @(posedge clk);
    db_oe <= 1'b0;
    n_writes++;
  endtask

  initial begin
    logic [7:0]  op, lo, hi;
    logic [15:0] a2;
    rd = 1'b0; wr = 1'b0; db_oe = 1'b0; db_out = '0; ab = '0; pc = '0;
    l_q = '0; h_q = '0;
    n_reads = 0; n_writes = 0; n_wait = 0;
    @(posedge clk iff rst_n);
    forever begin
      bus_read(op);
      case (op)
        8'h2E: begin bus_read(lo); l_q = lo; end
        8'h26: begin bus_read(hi); h_q = hi; end
        8'h22: begin
          bus_read(lo);
          bus_read(hi);
          bus_write({hi, lo}, l_q);
          a2 = fault ? {hi, lo + 8'd1} : {hi, lo} + 16'd1;
          bus_write(a2, h_q);
        end
        default: ;
      endcase
    end
  end

endmodule
