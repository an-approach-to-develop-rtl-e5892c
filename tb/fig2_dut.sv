// fig2_dut: behavioural model of a small device under test (testbench only).
//
// The device is a register Y computed by the instruction-selected function
// of an alternative graph with four flags x1..x4:
//   I = 0 : F1                       I = 2 : x3 ? F5 : F6
//   I = 1 : x1 ? (x2 ? F2 : F3) : F4  I = 3 : x4 ? F7 : F8
// on two operand registers A and B, with F1 = A+B, F2 = A-B, F3 = A&B,
// F4 = A|B, F5 = A^B, F6 = ~A, F7 = A+1, F8 = B<<1 (the elementary
// functions are this model's choice). It runs from its own clock and
// fetches its program over a bus it masters, like a microprocessor:
//   read cycle : address on ab, then rd high; it waits (WAIT state) until
//                ready is high, takes db, drops rd. It starts a read only
//                while ready is low.
//   write cycle: after 16 clocks of internal work it drives db, raises wr,
//                waits for ready, drops wr, then releases db.
// Instruction bytes: 00xx_abcd load flags {x1,x2,x3,x4} = abcd;
// 0100_0000 + byte -> A; 1000_0000 + byte -> B; 1100_00ii execute I = ii;
// 1101_0000 write Y to the bus. With 'fault' set, the x2 branch of the
// I = 1 path is stuck at 0 (F3 instead of F2). Counters report completed
// reads and writes, wait-state clocks, and reads made while memdis (the
// on-board memory disable) was low, which would be bus errors on a board.
module fig2_dut (
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
  input  logic        memdis,
  output int          n_reads,
  output int          n_writes,
  output int          n_wait,
  output int          n_bad
);

  logic [7:0]  a_q, b_q, y_q;
  logic [3:0]  x_q;  // {x1, x2, x3, x4}
  logic [15:0] pc;

  function automatic logic [7:0] f_of(input logic [1:0] i, input logic [3:0] x,
                                      input logic [7:0] a, input logic [7:0] b);
    case (i)
      2'd0: return a + b;
      2'd1: if (!x[3]) return a | b;
            else if (x[2] && !fault) return a - b;
            else return a & b;
      2'd2: return x[1] ? (a ^ b) : ~a;
      default: return x[0] ? a + 8'd1 : b << 1;
    endcase
  endfunction

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
    if (!memdis) n_bad++;
    v  = db_in;
    rd <= 1'b0;
    pc <= pc + 16'd1;
    n_reads++;
    @(posedge clk);
  endtask

  task automatic bus_write(input logic [7:0] v);
    repeat (16) @(posedge clk);
    while (ready) @(posedge clk);
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
    logic [7:0] op, arg;
    rd = 1'b0; wr = 1'b0; db_oe = 1'b0; db_out = '0; ab = '0; pc = '0;
    a_q = '0; b_q = '0; y_q = '0; x_q = '0;
    n_reads = 0; n_writes = 0; n_wait = 0; n_bad = 0;
    @(posedge clk iff rst_n);
    forever begin
      bus_read(op);
      case (op[7:6])
        2'b00: x_q = op[3:0];
        2'b01: begin bus_read(arg); a_q = arg; end
        2'b10: begin bus_read(arg); b_q = arg; end
        default:
          if (op[4]) bus_write(y_q);
          else y_q = f_of(op[1:0], x_q, a_q, b_q);
      endcase
    end
  end

endmodule
