// event_analysis_tb: self-checking test of event analysis.
//
// Directed cases: an unconditional field fires in the first armed cycle
// and only once; a level condition fires exactly two tester clocks after
// the DUT line changes (the synchroniser depth); an edge condition does not
// fire on a level that is already present and fires after a new rising
// edge; mask bits at zero are don't-care. A random part holds the event
// lines steady, loads random fields and checks fire against
// (ev & mask) == (value & mask) and not edge_only. Watchdog included.
module event_analysis_tb;
  import tester_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic [EV_W-1:0] ev_in = '0;
  logic            load = 1'b0;
  ev_field_t       ev_field = '0;
  logic            fire, armed;
  int              checks = 0, failures = 0;

  event_analysis dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic expect_fire(input logic exp, input string what);
    checks++;
    if (fire !== exp) begin
      failures++;
      $display("FAIL %s: fire=%b expected %b", what, fire, exp);
    end
  endtask

  task automatic arm(input logic e, input logic [EV_W-1:0] m, input logic [EV_W-1:0] v);
    ev_field = '{edge_only: e, mask: m, value: v};
    load = 1'b1;
    tick();
    load = 1'b0;
  endtask

  initial begin
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    // 1. No condition: fires at once, once.
    arm(1'b0, 4'b0000, 4'b0000);
    expect_fire(1'b1, "unconditional");
    tick();
    expect_fire(1'b0, "unconditional disarms");
    // 2. Level condition on line 0, two-clock synchroniser.
    arm(1'b0, 4'b0001, 4'b0001);
    repeat (4) begin expect_fire(1'b0, "level before event"); tick(); end
    ev_in[0] = 1'b1;
    tick();
    expect_fire(1'b0, "level, one clock after");
    tick();
    expect_fire(1'b1, "level, two clocks after");
    tick();
    expect_fire(1'b0, "level fires once");
    // 3. Level already true: fires at once.
    arm(1'b0, 4'b0001, 4'b0001);
    expect_fire(1'b1, "level already true");
    // 4. Edge condition on line 1.
    ev_in[1] = 1'b1;
    repeat (3) tick();
    arm(1'b1, 4'b0010, 4'b0010);
    repeat (4) begin expect_fire(1'b0, "edge on held level"); tick(); end
    ev_in[1] = 1'b0;
    repeat (3) begin expect_fire(1'b0, "edge while low"); tick(); end
    ev_in[1] = 1'b1;
    tick();
    expect_fire(1'b0, "edge, one clock after");
    tick();
    expect_fire(1'b1, "edge, two clocks after");
    tick();
    expect_fire(1'b0, "edge fires once");
    // 5. Falling edge as an edge condition on value 0.
    arm(1'b1, 4'b0010, 4'b0000);
    ev_in[1] = 1'b0;
    tick(); tick();
    expect_fire(1'b1, "falling edge");
    // 6. Don't-care bits.
    ev_in = 4'b1011;
    repeat (3) tick();
    arm(1'b0, 4'b1100, 4'b1000);
    expect_fire(1'b1, "mask 1100 value 1000 on 1011");
    ev_in = 4'b1111;
    repeat (3) tick();
    arm(1'b0, 4'b1100, 4'b1000);
    expect_fire(1'b0, "mask 1100 value 1000 on 1111");
    ev_in = 4'b1011;
    tick(); tick();
    expect_fire(1'b1, "mask 1100 value 1000 after change");
    // 7. Random fields on steady lines.
    for (int n = 0; n < 400; n++) begin
      logic [EV_W-1:0] m, v;
      logic e, exp;
      ev_in = EV_W'($urandom());
      repeat (3) tick();
      m = EV_W'($urandom());
      v = EV_W'($urandom());
      e = 1'($urandom());
      exp = (((ev_in ^ v) & m) == '0) && !e;
      arm(e, m, v);
      expect_fire(exp, "random");
      tick();
      checks++;
      if (armed !== !exp) begin
        failures++;
        $display("FAIL armed=%b after fire=%b", armed, exp);
      end
      if (armed) begin
        // Release by an unconditional field so the next case starts clean.
        arm(1'b0, '0, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
