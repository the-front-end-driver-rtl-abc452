// tb_ttc_counters: the bunch crossing counter must wrap after 3564 ticks and
// restart on bc0; triggers must be numbered 1, 2, ... with the crossing at
// which they arrived, restart after ecr, and come from P0 when selected
// (TTC triggers are then ignored).
module tb_ttc_counters;
  import fed_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  always #3 clk = !clk;
  logic ttc_l1a = 0, ttc_bc0 = 0, ttc_ecr = 0, p0_trig = 0, trig_sel = 0, l1a;
  logic [11:0] bx, l1a_bx;
  logic [23:0] evt;
  ttc_counters dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int model_bx = 0, model_evt = 0, ticks = 0, trigs = 0;
  logic [1:0] ph = 0;
  always @(posedge clk) begin
    ph <= ph + 1;
    tick <= (ph == 2);
  end
  // reference: drive the inputs for one tick, update the model on that tick
  task automatic step(bit l1, bit bc0, bit ecr, bit p0);
    @(negedge clk); while (!tick) @(negedge clk);
    ttc_l1a = l1; ttc_bc0 = bc0; ttc_ecr = ecr; p0_trig = p0;
    @(negedge clk);
    while (!tick) @(negedge clk);
    ttc_l1a = 0; ttc_bc0 = 0; ttc_ecr = 0; p0_trig = 0;
  endtask

  always @(posedge clk) if (!rst && tick) begin
    bit t;
    t = trig_sel ? p0_trig : ttc_l1a;
    if (ttc_ecr) model_evt = 0;
    else if (t) begin model_evt++; trigs++; end
    if (ttc_bc0 || model_bx == 3563) model_bx = 0; else model_bx++;
    ticks++;
  end
  always @(negedge clk) if (!rst) begin
    check(int'(bx) == model_bx, $sformatf("bx %0d exp %0d", bx, model_bx));
    check(int'(evt) == model_evt, "event number");
  end
  int last_bx;
  always @(posedge clk) if (l1a) check(int'(l1a_bx) == ((model_bx + 3563) % 3564), "trigger crossing");

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    step(0, 1, 0, 0);
    repeat (4000) step(($urandom_range(0, 30) == 0), 0, 0, 0);
    check(ticks > 3564, "a full orbit wrapped");
    step(0, 0, 1, 0);
    step(1, 0, 0, 0);
    check(evt == 24'd1, "first event after reset is 1");
    trig_sel = 1;
    step(1, 0, 0, 0);
    check(evt == 24'd1, "TTC trigger ignored when P0 selected");
    step(0, 0, 0, 1);
    check(evt == 24'd2, "P0 test trigger counted");
    step(0, 1, 0, 0);
    check(bx == 12'd0 || bx == 12'd1, "bc0 restarts the crossing count");
    check(trigs > 50, "triggers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
