// tb_tcs_feedback: each condition is applied alone and in combination; the
// state must follow the priority ERROR > OOS > BUSY > WARN > READY one clock
// later, ERROR and OOS must hold until cleared, and the interrupt must
// follow them only while enabled.
module tb_tcs_feedback;
  import fed_pkg::*;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic [18:0] occupancy = 0, warn_level = 19'd1000, busy_level = 19'd2000;
  logic [7:0] fe_full = 0, fe_pfull = 0;
  logic trig_afull = 0, sync_err = 0, data_lost = 0, clear_err = 0, irq_en = 0, irq_n;
  tts_e tts;
  tcs_feedback dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %h)", what, tts); end
  endtask
  task automatic expect_(tts_e s, string what);
    @(negedge clk); @(negedge clk);
    check(tts == s, what);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    expect_(TTS_READY, "ready");
    occupancy = 999;  expect_(TTS_READY, "below warn level");
    occupancy = 1000; expect_(TTS_WARN, "warn level");
    occupancy = 0; fe_pfull = 8'h10; expect_(TTS_WARN, "module partially full");
    fe_pfull = 0; occupancy = 2000; expect_(TTS_BUSY, "busy level");
    occupancy = 0; fe_full = 8'h01; expect_(TTS_BUSY, "module full");
    fe_full = 0; trig_afull = 1; expect_(TTS_BUSY, "trigger queue");
    trig_afull = 0; expect_(TTS_READY, "back to ready");
    irq_en = 1;
    @(negedge clk); sync_err = 1; @(negedge clk); sync_err = 0;
    occupancy = 2000;
    expect_(TTS_OOS, "out of sync holds over busy");
    check(!irq_n, "interrupt on loss of sync");
    @(negedge clk); data_lost = 1; @(negedge clk); data_lost = 0;
    expect_(TTS_ERROR, "error holds over out of sync");
    irq_en = 0; expect_(TTS_ERROR, "error sticky");
    check(irq_n, "interrupt masked");
    @(negedge clk); clear_err = 1; @(negedge clk); clear_err = 0;
    expect_(TTS_BUSY, "cleared, busy remains");
    occupancy = 0; expect_(TTS_READY, "ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
