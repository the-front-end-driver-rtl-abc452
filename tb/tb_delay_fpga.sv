// tb_delay_fpga: the 4 data outputs must repeat the ADC inputs one sample
// later. The spy is armed for 2 events; each trigger must capture SPY_SEG
// samples per channel starting SPY_PRE-1 samples before the one on the
// inputs when the trigger is raised, a third
// trigger must capture nothing, and re-arming must start again at segment 0.
module tb_delay_fpga;
  import fed_pkg::*;
  localparam int SEG = 64, PRE = 8;
  logic clk = 0, rst = 1, tick = 0;
  always #3 clk = !clk;
  logic [ADC_W-1:0] adc [4], dout [4];
  logic spy_arm = 0, spy_trig = 0, spy_busy;
  logic [1:0] spy_nevents = 0, spy_count;
  logic [1:0] spy_rd_ch = 0;
  logic [6:0] spy_rd_addr = 0;
  logic [ADC_W-1:0] spy_rd_data;
  delay_fpga #(.SPY_EVENTS(2), .SPY_SEG(SEG), .SPY_PRE(PRE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sample n of channel c has value (n*4 + c) % 1024
  int n = 0;
  logic [1:0] ph = 0;
  always @(posedge clk) begin
    ph <= ph + 1;
    tick <= (ph == 2);
    if (ph == 2) begin
      for (int c = 0; c < 4; c++) adc[c] <= 10'((n * 4 + c) % 1024);
      n <= n + 1;
    end
  end
  // buffered output check: one sample period later
  always @(posedge clk) if (tick && !rst && n > 2)
    for (int c = 0; c < 4; c++) check(dout[c] == 10'(((n - 2) * 4 + c) % 1024), "buffered data");

  int trig_n [3];
  task automatic trigger(int k);
    @(negedge clk); while (!tick) @(negedge clk);
    @(negedge clk);
    trig_n[k] = n - 1;        // sample on the lines when the trigger is seen
    spy_trig = 1; @(negedge clk); spy_trig = 0;
    repeat (SEG * 4 + 40) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) adc[c] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (100) @(negedge clk);
    spy_nevents = 2; spy_arm = 1; @(negedge clk); spy_arm = 0;
    check(spy_busy, "armed");
    trigger(0);
    trigger(1);
    check(!spy_busy && spy_count == 2, "two events captured");
    trigger(2);
    check(spy_count == 2, "no capture after the selected number");
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 4; c++)
        for (int i = 0; i < SEG; i += 7) begin
          @(negedge clk); spy_rd_ch = 2'(c); spy_rd_addr = 7'(e * SEG + i);
          @(negedge clk);
          check(spy_rd_data == 10'(((trig_n[e] - PRE + 1 + i) * 4 + c) % 1024),
                $sformatf("spy e%0d c%0d i%0d: %0d", e, c, i, spy_rd_data));
        end
    spy_nevents = 1; spy_arm = 1; @(negedge clk); spy_arm = 0;
    trigger(2);
    @(negedge clk); spy_rd_ch = 1; spy_rd_addr = 0; @(negedge clk);
    check(spy_rd_data == 10'(((trig_n[2] - PRE + 1) * 4 + 1) % 1024), "re-armed capture in segment 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
