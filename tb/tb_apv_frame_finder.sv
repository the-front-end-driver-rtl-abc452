// tb_apv_frame_finder: idle stretches with tick marks and a 5-sample
// '1' run (neither may start a frame), then frames with known pipeline
// addresses and error bits. Every analogue sample must come out with the
// right APV, output index and value, and the first sample must follow the
// header pulse by one sample period (4 clocks), the last by 256 periods.
module tb_apv_frame_finder;
  import fed_pkg::*;
  import tb_apv_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  always #3 clk = !clk;
  logic [ADC_W-1:0] sample = 10'(LOW_LVL);
  logic [ADC_W-1:0] hdr_thr = 10'd600;
  logic in_frame, hdr_valid, err0, err1, s_valid, s_apv, s_last;
  logic [7:0] paddr0, paddr1;
  logic [6:0] s_idx;
  logic [ADC_W-1:0] s_raw;
  apv_frame_finder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int q[$];
  int exp_strips[$];
  int exp_hdr[$];
  logic [1:0] ph = 0;
  always @(posedge clk) begin
    ph <= ph + 1;
    tick <= (ph == 2);
    if (ph == 2) sample <= (q.size() > 0) ? 10'(q.pop_front()) : 10'(LOW_LVL);
  end

  int cyc = 0, t_hdr = 0, j = 0, frames = 0;
  always @(posedge clk) begin
    cyc++;
    if (hdr_valid) begin
      int e;
      t_hdr = cyc; j = 0;
      e = exp_hdr.pop_front();
      check({paddr0, paddr1, err0, err1} == 18'(e), $sformatf("header %h", {paddr0, paddr1, err0, err1}));
    end
    if (s_valid) begin
      int e;
      e = exp_strips.pop_front();
      check(s_apv == 1'(j % 2) && s_idx == 7'(j / 2) && s_raw == 10'(e), $sformatf("strip %0d", j));
      if (j == 0) check(cyc - t_hdr == 4, "first strip one sample after header");
      check(s_last == (j == 255), "last flag");
      if (s_last) begin
        check(cyc - t_hdr == 4 * 256, "frame length");
        frames++;
      end
      j++;
    end
  end

  task automatic frame(int pa0, int pa1, bit e0, bit e1);
    int raw [256];
    for (int s = 0; s < 256; s++) raw[s] = int'($urandom_range(0, 1023));
    add_frame(q, pa0, pa1, e0, e1, raw);
    for (int k = 0; k < 256; k++) exp_strips.push_back(raw[(k % 2) * 128 + phys(k / 2)]);
    exp_hdr.push_back((pa0 << 10) | (pa1 << 2) | (e0 << 1) | e1);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    add_idle(q, 300);
    for (int i = 0; i < 5; i++) q.push_back(HIGH_LVL);
    q.push_back(LOW_LVL);
    add_idle(q, 100);
    frame(8'hA5, 8'h3C, 0, 1);
    add_idle(q, 71);
    frame(8'h00, 8'hFF, 1, 0);
    frame(8'h81, 8'h81, 0, 0);
    add_idle(q, 50);
    wait (q.size() == 0);
    repeat (20) @(posedge clk);
    check(frames == 3, $sformatf("frames found %0d", frames));
    check(exp_hdr.size() == 0 && exp_strips.size() == 0, "nothing missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
