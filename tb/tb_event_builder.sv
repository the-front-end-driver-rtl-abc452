// tb_event_builder: triggers with known labels are queued and the 8 link
// FIFOs are modelled by queues filled with module fragments of random
// length. The 64-bit event words (header with event number, crossing and
// FED id, the fragments packed four words at a time, zero padding, trailer
// with length, pipeline address and status) are rebuilt independently and
// compared under random output back-pressure. One event has a module with a
// different pipeline address and must raise sync_err.
module tb_event_builder;
  import fed_pkg::*;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic [11:0] fed_id = 12'h2A5;
  logic l1a = 0, trig_afull, o_valid, o_last, o_ready = 1, sync_err;
  logic [23:0] evt = 0, events_built;
  logic [11:0] l1a_bx = 0;
  logic [4:0] trig_level;
  logic [15:0] lk_data [N_MODULES];
  logic [N_MODULES-1:0] lk_empty, lk_rd;
  logic [63:0] o_data;
  event_builder dut (.*);

  logic [15:0] lq [N_MODULES][$];
  task automatic refresh();
    for (int m = 0; m < N_MODULES; m++) begin
      lk_empty[m] = (lq[m].size() == 0);
      lk_data[m] = lk_empty[m] ? 16'h0 : lq[m][0];
    end
  endtask
  always @(posedge clk) begin
    for (int m = 0; m < N_MODULES; m++) if (lk_rd[m]) void'(lq[m].pop_front());
    #1 refresh();
  end

  int checks = 0, failures = 0, sync_pulses = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] got[$], expw[$];
  bit got_last[$], exp_last[$];
  always @(posedge clk) begin
    if (o_valid && o_ready) begin got.push_back(o_data); got_last.push_back(o_last); end
    if (sync_err) sync_pulses++;
    o_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic event_(int e, int bx, int pa, int bad);
    logic [15:0] words[$];
    logic [7:0] mask = 0;
    int n64;
    for (int m = 0; m < N_MODULES; m++) begin
      int len;
      int p;
      len = int'($urandom_range(1, 30));
      p = (m == bad) ? pa + 3 : pa;
      if (m == bad) mask[m] = 1;
      lq[m].push_back(16'(len)); words.push_back(16'(len));
      lq[m].push_back({8'(p), 4'(m), 4'b0000}); words.push_back({8'(p), 4'(m), 4'b0000});
      for (int i = 1; i < len; i++) begin
        logic [15:0] w;
        w = 16'($urandom);
        lq[m].push_back(w); words.push_back(w);
      end
    end
    while (words.size() % 4 != 0) words.push_back(16'h0);
    expw.push_back({4'h5, 4'h0, 24'(e), 12'(bx), 8'h00, 12'h2A5}); exp_last.push_back(0);
    for (int i = 0; i < words.size(); i += 4) begin
      expw.push_back({words[i], words[i+1], words[i+2], words[i+3]}); exp_last.push_back(0);
    end
    n64 = words.size() / 4 + 2;
    expw.push_back({4'hA, (mask != 0), 3'b000, 24'(n64), 8'(pa), mask, 16'h0});
    exp_last.push_back(1);
    @(negedge clk); l1a = 1; evt = 24'(e); l1a_bx = 12'(bx); @(negedge clk); l1a = 0;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refresh();
    repeat (3) @(posedge clk);
    rst = 0;
    event_(1, 100, 40, -1);
    event_(2, 3563, 41, 6);
    event_(3, 7, 42, -1);
    refresh();
    repeat (3000) @(posedge clk);
    check(got.size() == expw.size(), $sformatf("words %0d exp %0d", got.size(), expw.size()));
    foreach (expw[i]) if (i < got.size())
      check(got[i] == expw[i] && got_last[i] == exp_last[i],
            $sformatf("word %0d got %h exp %h", i, got[i], expw[i]));
    check(sync_pulses == 1, "one synchronisation error");
    check(events_built == 3, "events built");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
