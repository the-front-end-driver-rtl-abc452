// tb_slink64_tx: events are sent while the link raises its full flag at
// random. Every word must appear once on ud with uwen_n low, header and
// trailer words with uctrl_n low, data words with uctrl_n high, no word may
// be written in the clock after lff_n was low, and the counters must match.
module tb_slink64_tx;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic i_valid = 0, i_first = 0, i_last = 0, i_ready, uwen_n, uctrl_n, lff_n = 1, stalled;
  logic [63:0] i_data = 0, ud;
  logic [31:0] events_sent, words_sent;
  slink64_tx dut (.*);

  int checks = 0, failures = 0, stalls = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] src[$], expw[$];
  bit f_q[$], l_q[$], ctrl_q[$];
  logic lff_prev = 1, lff_prev2 = 1;
  always @(negedge clk) begin
    i_valid = (src.size() > 0);
    i_data = i_valid ? src[0] : 0;
    i_first = i_valid ? f_q[0] : 0;
    i_last = i_valid ? l_q[0] : 0;
    lff_n = ($urandom_range(0, 4) != 0);
  end
  always @(posedge clk) begin
    if (i_valid && i_ready) begin void'(src.pop_front()); void'(f_q.pop_front()); void'(l_q.pop_front()); end
    if (stalled) stalls++;
    if (!rst && !uwen_n) begin
      check(lff_prev2, "no write after link full");
      check(expw.size() > 0 && ud == expw[0] && uctrl_n == !ctrl_q[0], $sformatf("word on the link %h %b, %0d left", ud, uctrl_n, expw.size()));
      void'(expw.pop_front()); void'(ctrl_q.pop_front());
    end
    lff_prev2 <= lff_prev;
    lff_prev <= lff_n;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int e = 0; e < 20; e++) begin
      int n;
      n = int'($urandom_range(2, 12));
      for (int i = 0; i < n; i++) begin
        logic [63:0] w;
        w = {$urandom, $urandom};
        src.push_back(w); f_q.push_back(i == 0); l_q.push_back(i == n - 1);
        expw.push_back(w); ctrl_q.push_back(i == 0 || i == n - 1);
      end
      total += n;
    end
    wait (src.size() == 0);
    repeat (5) @(posedge clk);
    check(expw.size() == 0, "all words sent");
    check(events_sent == 20 && words_sent == 32'(total), "counters");
    check(stalls > 0, "link full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
