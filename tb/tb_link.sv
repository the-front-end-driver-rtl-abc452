// tb_link: link_tx and link_rx back to back. Fragments of random length
// (including an empty one) are sent; the receive FIFO must hold exactly the
// words sent. The line must carry one start nibble and then one nibble per
// clock, so a fragment of n words occupies 1 + 4n clocks (4 bits at 160 MHz).
// A small receive FIFO that is not read checks the overflow flag.
module tb_link;
  import fed_pkg::*;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic w_valid = 0, w_first = 0, w_ready, busy, underrun;
  logic [15:0] w_data = 0;
  logic [3:0] link_d;
  logic rd_en = 0, empty, ovf, empty2, ovf2;
  logic [15:0] rd_data, rd_data2;
  logic [12:0] level;
  logic [3:0] level2;
  link_tx tx (.*);
  link_rx #(.DEPTH(4096)) rx (.clk, .rst, .link_d, .rd_en, .rd_data, .empty, .level, .ovf);
  link_rx #(.DEPTH(8)) rx2 (.clk, .rst, .link_d, .rd_en(1'b0), .rd_data(rd_data2), .empty(empty2),
                            .level(level2), .ovf(ovf2));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] src[$], sent[$];
  bit first_q[$];
  always @(posedge clk) begin
    if (w_valid && w_ready) begin void'(src.pop_front()); void'(first_q.pop_front()); end
  end
  always @(negedge clk) begin
    w_valid = (src.size() > 0);
    w_data  = w_valid ? src[0] : 16'h0;
    w_first = w_valid ? first_q[0] : 1'b0;
  end

  int busy_cycles = 0;
  always @(posedge clk) if (link_d != LINK_IDLE || busy) busy_cycles++;

  task automatic frag(int n);
    src.push_back(16'(n)); first_q.push_back(1); sent.push_back(16'(n));
    for (int i = 0; i < n; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      src.push_back(w); first_q.push_back(0); sent.push_back(w);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    repeat (3) @(posedge clk);
    rst = 0;
    // one fragment alone: timing
    frag(9);
    wait (src.size() == 0);
    repeat (10) @(posedge clk);
    check(busy_cycles == 1 + 4 * 10, $sformatf("line time %0d clocks for 10 words", busy_cycles));
    total = 10;
    frag(0); frag(1); frag(200); frag(3);
    total += 1 + 2 + 201 + 4;
    wait (src.size() == 0);
    repeat (20) @(posedge clk);
    check(32'(level) == total, $sformatf("words received %0d exp %0d", level, total));
    foreach (sent[i]) begin
      @(negedge clk);
      check(!empty && rd_data == sent[i], $sformatf("word %0d", i));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(empty && !ovf, "receive FIFO drained, no overflow");
    check(!underrun, "no transmit underrun");
    check(ovf2, "small FIFO overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
