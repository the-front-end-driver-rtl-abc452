// tb_event_buffer_ctrl: events of random length are written through a small
// buffer (2^6 words) into the SRAM model while the output is stalled at
// random. Every event must come out whole and in order with first/last
// marks; the buffer must refuse data when full (back-pressure) and the
// occupancy must count the words held.
module tb_event_buffer_ctrl;
  import fed_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic i_valid = 0, i_last = 0, i_ready;
  logic [63:0] i_data = 0;
  logic sram_we, sram_re;
  logic [AW-1:0] sram_waddr, sram_raddr;
  logic [63:0] sram_wdata, sram_rdata;
  logic o_valid, o_first, o_last, o_ready = 0;
  logic [63:0] o_data;
  logic [AW:0] occupancy;
  logic [8:0] events_stored;
  event_buffer_ctrl #(.AW(AW), .RD_LAT(2)) dut (.*);
  qdr_sram_model #(.AW(AW), .RD_LAT(2)) u_sram (.clk, .we(sram_we), .waddr(sram_waddr),
    .wdata(sram_wdata), .re(sram_re), .raddr(sram_raddr), .rdata(sram_rdata));

  int checks = 0, failures = 0, full_seen = 0, max_occ = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] src[$], exp_q[$];
  bit last_q[$], exp_first[$], exp_last[$];
  bit stall = 1;
  always @(negedge clk) begin
    i_valid = (src.size() > 0);
    i_data = i_valid ? src[0] : 0;
    i_last = i_valid ? last_q[0] : 0;
    o_ready = !stall && ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    if (i_valid && i_ready) begin void'(src.pop_front()); void'(last_q.pop_front()); end
    if (i_valid && !i_ready) full_seen++;
    if (int'(occupancy) > max_occ) max_occ = int'(occupancy);
    if (o_valid && o_ready) begin
      check(exp_q.size() > 0 && o_data == exp_q[0] && o_first == exp_first[0] && o_last == exp_last[0],
            $sformatf("output word %h", o_data));
      void'(exp_q.pop_front()); void'(exp_first.pop_front()); void'(exp_last.pop_front());
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int e = 0; e < 40; e++) begin
      int n;
      n = int'($urandom_range(2, 20));
      for (int i = 0; i < n; i++) begin
        logic [63:0] w;
        w = {32'(e), 32'($urandom)};
        src.push_back(w); last_q.push_back(i == n - 1);
        exp_q.push_back(w); exp_first.push_back(i == 0); exp_last.push_back(i == n - 1);
      end
    end
    repeat (300) @(posedge clk);   // output stalled: the buffer fills
    check(occupancy == (AW+1)'(2**AW), "buffer full");
    check(full_seen > 0, "input refused while full");
    stall = 0;
    wait (exp_q.size() == 0);
    repeat (20) @(posedge clk);
    check(occupancy == 0 && !o_valid, "buffer empty at the end");
    $display("max occupancy %0d", max_occ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
