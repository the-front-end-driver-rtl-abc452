// tb_fe_module: one front-end module with all 12 channels. Pedestals are
// loaded over the configuration bus (broadcast, then one channel
// individually), frames are sent on all fibres at once, and the nibbles on
// the link are decoded by the testbench and compared with fragments built
// from the reference model. Covered: zero-suppressed events, a pipeline
// address mismatch on one channel, raw events back to back (which must
// raise pfull and full), spy capture and read-back through the bus, and the
// configuration read-back.
module tb_fe_module;
  import fed_pkg::*;
  import tb_apv_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  always #3 clk = !clk;
  logic [3:0] module_id = 4'd6;
  logic [ADC_W-1:0] adc [N_CH];
  logic cfg_we = 0, cfg_re = 0;
  logic [19:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic [3:0] link_d;
  logic full, pfull, sync_err;
  fe_module #(.FIFO_DEPTH(1024), .SPY_EVENTS(2), .SPY_SEG(512)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int q [N_CH][$];
  logic [1:0] ph = 0;
  always @(posedge clk) begin
    ph <= ph + 1;
    tick <= (ph == 2);
    if (ph == 2)
      for (int c = 0; c < N_CH; c++) adc[c] <= (q[c].size() > 0) ? 10'(q[c].pop_front()) : 10'(LOW_LVL);
  end

  // link decoder
  logic [15:0] got[$];
  int frags = 0;
  initial begin : decoder
    forever begin
      int n;
      logic [15:0] w;
      @(posedge clk);
      if (link_d == LINK_SOF) begin
        n = -1;
        while (n != 0) begin
          w = 0;
          for (int k = 0; k < 4; k++) begin @(posedge clk); w = {w[11:0], link_d}; end
          got.push_back(w);
          n = (n < 0) ? int'(w) : n - 1;
        end
        frags++;
      end
    end
  end

  int full_seen = 0, pfull_seen = 0, sync_seen = 0;
  always @(posedge clk) begin
    if (full) full_seen++;
    if (pfull) pfull_seen++;
    if (sync_err) sync_seen++;
  end

  task automatic wr(logic [19:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(logic [19:0] a, output logic [31:0] d);
    @(negedge clk); cfg_re = 1; cfg_addr = a;
    @(negedge clk); cfg_re = 0;
    @(negedge clk); @(negedge clk);
    d = cfg_rdata;
  endtask

  int ped [N_CH][256];
  logic [15:0] expw[$];

  task automatic event_(int pa, int bad_ch, bit rawm, int nclus);
    logic [15:0] body[$];
    bit mism_any = 0;
    for (int c = 0; c < N_CH; c++) begin
      int raw [256];
      byte unsigned b[$];
      int p;
      make_raw(ped[c], nclus, raw, int'($urandom_range(0, 999)));
      p = (c == bad_ch) ? pa ^ 1 : pa;
      add_frame(q[c], p, p, 0, 0, raw);
      add_idle(q[c], 30);
      expect_bytes(b, raw, ped[c], 8, 24, rawm);
      body.push_back({4'(c), 8'h00, 2'b00, (c == bad_ch), 1'b0});
      mism_any |= (c == bad_ch);
      body.push_back(16'(b.size()));
      for (int i = 0; i < b.size(); i += 2)
        body.push_back({b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00});
    end
    expw.push_back(16'(body.size() + 1));
    expw.push_back({8'(pa), 4'd6, rawm, 1'b0, mism_any, 1'b0});
    foreach (body[i]) expw.push_back(body[i]);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int c = 0; c < N_CH; c++) adc[c] = 10'(LOW_LVL);
    repeat (5) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 256; s++) begin
      int p;
      p = int'($urandom_range(150, 400));
      for (int c = 0; c < N_CH; c++) ped[c][s] = p;
      wr({4'd14, 4'd0, 4'd0, 8'(s)}, 32'(p));
    end
    for (int s = 0; s < 256; s++) begin
      ped[5][s] = int'($urandom_range(150, 400));
      wr({4'd5, 4'd0, 4'd0, 8'(s)}, 32'(ped[5][s]));
    end
    wr({4'd14, 4'd1, 12'd0}, 32'd600);       // header threshold, all channels
    rd({4'd3, 4'd1, 12'd2}, d);
    check(d == 32'd24, "high threshold read back");
    rd({4'd3, 4'd1, 12'd0}, d);
    check(d == 32'd600, "header threshold read back");
    wr({4'd15, 16'd1}, 32'd1);                // arm spy for one event
    for (int c = 0; c < N_CH; c++) add_idle(q[c], 100);
    event_(21, -1, 0, 4);
    event_(22, 7, 0, 8);
    event_(23, -1, 0, 0);
    wait (frags == 3);
    repeat (100) @(posedge clk);
    check(sync_seen == 1, "one address mismatch");
    // spy memory of channel 4 holds the first frame: its header start bits
    begin
      int highs = 0;
      for (int i = 0; i < 64; i++) begin
        rd({4'd4, 4'd2, 12'(i)}, d);
        if (d >= 32'd600) highs++;
      end
      check(highs >= 6 && highs < 40, $sformatf("spy holds the header (%0d high samples)", highs));
    end
    // raw events back to back
    wr({4'd15, 16'd0}, 32'd1);
    event_(30, -1, 1, 2);
    event_(31, -1, 1, 2);
    event_(32, -1, 1, 2);
    wait (frags == 6);
    repeat (100) @(posedge clk);
    check(pfull_seen > 0, "partially full flag raised");
    check(full_seen > 0, "full flag raised");
    check(!full && !pfull, "flags drop when drained");
    rd({4'd15, 16'd0}, d);
    check(d[0] == 1'b1, "mode read back");
    check(got.size() == expw.size(), $sformatf("words %0d exp %0d", got.size(), expw.size()));
    foreach (expw[i]) if (i < got.size())
      check(got[i] == expw[i], $sformatf("word %0d got %04x exp %04x", i, got[i], expw[i]));
    $display("fragments %0d words %0d", frags, got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
