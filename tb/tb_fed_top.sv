// tb_fed_top: the whole FED at its default sizes (8 modules x 12 fibres,
// 1 kByte channel FIFOs, 4 k-word link FIFOs, 2 MByte event buffer), driven
// through its pins. A VME master model loads the settings, the testbench
// sends APV25 frames on all 96 fibres with a Level-1 trigger for each, and
// every event arriving on S-LINK64 is compared word by word with one rebuilt
// from the reference model of tb_apv_pkg. The run covers, and counts:
// zero-suppressed events, a loss of synchronisation on one fibre (trailer
// mismatch, TTS out-of-sync, VME interrupt, cleared over VME), a test
// trigger from P0, the switch to raw mode, raw events back to back that fill
// the module FIFOs, S-LINK back-pressure that fills the event buffer past
// its warn and busy levels, and VME read-back of the counters. The
// testbench acts as the trigger control: it issues no trigger while the FED
// is BUSY. At the end it prints how often each mechanism was seen and fails
// any that never happened. The APV25 frame format used is the real chip's;
// the checked event format is this design's own.
module tb_fed_top;
  import fed_pkg::*;
  import tb_apv_pkg::*;
  logic clk = 0, rst = 1, tick;
  always #3 clk = !clk;
  logic [ADC_W-1:0] adc [N_MODULES][N_CH];
  logic ttc_l1a = 0, ttc_bc0 = 0, ttc_ecr = 0, p0_trig = 0;
  logic [4:0] vme_ga_n = ~5'd3;
  logic vme_gap_n = 1'b0;          // slot 3: GA* = 11100, odd parity over all six pins
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 0, vme_data_oe, vme_dtack_n, vme_irq_n;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 6'h09;
  logic [31:1] vme_addr = 0;
  logic [31:0] vme_data_in = 0, vme_data_out;
  logic sram_we, sram_re;
  logic [17:0] sram_waddr, sram_raddr;
  logic [63:0] sram_wdata, sram_rdata;
  logic [63:0] slink_ud;
  logic slink_uwen_n, slink_uctrl_n, slink_lff_n = 1;
  tts_e tts;

  fed_top dut (.*);
  qdr_sram_model #(.AW(18), .RD_LAT(2)) u_sram (.clk, .we(sram_we), .waddr(sram_waddr),
    .wdata(sram_wdata), .re(sram_re), .raddr(sram_raddr), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- fibres and trigger
  int q [N_MODULES][N_CH][$];
  bit trig_q[$];                // one entry per sample period: trigger on it
  bit p0_q[$];
  always @(posedge clk) if (tick) begin
    for (int m = 0; m < N_MODULES; m++)
      for (int c = 0; c < N_CH; c++)
        adc[m][c] <= (q[m][c].size() > 0) ? 10'(q[m][c].pop_front()) : 10'(LOW_LVL);
    ttc_l1a <= (trig_q.size() > 0) ? trig_q.pop_front() : 1'b0;
    p0_trig <= (p0_q.size() > 0) ? p0_q.pop_front() : 1'b0;
  end
  int tick_n = 0, l1a_tick[$];
  always @(posedge clk) if (tick) begin
    tick_n++;
  end
  always @(posedge clk) if (dut.l1a) begin
    l1a_tick.push_back(tick_n);
  end


  // ---------------- mechanisms seen
  int n_zs = 0, n_raw = 0, n_sync = 0, n_p0 = 0, n_lff = 0, n_warn = 0, n_busy = 0,
      n_oos = 0, n_irq = 0, n_spy = 0, n_fe_full = 0, n_fe_pfull = 0;
  always @(posedge clk) if (!rst) begin
    if (tts == TTS_WARN) n_warn++;
    if (tts == TTS_BUSY) n_busy++;
    if (tts == TTS_OOS) n_oos++;
    if (!vme_irq_n) n_irq++;
    if (|dut.fe_full || |dut.lk_busy) n_fe_full++;   // front end cannot take a raw event
    if (|dut.fe_pfull) n_fe_pfull++;
    if (!slink_lff_n && dut.ob_valid) n_lff++;
  end

  // ---------------- S-LINK capture
  logic [63:0] got[$];
  bit got_ctrl[$];
  int events_rx = 0;
  always @(posedge clk) if (!rst && !slink_uwen_n) begin
    got.push_back(slink_ud); got_ctrl.push_back(!slink_uctrl_n);
    if (!slink_uctrl_n && slink_ud[63:60] == 4'hA) events_rx++;
  end

  // ---------------- VME master
  task automatic vme(input logic [23:0] a, input bit wr, input logic [31:0] wd,
                     output logic [31:0] rd);
    int t;
    vme_addr = {5'd3, 1'b0, a, 1'b0}; vme_write_n = !wr; vme_data_in = wd;
    #10 vme_as_n = 0;
    #5 vme_ds_n = 2'b00;
    t = 0;
    while (t < 100 && vme_dtack_n) begin @(posedge clk); t++; end
    check(!vme_dtack_n, "VME cycle acknowledged");
    rd = vme_data_out;
    #5 vme_ds_n = 2'b11; vme_as_n = 1;
    while (!vme_dtack_n) @(posedge clk);
  endtask
  task automatic vwr(logic [23:0] a, logic [31:0] d);
    logic [31:0] x;
    vme(a, 1, d, x);
  endtask

  // ---------------- expected events
  int ped [256];
  int spy_ref[$];
  logic [63:0] expw[$];
  bit exp_ctrl[$];
  int exp_evt[$], exp_bxgap[$];

  task automatic event_(int evt, int pa, bit rawm, int nclus, int bad_m, bit p0);
    logic [15:0] words[$];
    logic [7:0] mask = 0;
    for (int m = 0; m < N_MODULES; m++) begin
      logic [15:0] body[$];
      bit mm_any = 0;
      for (int c = 0; c < N_CH; c++) begin
        int raw [256];
        byte unsigned b[$];
        int p;
        bit bad;
        bad = (m == bad_m && c == 2);
        make_raw(ped, nclus, raw, int'($urandom_range(0, 999)));
        p = bad ? pa ^ 8'h10 : pa;
        if (evt == 1 && m == 0 && c == 0) begin
          int sz0 = q[0][0].size();
          add_frame(q[m][c], p, p, 0, 0, raw);
          spy_ref = q[0][0][sz0:$];
        end else
          add_frame(q[m][c], p, p, 0, 0, raw);
        add_idle(q[m][c], 20);
        expect_bytes(b, raw, ped, 8, 24, rawm);
        body.push_back({4'(c), 8'h00, 2'b00, bad, 1'b0});
        mm_any |= bad;
        body.push_back(16'(b.size()));
        for (int i = 0; i < b.size(); i += 2)
          body.push_back({b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00});
      end
      if (mm_any) mask[m] = 1;
      words.push_back(16'(body.size() + 1));
      words.push_back({8'(pa), 4'(m), rawm, 1'b0, mm_any, 1'b0});
      foreach (body[i]) words.push_back(body[i]);
    end
    // trigger on the first header sample of the frames
    for (int i = 0; i < 300; i++) begin
      trig_q.push_back(!p0 && i == 0);
      p0_q.push_back(p0 && i == 0);
    end
    while (words.size() % 4 != 0) words.push_back(16'h0);
    expw.push_back({4'h5, 4'h0, 24'(evt), 12'h000, 8'h00, 12'h0F3}); exp_ctrl.push_back(1);
    for (int i = 0; i < words.size(); i += 4) begin
      expw.push_back({words[i], words[i+1], words[i+2], words[i+3]}); exp_ctrl.push_back(0);
    end
    expw.push_back({4'hA, (mask != 0), 2'b00, rawm, 24'(words.size() / 4 + 2), 8'(pa), mask, 16'h0});
    exp_ctrl.push_back(1);
    exp_evt.push_back(evt);
  endtask

  task automatic idle_all(int n);
    for (int m = 0; m < N_MODULES; m++) for (int c = 0; c < N_CH; c++) add_idle(q[m][c], n);
    for (int i = 0; i < n; i++) begin trig_q.push_back(0); p0_q.push_back(0); end
  endtask

  task automatic wait_sent(int n);
    int t = 0;
    while (events_rx < n && t < 2000000) begin @(posedge clk); t++; end
    check(events_rx >= n, $sformatf("%0d events received", n));
  endtask

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (events out %0d, words %0d, triggers %0d, built %0d, link empty %b, tts %0d)",
             events_rx, got.size(), l1a_tick.size(), dut.events_built, dut.lk_empty, tts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int m = 0; m < N_MODULES; m++) for (int c = 0; c < N_CH; c++) adc[m][c] = 10'(LOW_LVL);
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    // settings: FED id, pedestals broadcast to all 96 channels
    vwr({4'd8, 16'd0, 4'd0}, 32'h0F3);
    for (int s = 0; s < 256; s++) begin
      ped[s] = int'($urandom_range(150, 400));
      vwr({4'd15, 4'd14, 4'd0, 4'd0, 8'(s)}, 32'(ped[s]));
    end
    vme({4'd8, 16'd0, 4'd0}, 0, 0, d);
    check(d == 32'h0F3, "FED id read back");
    vwr({4'd8, 16'd0, 4'd3}, 32'h2);          // interrupt enable, TTC triggers
    // bunch counter reset
    @(negedge clk); while (!tick) @(negedge clk);
    ttc_bc0 = 1; @(negedge clk); while (!tick) @(negedge clk); @(negedge clk); ttc_bc0 = 0;
    vwr({4'd0, 4'd15, 16'd1}, 32'd1);        // spy: capture the next event
    idle_all(100);
    // zero-suppressed events, the second with one fibre out of step
    event_(1, 40, 0, 5, -1, 0);
    idle_all(50);
    event_(2, 41, 0, 8, 5, 0);
    idle_all(50);
    wait_sent(2);
    n_zs += 2; n_sync++;
    // spy memory of module 0, fibre 0 holds the raw frame of event 1
    begin
      int spy [320];
      bit found;
      found = 0;
      for (int a = 0; a < 320; a++) begin
        vme({4'd0, 4'd0, 4'd2, 12'(a)}, 0, 0, d);
        spy[a] = int'(d[9:0]);
      end
      for (int o = 0; o < 40 && !found; o++) begin
        bit ok;
        ok = 1;
        for (int k = 0; k < spy_ref.size() && o + k < 320; k++) if (spy[o+k] != spy_ref[k]) ok = 0;
        found = ok;
      end
      check(found && spy_ref.size() > 250, "spy memory holds the raw frame");
      if (found) n_spy++;
    end
    check(tts == TTS_OOS && !vme_irq_n, "loss of synchronisation reported");
    vwr({4'd8, 16'd0, 4'd4}, 32'h1);          // clear errors
    repeat (4) @(posedge clk);
    check(tts == TTS_READY && vme_irq_n, "errors cleared");
    // test trigger from P0
    vwr({4'd8, 16'd0, 4'd3}, 32'h3);
    event_(3, 42, 0, 3, -1, 1);
    idle_all(50);
    wait_sent(3);
    n_p0++;
    vwr({4'd8, 16'd0, 4'd3}, 32'h2);
    // raw mode, S-LINK held full, low buffer levels
    vwr({4'd8, 16'd0, 4'd1}, 32'd2000);
    vwr({4'd8, 16'd0, 4'd2}, 32'd8000);
    vwr({4'd15, 4'd15, 16'd0}, 32'd1);
    slink_lff_n = 0;
    fork
      begin
        wait (dut.occupancy >= 19'd8000);
        repeat (2000) @(posedge clk);
        slink_lff_n = 1;
      end
    join_none
    for (int k = 0; k < 3; k++) begin
      // trigger control: no new trigger while the FED is busy
      while (trig_q.size() > 0) @(posedge clk);
      repeat (6000) @(posedge clk);
      while (tts == TTS_BUSY) @(posedge clk);
      event_(4 + k, 43 + k, 1, 2, -1, 0);
      idle_all(100);
    end
    wait_sent(6);
    n_raw += 3;
    repeat (50) @(posedge clk);
    vme({4'd8, 16'd0, 4'd7}, 0, 0, d);
    check(d == 32'd6, $sformatf("events sent register %0d", d));
    vme({4'd8, 16'd0, 4'd6}, 0, 0, d);
    check(d == 32'd6, "events built register");
    // compare everything received
    check(got.size() == expw.size(), $sformatf("words %0d exp %0d", got.size(), expw.size()));
    begin
      int e = 0, hdr_i[$];
      foreach (expw[i]) if (i < got.size()) begin
        if (exp_ctrl[i] && expw[i][63:60] == 4'h5) begin
          hdr_i.push_back(i);
          check(got[i][63:32] == expw[i][63:32] && got[i][19:0] == expw[i][19:0] && got_ctrl[i],
                $sformatf("header %0d: %h", e, got[i]));
          e++;
        end else
          check(got[i] == expw[i] && got_ctrl[i] == exp_ctrl[i],
                $sformatf("word %0d got %h exp %h", i, got[i], expw[i]));
      end
      // bunch crossing labels advance like the triggers
      for (int k = 1; k < hdr_i.size() && k < l1a_tick.size(); k++) begin
        int dbx;
        dbx = (int'(got[hdr_i[k]][31:20]) - int'(got[hdr_i[k-1]][31:20]) + 3564) % 3564;
        check(dbx == (l1a_tick[k] - l1a_tick[k-1]) % 3564, $sformatf("crossing label of event %0d", k + 1));
      end
    end
    $display("mechanisms: zs %0d raw %0d sync_err %0d p0_trigger %0d slink_full %0d tts_warn %0d tts_busy %0d tts_oos %0d irq %0d fe_pfull %0d fe_full %0d spy %0d",
             n_zs, n_raw, n_sync, n_p0, n_lff, n_warn, n_busy, n_oos, n_irq, n_fe_pfull, n_fe_full, n_spy);
    check(n_zs > 0, "zero-suppressed events"); check(n_raw > 0, "raw events");
    check(n_sync > 0, "synchronisation error"); check(n_p0 > 0, "P0 trigger");
    check(n_lff > 0, "S-LINK back-pressure"); check(n_warn > 0, "TTS warn");
    check(n_busy > 0, "TTS busy"); check(n_oos > 0, "TTS out of sync");
    check(n_irq > 0, "VME interrupt"); check(n_fe_pfull > 0, "module partially full");
    check(n_fe_full > 0, "front end full");
    check(n_spy > 0, "spy capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
