// tb_fe_channel: end-to-end test of one fibre's processing chain.
// Frames with random pedestals, common mode and clusters are sent in
// zero-suppressed and raw mode, partly back to back (both frame banks in
// use); the bytes and frame records read from the FIFOs are compared with
// the reference model of tb_apv_pkg. A last phase stops reading the FIFO so
// that frames are dropped and checks that the overflow flag is reported.
module tb_fe_channel;
  import fed_pkg::*;
  import tb_apv_pkg::*;

  logic clk = 0, rst = 1, tick = 0;
  always #3 clk = !clk;
  logic [ADC_W-1:0] sample = 10'(LOW_LVL);
  mode_e mode = MODE_ZS;
  ch_cfg_t cfg;
  logic ped_we = 0; logic [7:0] ped_addr = 0; logic [ADC_W-1:0] ped_wdata = 0;
  logic frame_start, byte_rd = 0, byte_empty, rec_rd = 0, rec_empty;
  logic [7:0] byte_data;
  logic [10:0] byte_level;
  ch_rec_t rec;

  fe_channel #(.FIFO_DEPTH(1024)) dut (.*);

  int checks = 0, failures = 0;
  int q[$];
  byte unsigned exp_q[$];
  int exp_pa[$];
  int ped [256];
  int low = 8, high = 24;
  int frames_done = 0, ovf_seen = 0;
  bit reading = 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sample source: one sample per tick
  logic [1:0] ph = 0;
  always @(posedge clk) begin
    ph <= ph + 1;
    tick <= (ph == 2);
    if (ph == 2) sample <= (q.size() > 0) ? 10'(q.pop_front()) : 10'(LOW_LVL);
  end

  // FIFO reader and checker
  initial begin : reader
    forever begin
      @(negedge clk);
      if (reading && !rec_empty) begin
        int nb, pa;
        ch_rec_t r;
        r = rec;
        rec_rd = 1; @(negedge clk); rec_rd = 0;
        nb = int'(r.nbytes);
        if (r.ovf) ovf_seen++;
        pa = (exp_pa.size() > 0) ? exp_pa.pop_front() : -1;
        if (pa >= 0) begin
          check(r.paddr0 == 8'(pa) && r.paddr1 == 8'(pa), "pipeline address");
          check(r.apv_err0 == 0 && r.apv_err1 == (pa == 77), "APV error bits");
        end
        for (int i = 0; i < nb; i++) begin
          byte unsigned e;
          while (byte_empty) @(negedge clk);
          e = (exp_q.size() > 0) ? exp_q.pop_front() : 8'hEE;
          if (pa >= 0) check(byte_data == e, $sformatf("byte %0d: got %02x exp %02x", i, byte_data, e));
          byte_rd = 1; @(negedge clk); byte_rd = 0;
        end
        frames_done++;
      end
    end
  end

  task automatic send(int pa, bit raw_mode, int nclus, int gap);
    int raw [256];
    make_raw(ped, nclus, raw, int'($urandom_range(0, 1000)));
    add_frame(q, pa, pa, 1'b0, (pa == 77), raw);
    add_idle(q, gap);
    expect_bytes(exp_q, raw, ped, low, high, raw_mode);
    exp_pa.push_back(pa);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{hdr_thr: 10'd600, low_thr: 12'(low), high_thr: 12'(high)};
    repeat (5) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 256; s++) begin
      ped[s] = int'($urandom_range(150, 450));
      @(posedge clk); ped_we <= 1; ped_addr <= 8'(s); ped_wdata <= 10'(ped[s]);
    end
    @(posedge clk); ped_we <= 0;
    add_idle(q, 150);
    // zero-suppressed frames, some back to back, one with an APV error
    send(12, 0, 3, 100);
    send(77, 0, 6, 0);
    send(13, 0, 0, 0);
    send(200, 0, 10, 200);
    wait (q.size() == 0);
    wait (frames_done == 4);
    repeat (50) @(posedge clk);
    // raw mode
    mode = MODE_RAW;
    send(5, 1, 2, 100);
    send(6, 1, 2, 100);
    wait (q.size() == 0);
    wait (frames_done == 6);
    repeat (50) @(posedge clk);
    check(exp_q.size() == 0, "all expected bytes seen");
    // overflow: stop reading, raw frames fill the FIFO, later frames dropped
    reading = 0;
    for (int i = 0; i < 6; i++) begin
      int raw [256];
      make_raw(ped, 0, raw, i);
      add_frame(q, 9, 9, 0, 0, raw);
    end
    wait (q.size() == 0);
    repeat (400) @(posedge clk);
    exp_pa.push_back(-1); exp_pa.push_back(-1); exp_pa.push_back(-1); exp_pa.push_back(-1);
    reading = 1;
    wait (frames_done >= 9);
    repeat (3000) @(posedge clk);
    check(ovf_seen > 0, "overflow reported after dropped frames");
    $display("frames read %0d, overflow records %0d", frames_done, ovf_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
