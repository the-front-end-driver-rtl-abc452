// tb_cluster_finder: cluster finding on frames given directly in physical
// order, with the real common mode unit. Directed frames put clusters on the
// APV boundary (strips 127/128, which must stay separate), isolated strips
// just above and below the thresholds and pulse heights above 255; random
// frames follow. The output bytes, under random back-pressure, and the frame
// record must match the reference model; raw mode is checked too.
module tb_cluster_finder;
  import fed_pkg::*;
  import tb_apv_pkg::*;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  mode_e mode = MODE_ZS;
  logic [VAL_W-1:0] low_thr = 12'd8, high_thr = 12'd24;
  logic rdy = 0, err0 = 0, err1 = 1, ovf_seen = 0, bank_release;
  val_t vals [FRAME_STRIPS];
  logic [7:0] paddr0 = 8'd33, paddr1 = 8'd33;
  logic cm_start, cm_sel, cm_done, cm_busy;
  val_t cm_median, cm_vals [N_STRIPS];
  logic b_valid, b_ready = 1, rec_valid, rec_ready = 1;
  logic [7:0] b_data;
  ch_rec_t rec;
  cluster_finder dut (.*);
  always_comb for (int i = 0; i < N_STRIPS; i++) cm_vals[i] = vals[{cm_sel, 7'(i)}];
  cm_median u_cm (.clk, .rst, .start(cm_start), .vals(cm_vals), .busy(cm_busy),
                  .done(cm_done), .median(cm_median));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned got[$];
  always @(posedge clk) begin
    if (b_valid && b_ready) got.push_back(b_data);
    b_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic run(int v[256], bit rawm);
    byte unsigned exp_q[$];
    int zero [256];
    foreach (zero[i]) zero[i] = 0;
    got.delete();
    expect_bytes(exp_q, v, zero, 8, 24, rawm);
    mode = rawm ? MODE_RAW : MODE_ZS;
    for (int s = 0; s < 256; s++) vals[s] = val_t'(v[s]);
    @(negedge clk); rdy = 1;
    while (!rec_valid) @(negedge clk);
    check(rec.nbytes == 10'(exp_q.size()), $sformatf("byte count %0d exp %0d", rec.nbytes, exp_q.size()));
    check(rec.paddr0 == 8'd33 && rec.apv_err1 && !rec.apv_err0, "record header");
    check(got.size() == exp_q.size(), "bytes received");
    foreach (exp_q[i]) if (i < got.size())
      check(got[i] == exp_q[i], $sformatf("byte %0d got %02x exp %02x", i, got[i], exp_q[i]));
    rdy = 0;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [256];
    repeat (3) @(posedge clk);
    rst = 0;
    // directed frame
    foreach (v[i]) v[i] = 0;
    v[126] = 10; v[127] = 12;       // pair at the end of APV 0: kept
    v[128] = 30;                     // isolated high strip at start of APV 1: kept
    v[10] = 9;                       // isolated above low only: dropped
    v[20] = 25;                      // isolated above high: kept
    v[40] = 24;                      // equal to high: dropped
    v[50] = 9; v[51] = 8;            // second equals low: dropped
    v[60] = 400; v[61] = 300; v[62] = 9;  // saturation, cluster of 3
    v[255] = 100; v[254] = 9;        // cluster at the very end
    run(v, 0);
    // common mode offsets and random clusters
    for (int t = 0; t < 30; t++) begin
      int ped0 [256];
      foreach (ped0[i]) ped0[i] = 0;
      make_raw(ped0, t % 12, v, t * 37);
      for (int s = 0; s < 256; s++) v[s] = v[s] - 200;
      run(v, 0);
    end
    for (int s = 0; s < 256; s++) v[s] = int'($urandom_range(0, 1023));
    run(v, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
