// tb_channel_buffer: frames are written in APV25 output order; the bank
// offered must hold them in physical strip order with the pedestals
// subtracted (raw values in raw mode). Two frames are held at once, a third
// one is dropped with ovf, and releasing a bank offers the next frame.
module tb_channel_buffer;
  import fed_pkg::*;
  import tb_apv_pkg::*;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  mode_e mode = MODE_ZS;
  logic ped_we = 0; logic [7:0] ped_addr = 0; logic [ADC_W-1:0] ped_wdata = 0;
  logic hdr_valid = 0, hdr_err0 = 0, hdr_err1 = 0;
  logic [7:0] hdr_paddr0 = 0, hdr_paddr1 = 0;
  logic s_valid = 0, s_apv = 0, s_last = 0;
  logic [6:0] s_idx = 0;
  logic [ADC_W-1:0] s_raw = 0;
  logic rdy, err0, err1, release_bank = 0, ovf;
  val_t vals [FRAME_STRIPS];
  logic [7:0] paddr0, paddr1;
  channel_buffer dut (.*);

  int checks = 0, failures = 0, ovfs = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (ovf) ovfs++;

  int ped [256];
  int raw [3][256];

  task automatic send(int f, int pa);
    @(negedge clk);
    hdr_valid = 1; hdr_paddr0 = 8'(pa); hdr_paddr1 = 8'(pa + 1); hdr_err0 = 1'(f); hdr_err1 = 0;
    @(negedge clk); hdr_valid = 0;
    for (int j = 0; j < 256; j++) begin
      s_valid = 1; s_apv = 1'(j % 2); s_idx = 7'(j / 2);
      s_raw = 10'(raw[f][(j % 2) * 128 + phys(j / 2)]);
      s_last = (j == 255);
      @(negedge clk);
      s_valid = 0; s_last = 0;
      @(negedge clk);
    end
  endtask

  task automatic expect_bank(int f, bit rawm, int pa);
    check(rdy, "bank ready");
    check(paddr0 == 8'(pa) && paddr1 == 8'(pa + 1) && err0 == 1'(f), "header kept with bank");
    for (int s = 0; s < 256; s++)
      check(int'(vals[s]) == (rawm ? raw[f][s] : raw[f][s] - ped[s]),
            $sformatf("frame %0d strip %0d: %0d", f, s, vals[s]));
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 3; f++) for (int s = 0; s < 256; s++) raw[f][s] = int'($urandom_range(0, 1023));
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 256; s++) begin
      ped[s] = int'($urandom_range(0, 1023));
      @(negedge clk); ped_we = 1; ped_addr = 8'(s); ped_wdata = 10'(ped[s]);
    end
    @(negedge clk); ped_we = 0;
    check(!rdy, "no bank before a frame");
    send(0, 10);
    @(negedge clk);
    expect_bank(0, 0, 10);
    send(1, 20);             // second bank while the first is still held
    send(2, 30);             // no free bank: dropped
    @(negedge clk);
    check(ovfs == 1, "third frame dropped");
    expect_bank(0, 0, 10);
    release_bank = 1; @(negedge clk); release_bank = 0;
    expect_bank(1, 0, 20);
    release_bank = 1; @(negedge clk); release_bank = 0;
    check(!rdy, "both banks free");
    mode = MODE_RAW;
    send(2, 40);
    @(negedge clk);
    expect_bank(2, 1, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
