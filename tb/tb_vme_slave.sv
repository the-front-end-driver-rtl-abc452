// tb_vme_slave: a VME master model runs single D32 write and read cycles.
// Writes to the board's slot must reach the configuration bus with the right
// word address and data, reads must return the bus data, and cycles to
// another slot, with a non-A32 address modifier or with an invalid
// geographic address parity must get no DTACK.
module tb_vme_slave;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic [4:0] ga_n = ~5'd9;
  logic gap_n = 1'b0;    // slot 9: pins 10110 have three ones, GAP* = 0 keeps parity odd
  logic as_n = 1, write_n = 1, lword_n = 0, data_oe, dtack_n;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 6'h09;
  logic [31:1] addr = 0;
  logic [31:0] data_in = 0, data_out;
  logic cfg_we, cfg_re;
  logic [23:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  vme_slave #(.CFG_RD_LAT(3)) dut (.*);

  // register file behind the bus, read data two clocks after cfg_re
  logic [31:0] regs [16];
  logic [31:0] rd1;
  int writes = 0;
  always @(posedge clk) begin
    if (cfg_we) begin regs[cfg_addr[3:0]] <= cfg_wdata; writes++; end
    if (cfg_re) rd1 <= regs[cfg_addr[3:0]];
    cfg_rdata <= rd1;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cycle(input logic [31:0] a, input bit wr, input logic [31:0] wd,
                       output logic [31:0] rd, output bit acked);
    int t;
    addr = a[31:1]; write_n = !wr; data_in = wd;
    #20 as_n = 0;
    #10 ds_n = 2'b00;
    t = 0; acked = 0;
    while (t < 200 && dtack_n) begin @(posedge clk); t++; end
    acked = !dtack_n;
    rd = data_out;
    #10 ds_n = 2'b11; as_n = 1;
    t = 0;
    while (t < 50 && !dtack_n) begin @(posedge clk); t++; end
    check(dtack_n, "dtack released");
    #20;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    bit ack;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      cycle({5'd9, 3'b000, 20'h0, 2'(i), 2'b00} | (32'(i) << 2), 1, 32'hC0DE_0000 + i, rd, ack);
      check(ack, "write acknowledged");
    end
    check(writes == 8, "eight bus writes");
    for (int i = 0; i < 8; i++) begin
      cycle({5'd9, 27'h0} | (32'(i) << 2), 0, 0, rd, ack);
      check(ack && rd == 32'hC0DE_0000 + i, $sformatf("read back %h", rd));
    end
    cycle({5'd8, 27'h0}, 1, 32'h1, rd, ack);
    check(!ack, "other slot ignored");
    am = 6'h39;
    cycle({5'd9, 27'h0}, 1, 32'h1, rd, ack);
    check(!ack, "A24 modifier ignored");
    am = 6'h0D; gap_n = 1'b1;
    cycle({5'd9, 27'h0}, 1, 32'h1, rd, ack);
    check(!ack, "bad geographic parity ignored");
    gap_n = 1'b0;
    cycle({5'd9, 27'h0} | 32'h8, 1, 32'h55, rd, ack);
    check(ack && regs[2] == 32'h55, "supervisory A32 modifier accepted");
    check(writes == 9, "no stray writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
