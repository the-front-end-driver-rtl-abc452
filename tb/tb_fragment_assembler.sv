// tb_fragment_assembler: the 12 channel FIFOs are modelled by queues that
// hold random frame records and bytes (odd and even counts, empty channels).
// Under random back-pressure the fragment words must follow the format: the
// length, the module header, then per channel two control words and the
// bytes packed two per word. One event has a channel with a different
// pipeline address, which must be flagged and pulse sync_err.
module tb_fragment_assembler;
  import fed_pkg::*;
  logic clk = 0, rst = 1;
  always #3 clk = !clk;
  logic [3:0] module_id = 4'd5;
  mode_e mode = MODE_ZS;
  ch_rec_t rec [N_CH];
  logic [N_CH-1:0] rec_empty, rec_rd, byte_empty, byte_rd;
  logic [7:0] byte_data [N_CH];
  logic w_valid, w_first, w_ready = 1, sync_err;
  logic [15:0] w_data;
  logic [7:0] frag_paddr;
  fragment_assembler dut (.*);

  ch_rec_t rq [N_CH][$];
  byte unsigned bq [N_CH][$];
  task automatic refresh();
    for (int c = 0; c < N_CH; c++) begin
      rec_empty[c]  = (rq[c].size() == 0);
      rec[c]        = rec_empty[c] ? '0 : rq[c][0];
      byte_empty[c] = (bq[c].size() == 0);
      byte_data[c]  = byte_empty[c] ? 8'h00 : bq[c][0];
    end
  endtask
  always @(posedge clk) begin
    for (int c = 0; c < N_CH; c++) begin
      if (rec_rd[c]) void'(rq[c].pop_front());
      if (byte_rd[c]) void'(bq[c].pop_front());
    end
    #1 refresh();
  end

  int checks = 0, failures = 0, sync_pulses = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] got[$], expw[$];
  bit got_first[$], exp_first[$];
  always @(posedge clk) begin
    if (w_valid && w_ready) begin got.push_back(w_data); got_first.push_back(w_first); end
    if (sync_err) sync_pulses++;
    w_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic event_(int pa, int bad_ch);
    logic [15:0] body[$];
    bit mism_any = 0;
    for (int c = 0; c < N_CH; c++) begin
      ch_rec_t r;
      int nb;
      bit mm;
      nb = (c == 3) ? 0 : int'($urandom_range(0, 40));
      r = '{paddr0: 8'(pa), paddr1: 8'((c == bad_ch) ? pa + 1 : pa), apv_err0: 1'(c == 7),
            apv_err1: 0, ovf: 0, nbytes: 10'(nb)};
      mm = (c == bad_ch);
      mism_any |= mm;
      rq[c].push_back(r);
      body.push_back({4'(c), 8'h00, r.apv_err0, 1'b0, mm, 1'b0});
      body.push_back(16'(nb));
      for (int i = 0; i < nb; i += 2) begin
        byte unsigned b0, b1;
        b0 = 8'($urandom); b1 = 8'($urandom);
        bq[c].push_back(b0);
        if (i + 1 < nb) bq[c].push_back(b1); else b1 = 0;
        body.push_back({b0, b1});
      end
    end
    exp_first.push_back(1);
    for (int i = 0; i <= body.size(); i++) exp_first.push_back(0);
    expw.push_back(16'(body.size() + 1));
    expw.push_back({8'(pa), 4'd5, 1'b0, 1'b1, mism_any, 1'b0});
    foreach (body[i]) expw.push_back(body[i]);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    event_(17, -1);
    event_(18, 9);
    event_(19, -1);
    refresh();
    repeat (3000) @(posedge clk);
    check(got.size() == expw.size(), $sformatf("words %0d exp %0d", got.size(), expw.size()));
    foreach (expw[i]) if (i < got.size())
      check(got[i] == expw[i] && got_first[i] == exp_first[i],
            $sformatf("word %0d got %04x exp %04x", i, got[i], expw[i]));
    check(sync_pulses == 1, "one synchronisation error");
    check(rec_empty == '1 && byte_empty == '1, "all FIFOs drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
