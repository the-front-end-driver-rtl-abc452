// tb_cm_median: the common mode unit against a counting reference (the k-th smallest of a set is the value with fewer than k values below it and at least k at or below it). Random
// sets of 128 signed values (wide spread, narrow spread with many equal
// values, all equal, extremes) are loaded; the result must be the 64th
// smallest value, with done high in the (VAL_W+1)-th cycle after the start cycle.
module tb_cm_median;
  import fed_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  always #3 clk = !clk;
  val_t vals [N_STRIPS];
  val_t median;
  cm_median dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int q[$];
      automatic int lat;
      for (int i = 0; i < N_STRIPS; i++) begin
        int x;
        case (t % 5)
          0: x = int'($urandom_range(0, 4095)) - 2048;
          1: x = int'($urandom_range(0, 6)) - 3;
          2: x = 17;
          3: x = (i % 2) ? 2047 : -2048;
          default: x = int'($urandom_range(0, 300)) - 40;
        endcase
        vals[i] = val_t'(x);
        q.push_back(x);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(int'(median) == tb_apv_pkg::kth(q, 64), $sformatf("set %0d median %0d", t, median));
      check(lat == VAL_W + 1, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
