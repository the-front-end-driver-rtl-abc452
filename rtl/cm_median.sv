// cm_median: common mode offset of one APV25, the median of its 128 strips.
//
// The median is found by a binary search over the value range instead of by
// sorting. Values are offset by 2^(VAL_W-1) to make them unsigned. Starting
// from the most significant bit, each step counts in parallel how many of the
// N values lie at or below the candidate r | (2^b - 1); if at least K do, bit
// b of the result is 0, otherwise it is 1. After VAL_W steps the result is the
// K-th smallest value (K = N/2, the lower median). The document specifies the
// median; the search method is this design's choice.
//
// Interface: start is a one-clock request; vals must stay stable until done
// pulses, in the (VAL_W+1)-th cycle after the start cycle, with median valid
// from then on.
module cm_median
  import fed_pkg::*;
#(
  parameter int N = N_STRIPS,
  parameter int K = N_STRIPS / 2
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  val_t vals [N],
  output logic busy,
  output logic done,
  output val_t median
);
  localparam int CW = $clog2(N + 1);
  logic [VAL_W-1:0] r;
  logic [$clog2(VAL_W)-1:0] b;
  logic [VAL_W-1:0] cand;
  logic [CW-1:0] cnt;
  logic [VAL_W-1:0] r_next;

  always_comb begin
    cand = r | ((VAL_W'(1) << b) - VAL_W'(1));
    cnt = '0;
    for (int i = 0; i < N; i++)
      cnt = cnt + CW'(({~vals[i][VAL_W-1], vals[i][VAL_W-2:0]}) <= cand);
    r_next = (cnt < CW'(K)) ? (r | (VAL_W'(1) << b)) : r;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; r <= '0; b <= '0; median <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; r <= '0; b <= ($clog2(VAL_W))'(VAL_W-1);
      end else if (busy) begin
        r <= r_next;
        if (b == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          median <= {~r_next[VAL_W-1], r_next[VAL_W-2:0]};
        end else b <= b - 1'b1;
      end
    end
  end
endmodule
