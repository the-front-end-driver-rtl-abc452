// ttc_counters: bunch crossing and trigger numbering from the TTC signals,
// used to label each event for the central DAQ's synchronisation checks.
//
// The bunch crossing counter advances once per LHC clock (tick), is reset by
// the bunch counter reset (bc0) and wraps after 3564 crossings (one orbit).
// The event counter counts accepted Level-1 triggers and is cleared by the
// event counter reset (ecr); the first trigger after a reset is event 1.
// Triggers come from the TTC receiver or, for tests, from the P0 connector,
// as chosen by trig_sel. The labels and the test trigger input are the
// document's; counter widths (12 and 24 bits) and the reset conventions are
// this design's.
//
// Interface: inputs are sampled on tick. l1a pulses for one clock per
// accepted trigger with evt/l1a_bx holding its labels.
module ttc_counters
  import fed_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        ttc_l1a,
  input  logic        ttc_bc0,
  input  logic        ttc_ecr,
  input  logic        p0_trig,
  input  logic        trig_sel,     // 0: TTC, 1: P0 test trigger
  output logic [11:0] bx,
  output logic        l1a,
  output logic [23:0] evt,
  output logic [11:0] l1a_bx
);
  wire trig = trig_sel ? p0_trig : ttc_l1a;

  always_ff @(posedge clk) begin
    if (rst) begin
      bx <= '0; evt <= '0; l1a <= 1'b0; l1a_bx <= '0;
    end else begin
      l1a <= 1'b0;
      if (tick) begin
        if (ttc_bc0) bx <= '0;
        else if (bx == 12'(BX_PER_ORBIT-1)) bx <= '0;
        else bx <= bx + 1'b1;
        if (ttc_ecr) evt <= '0;
        else if (trig) begin
          evt <= evt + 1'b1;
          l1a <= 1'b1;
          l1a_bx <= bx;
        end
      end
    end
  end
endmodule
