// slink64_tx: sender side of the S-LINK64 interface to the DAQ Front-end
// Readout Link mezzanine card.
//
// Each event word is written with uwen_n low on the 64-bit ud bus. The first
// (header) and last (trailer) words of an event are marked as control words
// with uctrl_n low, data words in between have uctrl_n high. When the link
// raises its full flag (lff_n low, sampled one clock earlier) no further word
// is written until it clears. The outputs are registered. The S-LINK64
// protocol is named by the document; the signal set used here is the
// interface's usual one and the one-clock reaction to lff_n is this design's.
//
// Interface: event words on i_valid/i_data/i_first/i_last/i_ready.
// events_sent and words_sent count the traffic for monitoring.
module slink64_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic        i_valid,
  input  logic [63:0] i_data,
  input  logic        i_first,
  input  logic        i_last,
  output logic        i_ready,
  output logic [63:0] ud,
  output logic        uwen_n,
  output logic        uctrl_n,
  input  logic        lff_n,
  output logic [31:0] events_sent,
  output logic [31:0] words_sent,
  output logic        stalled
);
  logic lff_q;

  assign i_ready = lff_q;
  assign stalled = i_valid && !lff_q;
  wire fire = i_valid && i_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      lff_q <= 1'b0; ud <= '0; uwen_n <= 1'b1; uctrl_n <= 1'b1;
      events_sent <= '0; words_sent <= '0;
    end else begin
      lff_q  <= lff_n;
      uwen_n <= !fire;
      if (fire) begin
        ud      <= i_data;
        uctrl_n <= !(i_first || i_last);
        words_sent <= words_sent + 1'b1;
        if (i_last) events_sent <= events_sent + 1'b1;
      end else uctrl_n <= 1'b1;
    end
  end
endmodule
