// event_buffer_ctrl: the FED event buffer, a circular buffer of 64-bit words
// in the external QDR SRAM (2 MBytes: 2^18 words of 8 bytes), which absorbs
// fluctuations of the event data rate between the event builder and the DAQ
// link.
//
// Writes go to the SRAM write port at wr_ptr as long as the buffer is not
// full; when an event's last word is written its length is queued. The read
// side takes complete events only: it pops a length, reads that many words
// through the SRAM read port (RD_LAT clocks of latency) into a small output
// FIFO, marking the first and last word of the event. Reads are issued only
// while the output FIFO has room for every word still in flight, so no word
// is lost when the DAQ link stalls. Separate read and write ports match a
// QDR SRAM; the depth is the document's, the rest is this design's.
//
// occupancy counts the words held, for the back-pressure logic.
module event_buffer_ctrl
  import fed_pkg::*;
#(
  parameter int AW        = 18,   // 2^18 x 64 bit = 2 MBytes
  parameter int RD_LAT    = 2,
  parameter int LEN_DEPTH = 256,  // events that can wait in the buffer
  parameter int OUT_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst,
  // from the event builder
  input  logic          i_valid,
  input  logic [63:0]   i_data,
  input  logic          i_last,
  output logic          i_ready,
  // SRAM ports
  output logic          sram_we,
  output logic [AW-1:0] sram_waddr,
  output logic [63:0]   sram_wdata,
  output logic          sram_re,
  output logic [AW-1:0] sram_raddr,
  input  logic [63:0]   sram_rdata,
  // towards the DAQ link
  output logic          o_valid,
  output logic [63:0]   o_data,
  output logic          o_first,
  output logic          o_last,
  input  logic          o_ready,
  output logic [AW:0]   occupancy,
  output logic [$clog2(LEN_DEPTH):0] events_stored
);
  logic [AW-1:0] wp, rp;
  logic [23:0]   wlen, rleft;
  logic          rfirst;
  logic          len_empty, len_full;
  logic [23:0]   len_q;
  logic          buf_full;

  assign buf_full = (occupancy == (AW+1)'(2**AW));
  assign i_ready  = !buf_full && !len_full;

  wire wr_fire = i_valid && i_ready;
  assign sram_we    = wr_fire;
  assign sram_waddr = wp;
  assign sram_wdata = i_data;

  sync_fifo #(.WIDTH(24), .DEPTH(LEN_DEPTH)) u_len (
    .clk, .rst, .wr_en(wr_fire && i_last), .wr_data(wlen + 24'd1),
    .rd_en(rleft == '0 && !len_empty), .rd_data(len_q), .empty(len_empty),
    .full(len_full), .level(events_stored));

  // read pipeline: valid, first, last per stage
  logic [RD_LAT-1:0] pv, pf, pl;
  logic [$clog2(OUT_DEPTH):0] out_level;
  logic [$clog2(RD_LAT+1):0]  inflight;
  logic out_empty, out_full;

  always_comb begin
    inflight = '0;
    for (int i = 0; i < RD_LAT; i++) inflight = inflight + ($clog2(RD_LAT+1)+1)'(pv[i]);
  end

  assign sram_re    = (rleft != '0) &&
                      (32'(out_level) + 32'(inflight) < OUT_DEPTH - 1);
  assign sram_raddr = rp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; wlen <= '0; rleft <= '0; rfirst <= 1'b0;
      pv <= '0; pf <= '0; pl <= '0; occupancy <= '0;
    end else begin
      if (wr_fire) begin
        wp <= wp + 1'b1;
        wlen <= i_last ? '0 : wlen + 24'd1;
      end
      if (rleft == '0 && !len_empty) begin
        rleft <= len_q; rfirst <= 1'b1;
      end else if (sram_re) begin
        rp <= rp + 1'b1;
        rleft <= rleft - 24'd1;
        rfirst <= 1'b0;
      end
      pv <= {pv[RD_LAT-2:0], sram_re};
      pf <= {pf[RD_LAT-2:0], sram_re && rfirst};
      pl <= {pl[RD_LAT-2:0], sram_re && rleft == 24'd1};
      occupancy <= occupancy + (AW+1)'(wr_fire) - (AW+1)'(sram_re);
    end
  end

  logic [65:0] oq;
  sync_fifo #(.WIDTH(66), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .wr_en(pv[RD_LAT-1]), .wr_data({pf[RD_LAT-1], pl[RD_LAT-1], sram_rdata}),
    .rd_en(o_valid && o_ready), .rd_data(oq), .empty(out_empty), .full(out_full),
    .level(out_level));

  assign o_valid = !out_empty;
  assign o_first = oq[65];
  assign o_last  = oq[64];
  assign o_data  = oq[63:0];

  a_out_room: assert property (@(posedge clk) disable iff (rst) !(pv[RD_LAT-1] && out_full));
endmodule
