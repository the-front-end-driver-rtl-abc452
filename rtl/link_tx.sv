// link_tx: front-end end of the point-to-point link that carries a module's
// fragments to the back-end FPGA, 4 bits wide at 160 MHz.
//
// Between fragments the lines carry LINK_IDLE (0). A fragment starts with the
// nibble LINK_SOF, followed by its 16-bit words sent as four nibbles, most
// significant first. The transmitter takes the word count from word 0 (the
// fragment length L) and returns to idle after L more words, so no extra
// control line is needed. The 4-bit width and 160 MHz rate are the document's
// (its double data rate I/O is modelled as one nibble per 160 MHz clock);
// the framing is this design's choice.
//
// Interface: w_valid/w_ready with w_first on word 0. Each word is copied into
// a shift register; the next one is taken while the last nibble of the
// previous word goes out, so the link carries one word per 4 clocks without
// gaps. The source must offer the next word by then; if it does not, underrun
// is set (sticky) because the receiver counts nibbles without a valid line.
module link_tx
  import fed_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        w_valid,
  input  logic        w_first,
  input  logic [15:0] w_data,
  output logic        w_ready,
  output logic [LINK_W-1:0] link_d,
  output logic        busy,
  output logic        underrun
);
  typedef enum logic [1:0] {IDLE, SOF, WORD} st_e;
  st_e st;
  logic [1:0]  nib;
  logic [15:0] sh;
  logic [15:0] remaining;

  // a new word is taken at the start of a fragment and while the last
  // nibble of the previous word goes out
  always_comb begin
    w_ready = 1'b0;
    if (st == IDLE) w_ready = w_valid && w_first;
    else if (st == WORD && nib == 2'd3 && remaining != 16'd0) w_ready = 1'b1;
  end

  assign link_d = (st == SOF) ? LINK_SOF : (st == WORD) ? sh[15:12] : LINK_IDLE;
  assign busy   = (st != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; nib <= '0; sh <= '0; remaining <= '0; underrun <= 1'b0;
    end else begin
      case (st)
        IDLE: if (w_valid && w_first) begin
          st <= SOF; sh <= w_data; remaining <= w_data;
        end
        SOF: begin st <= WORD; nib <= '0; end
        WORD: begin
          nib <= nib + 1'b1;
          sh  <= {sh[11:0], 4'h0};
          if (nib == 2'd3) begin
            if (remaining == 16'd0) st <= IDLE;
            else begin
              remaining <= remaining - 16'd1;
              sh <= w_data;
              if (!w_valid) underrun <= 1'b1;
            end
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_no_underrun: assert property (@(posedge clk) disable iff (rst)
    (st == WORD && nib == 2'd3 && remaining != 16'd0) |-> w_valid);
endmodule
