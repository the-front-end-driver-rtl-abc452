// link_rx: back-end end of the 4-bit front-end link.
//
// Waits for the LINK_SOF nibble, assembles the following nibbles into 16-bit
// words (most significant first) and writes them, word 0 (the length L)
// included, into a receive FIFO. After L more words it returns to waiting.
// The FIFO holds fragments until the event builder takes them; it must hold a
// whole fragment because modules are read one after the other. A word that
// finds the FIFO full is lost and ovf is set (sticky until reset).
//
// Interface: link_d one nibble per clock; FIFO read side rd_en/rd_data/empty
// (read-ahead); level for occupancy monitoring.
module link_rx
  import fed_pkg::*;
#(
  parameter int DEPTH = 4096     // words; a raw-mode fragment has 3097
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [LINK_W-1:0] link_d,
  input  logic              rd_en,
  output logic [15:0]       rd_data,
  output logic              empty,
  output logic [$clog2(DEPTH):0] level,
  output logic              ovf
);
  typedef enum logic [1:0] {IDLE, LEN, BODY} st_e;
  st_e st;
  logic [1:0]  nib;
  logic [11:0] sh;
  logic [15:0] remaining;
  logic        wr;
  logic [15:0] wd;
  logic        full;

  wire [15:0] word = {sh, link_d};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; nib <= '0; sh <= '0; remaining <= '0; wr <= 1'b0; wd <= '0; ovf <= 1'b0;
    end else begin
      wr <= 1'b0;
      if (wr && full) ovf <= 1'b1;
      case (st)
        IDLE: if (link_d == LINK_SOF) begin st <= LEN; nib <= '0; end
        LEN, BODY: begin
          nib <= nib + 1'b1;
          sh  <= {sh[7:0], link_d};
          if (nib == 2'd3) begin
            wr <= 1'b1;
            wd <= word;
            if (st == LEN) begin
              remaining <= word;
              st <= (word == 16'd0) ? IDLE : BODY;
            end else if (remaining == 16'd1) st <= IDLE;
            else remaining <= remaining - 16'd1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .wr_en(wr && !full), .wr_data(wd), .rd_en, .rd_data, .empty, .full, .level);
endmodule
