// sync_fifo: single-clock first-in first-out buffer, used for the on-chip
// buffers of the front-end and back-end logic (channel FIFOs, link receive
// FIFOs, trigger and length queues).
//
// Storage is a memory array (block RAM on the FPGA) with a read-ahead output:
// rd_data always shows the oldest word while empty is low, and rd_en pops it.
// wr_en while full and rd_en while empty are ignored (and flagged by the
// assertions). level counts the words held. Both sides act on the same edge.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  wire do_rd = rd_en && !empty;

  wire do_wr = wr_en && (!full || rd_en);


  assign empty   = (level == '0);
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
