// qdr_sram_model: behavioural model of the event buffer SRAM (a pair of QDR
// SRAMs seen as one 64-bit wide memory with separate read and write ports).
// A write is done on the clock edge at which we is high; read data appear
// RD_LAT clocks after the edge at which re is high. Not synthesizable logic
// of the card: the real part is an external memory chip.
module qdr_sram_model #(
  parameter int AW = 18,
  parameter int RD_LAT = 2
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata
);
  logic [63:0] mem [2**AW];
  logic [63:0] pipe [RD_LAT];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    pipe[0] <= re ? mem[raddr] : 64'hDEAD_BEEF_DEAD_BEEF;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = pipe[RD_LAT-1];
endmodule
