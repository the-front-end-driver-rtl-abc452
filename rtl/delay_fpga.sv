// delay_fpga: logic of one "Delay" FPGA of a front-end module, serving 4 ADC
// channels.
//
// It buffers the ADC data of its 4 channels (one register stage, on the 40 MHz
// sample strobe) on their way to the front-end FPGA, and holds the spy
// memories that keep a copy of the raw data of a selected number of events
// for readout over VME. The spy path delays the samples by SPY_PRE periods,
// so that when the front-end FPGA reports a frame (spy_trig, raised once the
// header has been seen) the capture still starts before the header: a
// segment begins with the sample that arrived SPY_PRE-1 periods before the
// one on the inputs when spy_trig is raised. Each
// captured event takes one segment of SPY_SEG samples per channel; arming
// with spy_nevents (1..SPY_EVENTS) captures that many following events.
// Buffering and spy memories are the document's; the segment scheme and the
// sizes are this design's, chosen to fit the block RAM of a small FPGA.
// The per-channel ADC clock skew of the real device is made with clock
// managers and is not part of this logic.
//
// Interface: adc/dout one 10-bit sample per channel per tick. spy_arm pulses
// with spy_nevents. spy_rd_ch/spy_rd_addr give spy_rd_data one clock later.
module delay_fpga
  import fed_pkg::*;
#(
  parameter int SPY_EVENTS = 2,
  parameter int SPY_SEG    = 512,
  parameter int SPY_PRE    = 32,
  localparam int AW = $clog2(SPY_EVENTS * SPY_SEG)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [ADC_W-1:0] adc  [4],
  output logic [ADC_W-1:0] dout [4],
  input  logic             spy_arm,
  input  logic [$clog2(SPY_EVENTS):0] spy_nevents,
  input  logic             spy_trig,
  output logic             spy_busy,
  output logic [$clog2(SPY_EVENTS):0] spy_count,
  input  logic [1:0]       spy_rd_ch,
  input  logic [AW-1:0]    spy_rd_addr,
  output logic [ADC_W-1:0] spy_rd_data
);
  localparam int SW = $clog2(SPY_SEG);
  localparam int EW = $clog2(SPY_EVENTS) + 1;

  logic [ADC_W-1:0] pre [4][SPY_PRE];
  logic [ADC_W-1:0] spy [4][SPY_EVENTS * SPY_SEG];
  logic [EW-1:0] remaining;
  logic          capturing;
  logic [SW-1:0] widx;
  logic [AW-1:0] wbase;

  // data buffering and spy pre-trigger delay line
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 4; c++) begin
        dout[c] <= '0;
        for (int i = 0; i < SPY_PRE; i++) pre[c][i] <= '0;
      end
    end else if (tick) begin
      for (int c = 0; c < 4; c++) begin
        dout[c] <= adc[c];
        pre[c][0] <= adc[c];
        for (int i = 1; i < SPY_PRE; i++) pre[c][i] <= pre[c][i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tick && capturing)
      for (int c = 0; c < 4; c++) spy[c][wbase + AW'(widx)] <= pre[c][SPY_PRE-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0; capturing <= 1'b0; widx <= '0; wbase <= '0; spy_count <= '0;
    end else if (spy_arm) begin
      remaining <= (spy_nevents > EW'(SPY_EVENTS)) ? EW'(SPY_EVENTS) : spy_nevents;
      capturing <= 1'b0; widx <= '0; wbase <= '0; spy_count <= '0;
    end else begin
      if (spy_trig && !capturing && remaining != '0) begin
        capturing <= 1'b1;
        widx <= '0;
      end else if (tick && capturing) begin
        widx <= widx + 1'b1;
        if (widx == SW'(SPY_SEG-1)) begin
          capturing <= 1'b0;
          remaining <= remaining - 1'b1;
          spy_count <= spy_count + 1'b1;
          wbase <= wbase + AW'(SPY_SEG);
        end
      end
    end
  end

  assign spy_busy = capturing || (remaining != '0);

  always_ff @(posedge clk) spy_rd_data <= spy[spy_rd_ch][spy_rd_addr];
endmodule
