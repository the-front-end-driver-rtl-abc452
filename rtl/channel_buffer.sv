// channel_buffer: pedestal subtraction and re-ordering of one fibre's frame
// into physical strip order, in two frame banks used alternately.
//
// Each analogue sample from the frame finder is written straight to its
// physical position, bank[apv*128 + strip(n)], where strip(n) is the APV25
// output-order permutation of fed_pkg::apv_phys. In zero-suppressed mode the
// pedestal of that strip (a 256-entry table loaded through ped_we) is
// subtracted on the way in; in raw mode the ADC value is stored unchanged.
// Re-ordering on write means a frame is complete, in physical order, as soon
// as its last sample arrives. The described function is pedestal subtraction
// and re-ordering; writing into two alternating banks is this design's choice,
// so that one frame can be processed while the next arrives.
//
// Interface: a bank holding a complete frame is offered with rdy, its 256
// values on vals and its header on paddr0/1, err0/1. The consumer frees it
// with release. A frame that finds no free bank is discarded and ovf pulses.
module channel_buffer
  import fed_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  mode_e            mode,
  // pedestal table
  input  logic             ped_we,
  input  logic [7:0]       ped_addr,
  input  logic [ADC_W-1:0] ped_wdata,
  // from the frame finder
  input  logic             hdr_valid,
  input  logic [HDR_ADDR-1:0] hdr_paddr0,
  input  logic [HDR_ADDR-1:0] hdr_paddr1,
  input  logic             hdr_err0,
  input  logic             hdr_err1,
  input  logic             s_valid,
  input  logic             s_apv,
  input  logic [6:0]       s_idx,
  input  logic [ADC_W-1:0] s_raw,
  input  logic             s_last,
  // to the common mode and cluster finding stages
  output logic             rdy,
  output val_t             vals [FRAME_STRIPS],
  output logic [HDR_ADDR-1:0] paddr0,
  output logic [HDR_ADDR-1:0] paddr1,
  output logic             err0,
  output logic             err1,
  input  logic             release_bank,
  output logic             ovf
);
  logic [ADC_W-1:0] ped [FRAME_STRIPS];
  val_t bank [2][FRAME_STRIPS];
  logic [1:0] bfull;
  logic wb, rb, writing;
  logic [HDR_ADDR-1:0] pa0 [2], pa1 [2];
  logic [1:0] e0, e1;

  wire [7:0] waddr = {s_apv, apv_phys(s_idx)};

  always_ff @(posedge clk) begin
    if (ped_we) ped[ped_addr] <= ped_wdata;
  end

  always_ff @(posedge clk) begin
    if (s_valid && writing)
      bank[wb][waddr] <= (mode == MODE_RAW) ? val_t'({2'b00, s_raw})
                                            : val_t'({2'b00, s_raw}) - val_t'({2'b00, ped[waddr]});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bfull <= '0; wb <= 1'b0; rb <= 1'b0; writing <= 1'b0; ovf <= 1'b0;
      pa0 <= '{default: '0}; pa1 <= '{default: '0}; e0 <= '0; e1 <= '0;
    end else begin
      ovf <= 1'b0;
      if (hdr_valid) begin
        if (!bfull[wb]) begin
          writing <= 1'b1;
          pa0[wb] <= hdr_paddr0; pa1[wb] <= hdr_paddr1;
          e0[wb]  <= hdr_err0;   e1[wb]  <= hdr_err1;
        end else begin
          writing <= 1'b0;
          ovf <= 1'b1;
        end
      end
      if (s_valid && s_last && writing) begin
        writing <= 1'b0;
        wb <= !wb;
      end
      // bank state: set on frame end, cleared on release (different banks)
      for (int b = 0; b < 2; b++) begin
        if (s_valid && s_last && writing && wb == 1'(b)) bfull[b] <= 1'b1;
        else if (release_bank && bfull[rb] && rb == 1'(b)) bfull[b] <= 1'b0;
      end
      if (release_bank && bfull[rb]) rb <= !rb;
    end
  end

  assign rdy    = bfull[rb];
  assign vals   = bank[rb];
  assign paddr0 = pa0[rb];
  assign paddr1 = pa1[rb];
  assign err0   = e0[rb];
  assign err1   = e1[rb];
endmodule
