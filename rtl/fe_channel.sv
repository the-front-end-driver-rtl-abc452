// fe_channel: processing chain of one fibre (one APV25 pair) in the
// front-end FPGA.
//
// apv_frame_finder -> channel_buffer (pedestals, physical order, two banks)
// -> cluster_finder with cm_median -> channel FIFO of bytes plus a record FIFO
// with one ch_rec_t per frame. The fragment assembler reads both FIFOs. Only
// data of strips in clusters reach the FIFO in zero-suppressed mode.
//
// Timing: a frame is ready for cluster finding one clock after its last
// sample; at the 160 MHz clock processing a frame takes well under the 280
// sample periods (1120 clocks) of the next frame, so the two banks absorb
// back-to-back frames. A frame that finds both banks busy is dropped and the
// ovf flag of the next record is set.
module fe_channel
  import fed_pkg::*;
#(
  parameter int FIFO_DEPTH = 1024,   // channel FIFO, bytes
  parameter int REC_DEPTH  = 8       // frames whose records can wait
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [ADC_W-1:0] sample,
  input  mode_e            mode,
  input  ch_cfg_t          cfg,
  input  logic             ped_we,
  input  logic [7:0]       ped_addr,
  input  logic [ADC_W-1:0] ped_wdata,
  output logic             frame_start,
  // channel FIFO read side
  input  logic             byte_rd,
  output logic [7:0]       byte_data,
  output logic             byte_empty,
  output logic [$clog2(FIFO_DEPTH):0] byte_level,
  // record FIFO read side
  input  logic             rec_rd,
  output ch_rec_t          rec,
  output logic             rec_empty
);
  logic hdr_valid, err0, err1, s_valid, s_apv, s_last;
  logic [HDR_ADDR-1:0] paddr0, paddr1;
  logic [6:0] s_idx;
  logic [ADC_W-1:0] s_raw;
  logic in_frame;

  apv_frame_finder u_ff (
    .clk, .rst, .tick, .sample, .hdr_thr(cfg.hdr_thr), .in_frame,
    .hdr_valid, .paddr0, .paddr1, .err0, .err1,
    .s_valid, .s_apv, .s_idx, .s_raw, .s_last);

  assign frame_start = hdr_valid;

  logic rdy, b_err0, b_err1, release_bank, ovf;
  logic [HDR_ADDR-1:0] b_paddr0, b_paddr1;
  val_t vals [FRAME_STRIPS];

  channel_buffer u_buf (
    .clk, .rst, .mode, .ped_we, .ped_addr, .ped_wdata,
    .hdr_valid, .hdr_paddr0(paddr0), .hdr_paddr1(paddr1), .hdr_err0(err0), .hdr_err1(err1),
    .s_valid, .s_apv, .s_idx, .s_raw, .s_last,
    .rdy, .vals, .paddr0(b_paddr0), .paddr1(b_paddr1), .err0(b_err0), .err1(b_err1),
    .release_bank, .ovf);

  logic cm_start, cm_sel, cm_done, cm_busy;
  val_t cm_val, cm_vals [N_STRIPS];
  always_comb
    for (int i = 0; i < N_STRIPS; i++) cm_vals[i] = vals[{cm_sel, 7'(i)}];

  cm_median u_cm (.clk, .rst, .start(cm_start), .vals(cm_vals), .busy(cm_busy),
                  .done(cm_done), .median(cm_val));

  logic ovf_seen;
  logic b_valid, b_ready, rec_valid, rec_full, byte_full;
  logic [7:0] b_data;
  ch_rec_t rec_in;

  always_ff @(posedge clk) begin
    if (rst) ovf_seen <= 1'b0;
    else if (ovf) ovf_seen <= 1'b1;
    else if (rec_valid) ovf_seen <= 1'b0;
  end

  cluster_finder u_cf (
    .clk, .rst, .mode, .low_thr(cfg.low_thr), .high_thr(cfg.high_thr),
    .rdy, .vals, .paddr0(b_paddr0), .paddr1(b_paddr1), .err0(b_err0), .err1(b_err1),
    .ovf_seen, .bank_release(release_bank),
    .cm_start, .cm_sel, .cm_done, .cm_median(cm_val),
    .b_valid, .b_data, .b_ready, .rec_valid, .rec(rec_in), .rec_ready(!rec_full));

  assign b_ready = !byte_full;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_bytes (
    .clk, .rst, .wr_en(b_valid && b_ready), .wr_data(b_data), .rd_en(byte_rd),
    .rd_data(byte_data), .empty(byte_empty), .full(byte_full), .level(byte_level));

  logic [$clog2(REC_DEPTH):0] rec_level;
  sync_fifo #(.WIDTH($bits(ch_rec_t)), .DEPTH(REC_DEPTH)) u_recs (
    .clk, .rst, .wr_en(rec_valid), .wr_data(rec_in), .rd_en(rec_rd),
    .rd_data(rec), .empty(rec_empty), .full(rec_full), .level(rec_level));
endmodule
