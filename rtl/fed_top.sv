// fed_top: digital logic of the Front-End Driver (FED) card of the CMS
// silicon strip tracker readout.
//
// The card receives 96 fibres, each carrying the multiplexed analogue frames of
// a pair of APV25 chips (2 x 128 strips) for every Level-1 trigger, digitised
// by 10-bit ADCs at the LHC clock. Eight fe_module blocks (12 fibres each)
// find the frames, subtract pedestals and common mode, keep only strips in
// clusters and send one fragment per event over a 4-bit link. The back-end
// logic (link_rx, ttc_counters, event_builder, event_buffer_ctrl,
// slink64_tx, tcs_feedback) builds a FED event per trigger labelled with event
// number and bunch crossing, buffers it in the external QDR SRAM and sends it
// on S-LINK64 to the DAQ, while telling the Trigger Control System when its
// buffers fill up or synchronisation is lost. vme_slave gives the crate
// computer access to all settings.
//
// Clock: one 160 MHz clock; tick marks every fourth clock, the 40 MHz LHC
// clock phase on which ADC samples and TTC signals are taken (it is brought
// out so that the sources can align to it). Analogue parts, ADCs, the TTC
// receiver, SRAM, DAQ mezzanine and configuration devices are outside: their
// signals are ports.
//
// Configuration word address [23:20]: 0..7 front-end module (see fe_module),
// 15 all modules (write only), 8 back-end registers:
//   0 FED id, 1 warn level, 2 busy level (event buffer words),
//   3 control {irq_en [1], trigger from P0 [0]}, 4 write: clear errors,
//   5 status {irq_n, link overflow mask [11:4], TTS state [3:0]},
//   6 events built, 7 events sent, 8 event buffer occupancy.
// The TTS state is BUSY when the event buffer passes its busy level, a
// module is full, the trigger queue is almost full, or a link receive FIFO
// could not hold one more raw-mode fragment. The trigger source must stop
// on BUSY; links have no back-pressure, so data arriving at a full link FIFO
// is lost and reported as ERROR. The blocks and their order follow the
// document; the clocking, the address map and the busy rules are this
// design's.
module fed_top
  import fed_pkg::*;
#(
  parameter int SRAM_AW    = 18,
  parameter int FIFO_DEPTH = 1024,
  parameter int LINK_DEPTH = 4096
) (
  input  logic             clk,
  input  logic             rst,
  output logic             tick,
  input  logic [ADC_W-1:0] adc [N_MODULES][N_CH],
  // TTC receiver and test trigger
  input  logic             ttc_l1a,
  input  logic             ttc_bc0,
  input  logic             ttc_ecr,
  input  logic             p0_trig,
  // VME64x
  input  logic [4:0]       vme_ga_n,
  input  logic             vme_gap_n,
  input  logic             vme_as_n,
  input  logic [1:0]       vme_ds_n,
  input  logic             vme_write_n,
  input  logic             vme_lword_n,
  input  logic [5:0]       vme_am,
  input  logic [31:1]      vme_addr,
  input  logic [31:0]      vme_data_in,
  output logic [31:0]      vme_data_out,
  output logic             vme_data_oe,
  output logic             vme_dtack_n,
  output logic             vme_irq_n,
  // event buffer SRAM
  output logic             sram_we,
  output logic [SRAM_AW-1:0] sram_waddr,
  output logic [63:0]      sram_wdata,
  output logic             sram_re,
  output logic [SRAM_AW-1:0] sram_raddr,
  input  logic [63:0]      sram_rdata,
  // S-LINK64
  output logic [63:0]      slink_ud,
  output logic             slink_uwen_n,
  output logic             slink_uctrl_n,
  input  logic             slink_lff_n,
  // Trigger Control System
  output tts_e             tts
);
  // ---------------- 40 MHz phase
  logic [1:0] ph;
  always_ff @(posedge clk) begin
    if (rst) ph <= '0;
    else ph <= ph + 1'b1;
  end
  assign tick = (ph == 2'd3);

  // ---------------- VME and configuration bus
  logic        cfg_we, cfg_re;
  logic [23:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;

  vme_slave #(.CFG_RD_LAT(3)) u_vme (
    .clk, .rst, .ga_n(vme_ga_n), .gap_n(vme_gap_n), .as_n(vme_as_n), .ds_n(vme_ds_n),
    .write_n(vme_write_n), .lword_n(vme_lword_n), .am(vme_am), .addr(vme_addr),
    .data_in(vme_data_in), .data_out(vme_data_out), .data_oe(vme_data_oe),
    .dtack_n(vme_dtack_n), .cfg_we, .cfg_re, .cfg_addr, .cfg_wdata, .cfg_rdata);

  wire [3:0] tgt = cfg_addr[23:20];

  // ---------------- front-end modules
  logic [LINK_W-1:0]    link_d [N_MODULES];
  logic [N_MODULES-1:0] fe_full, fe_pfull, fe_sync;
  logic [31:0]          fe_rdata [N_MODULES];

  for (genvar m = 0; m < N_MODULES; m++) begin : g_fe
    fe_module #(.FIFO_DEPTH(FIFO_DEPTH)) u_fe (
      .clk, .rst, .tick, .module_id(4'(m)), .adc(adc[m]),
      .cfg_we(cfg_we && (tgt == 4'(m) || tgt == 4'd15)),
      .cfg_re(cfg_re && tgt == 4'(m)),
      .cfg_addr(cfg_addr[19:0]), .cfg_wdata, .cfg_rdata(fe_rdata[m]),
      .link_d(link_d[m]), .full(fe_full[m]), .pfull(fe_pfull[m]), .sync_err(fe_sync[m]));
  end

  // ---------------- back-end registers
  logic [11:0] fed_id;
  logic [SRAM_AW:0] warn_level, busy_level, occupancy;
  logic        irq_en, trig_sel, clear_err;

  always_ff @(posedge clk) begin
    if (rst) begin
      fed_id <= '0; irq_en <= 1'b0; trig_sel <= 1'b0; clear_err <= 1'b0;
      warn_level <= (SRAM_AW+1)'(2**SRAM_AW / 2);
      busy_level <= (SRAM_AW+1)'(2**SRAM_AW - 2**SRAM_AW / 8);
    end else begin
      clear_err <= 1'b0;
      if (cfg_we && tgt == 4'd8)
        case (cfg_addr[3:0])
          4'd0: fed_id <= cfg_wdata[11:0];
          4'd1: warn_level <= cfg_wdata[SRAM_AW:0];
          4'd2: busy_level <= cfg_wdata[SRAM_AW:0];
          4'd3: {irq_en, trig_sel} <= cfg_wdata[1:0];
          4'd4: clear_err <= 1'b1;
          default: ;
        endcase
    end
  end

  // ---------------- link receivers
  logic [15:0]          lk_data [N_MODULES];
  logic [N_MODULES-1:0] lk_empty, lk_rd, lk_ovf, lk_busy;
  // a link FIFO is busy when it could not take one more raw-mode fragment
  localparam int MAX_FRAG = 2 + N_CH * (2 + FRAME_STRIPS);
  for (genvar m = 0; m < N_MODULES; m++) begin : g_rx
    logic [$clog2(LINK_DEPTH):0] lvl;
    assign lk_busy[m] = (int'(lvl) > LINK_DEPTH - MAX_FRAG);
    link_rx #(.DEPTH(LINK_DEPTH)) u_rx (
      .clk, .rst, .link_d(link_d[m]), .rd_en(lk_rd[m]), .rd_data(lk_data[m]),
      .empty(lk_empty[m]), .level(lvl), .ovf(lk_ovf[m]));
  end

  // ---------------- TTC labels and event building
  logic [11:0] bx, l1a_bx;
  logic [23:0] evt, events_built;
  logic        l1a, trig_afull, eb_sync;
  logic [4:0]  trig_level;

  ttc_counters u_ttc (
    .clk, .rst, .tick, .ttc_l1a, .ttc_bc0, .ttc_ecr, .p0_trig, .trig_sel,
    .bx, .l1a, .evt, .l1a_bx);

  logic        eb_valid, eb_last, eb_ready;
  logic [63:0] eb_data;

  event_builder #(.TRIG_DEPTH(16)) u_eb (
    .clk, .rst, .fed_id, .l1a, .evt, .l1a_bx, .trig_afull, .trig_level,
    .lk_data, .lk_empty, .lk_rd,
    .o_valid(eb_valid), .o_data(eb_data), .o_last(eb_last), .o_ready(eb_ready),
    .sync_err(eb_sync), .events_built);

  // ---------------- event buffer and DAQ link
  logic        ob_valid, ob_first, ob_last, ob_ready;
  logic [63:0] ob_data;
  logic [8:0]  events_stored;

  event_buffer_ctrl #(.AW(SRAM_AW)) u_buf (
    .clk, .rst, .i_valid(eb_valid), .i_data(eb_data), .i_last(eb_last), .i_ready(eb_ready),
    .sram_we, .sram_waddr, .sram_wdata, .sram_re, .sram_raddr, .sram_rdata,
    .o_valid(ob_valid), .o_data(ob_data), .o_first(ob_first), .o_last(ob_last),
    .o_ready(ob_ready), .occupancy, .events_stored);

  logic [31:0] events_sent, words_sent;
  logic        slink_stalled;
  slink64_tx u_slink (
    .clk, .rst, .i_valid(ob_valid), .i_data(ob_data), .i_first(ob_first), .i_last(ob_last),
    .i_ready(ob_ready), .ud(slink_ud), .uwen_n(slink_uwen_n), .uctrl_n(slink_uctrl_n),
    .lff_n(slink_lff_n), .events_sent, .words_sent, .stalled(slink_stalled));

  tcs_feedback #(.OCC_W(SRAM_AW+1)) u_tcs (
    .clk, .rst, .occupancy, .warn_level, .busy_level, .fe_full(fe_full | lk_busy), .fe_pfull, .trig_afull,
    .sync_err(eb_sync || |fe_sync), .data_lost(|lk_ovf), .clear_err, .irq_en,
    .tts, .irq_n(vme_irq_n));

  // ---------------- configuration read-back: module data arrive two clocks
  // after cfg_re, back-end registers are delayed to match, one more register
  logic [1:0]  re_d;
  logic [3:0]  tgt_d [2];
  logic [3:0]  reg_d [2];
  logic [31:0] be_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      re_d <= '0; tgt_d <= '{default: '0}; reg_d <= '{default: '0}; be_q <= '0; cfg_rdata <= '0;
    end else begin
      re_d <= {re_d[0], cfg_re};
      tgt_d[0] <= tgt; tgt_d[1] <= tgt_d[0];
      reg_d[0] <= cfg_addr[3:0]; reg_d[1] <= reg_d[0];
      case (reg_d[0])
        4'd0: be_q <= 32'(fed_id);
        4'd1: be_q <= 32'(warn_level);
        4'd2: be_q <= 32'(busy_level);
        4'd3: be_q <= {30'd0, irq_en, trig_sel};
        4'd5: be_q <= {19'd0, vme_irq_n, lk_ovf, tts};
        4'd6: be_q <= 32'(events_built);
        4'd7: be_q <= events_sent;
        4'd8: be_q <= 32'(occupancy);
        default: be_q <= '0;
      endcase
      if (re_d[1])
        cfg_rdata <= (tgt_d[1] < 4'(N_MODULES)) ? fe_rdata[tgt_d[1][2:0]] :
                     (tgt_d[1] == 4'd8) ? be_q : 32'd0;
    end
  end
endmodule
