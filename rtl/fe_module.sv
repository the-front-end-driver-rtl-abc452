// fe_module: one front-end module of the FED, processing one 12-fibre ribbon.
//
// The digitised samples of the 12 channels pass through 3 delay_fpga blocks
// (4 channels each, with spy memories) into the front-end FPGA logic: 12
// fe_channel chains (frame finding, pedestals, re-ordering, common mode,
// cluster finding, channel FIFOs), one fragment_assembler and one link_tx
// that sends the module's fragment of each event to the back-end on 4 lines.
// The module raises pfull ("partially full") when any channel FIFO holds more
// than a quarter of its size, and full when it could no longer take a
// complete raw frame (512 bytes); the thresholds are this design's.
//
// Configuration (cfg_*) is a simple register bus, read data valid two clocks
// after cfg_re. Word addresses within the module, this design's own map:
//   [19:16]=ch (0..11; 14 = all channels, write only)
//     [15:12]=0  pedestal of physical strip [7:0] (write only)
//     [15:12]=1  [1:0]: 0 header threshold, 1 low threshold, 2 high threshold
//     [15:12]=2  spy memory of this channel, sample [SPY address bits] (read)
//   [19:16]=15 module registers: 0 mode (0 zero suppressed, 1 raw),
//                                1 spy arm (write: number of events),
//                                2 status (read)
// Timing: samples on tick (40 MHz strobe of the 160 MHz clock).
module fe_module
  import fed_pkg::*;
#(
  parameter int FIFO_DEPTH = 1024,
  parameter int SPY_EVENTS = 2,
  parameter int SPY_SEG    = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [3:0]       module_id,
  input  logic [ADC_W-1:0] adc [N_CH],
  // configuration bus
  input  logic             cfg_we,
  input  logic             cfg_re,
  input  logic [19:0]      cfg_addr,
  input  logic [31:0]      cfg_wdata,
  output logic [31:0]      cfg_rdata,
  // link to the back-end and status
  output logic [LINK_W-1:0] link_d,
  output logic             full,
  output logic             pfull,
  output logic             sync_err
);
  localparam int SPY_AW = $clog2(SPY_EVENTS * SPY_SEG);
  localparam int LW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- configuration registers
  mode_e   mode;
  ch_cfg_t ccfg [N_CH];
  logic [$clog2(SPY_EVENTS):0] spy_nev;
  logic    spy_arm;
  logic    sync_sticky, underrun;
  wire [3:0] a_ch = cfg_addr[19:16];
  wire [3:0] a_pg = cfg_addr[15:12];
  logic [N_CH-1:0] ch_hit;
  always_comb
    for (int i = 0; i < N_CH; i++) ch_hit[i] = (a_ch == 4'(i)) || (a_ch == 4'd14);

  logic [N_CH-1:0] ped_we;
  always_comb
    for (int i = 0; i < N_CH; i++) ped_we[i] = cfg_we && ch_hit[i] && a_pg == 4'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode <= MODE_ZS;
      spy_arm <= 1'b0;
      spy_nev <= '0;
      for (int i = 0; i < N_CH; i++)
        ccfg[i] <= '{hdr_thr: 10'd768, low_thr: 12'd8, high_thr: 12'd24};
    end else begin
      spy_arm <= 1'b0;
      if (cfg_we && a_ch == 4'd15) begin
        if (cfg_addr[1:0] == 2'd0) mode <= mode_e'(cfg_wdata[0]);
        if (cfg_addr[1:0] == 2'd1) begin spy_arm <= 1'b1; spy_nev <= ($clog2(SPY_EVENTS)+1)'(cfg_wdata); end
      end
      for (int i = 0; i < N_CH; i++)
        if (cfg_we && ch_hit[i] && a_pg == 4'd1)
          case (cfg_addr[1:0])
            2'd0: ccfg[i].hdr_thr  <= cfg_wdata[ADC_W-1:0];
            2'd1: ccfg[i].low_thr  <= cfg_wdata[VAL_W-1:0];
            2'd2: ccfg[i].high_thr <= cfg_wdata[VAL_W-1:0];
            default: ;
          endcase
    end
  end

  // ---------------- delay FPGAs
  logic [ADC_W-1:0] dly [N_CH];
  logic [N_CH-1:0]  frame_start;
  logic [2:0]       spy_busy;
  logic [ADC_W-1:0] spy_q [3];
  logic [ADC_W-1:0] spy_rd_data [3];
  logic [$clog2(SPY_EVENTS):0] spy_count [3];

  for (genvar g = 0; g < 3; g++) begin : g_dly
    logic [ADC_W-1:0] a4 [4], d4 [4];
    for (genvar k = 0; k < 4; k++) begin : g_k
      assign a4[k] = adc[4*g+k];
      assign dly[4*g+k] = d4[k];
    end
    delay_fpga #(.SPY_EVENTS(SPY_EVENTS), .SPY_SEG(SPY_SEG)) u_dly (
      .clk, .rst, .tick, .adc(a4), .dout(d4),
      .spy_arm, .spy_nevents(spy_nev),
      .spy_trig(frame_start[4*g]), .spy_busy(spy_busy[g]), .spy_count(spy_count[g]),
      .spy_rd_ch(2'(a_ch - 4'(4*g))), .spy_rd_addr(cfg_addr[SPY_AW-1:0]),
      .spy_rd_data(spy_rd_data[g]));
    assign spy_q[g] = spy_rd_data[g];
  end

  // ---------------- channel processing
  logic [N_CH-1:0] byte_rd, byte_empty, rec_rd, rec_empty;
  logic [7:0]      byte_data [N_CH];
  ch_rec_t         rec [N_CH];
  logic [LW-1:0]   byte_level [N_CH];

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    fe_channel #(.FIFO_DEPTH(FIFO_DEPTH)) u_ch (
      .clk, .rst, .tick, .sample(dly[i]), .mode, .cfg(ccfg[i]),
      .ped_we(ped_we[i]), .ped_addr(cfg_addr[7:0]), .ped_wdata(cfg_wdata[ADC_W-1:0]),
      .frame_start(frame_start[i]),
      .byte_rd(byte_rd[i]), .byte_data(byte_data[i]), .byte_empty(byte_empty[i]),
      .byte_level(byte_level[i]),
      .rec_rd(rec_rd[i]), .rec(rec[i]), .rec_empty(rec_empty[i]));
  end

  always_comb begin
    full = 1'b0; pfull = 1'b0;
    for (int i = 0; i < N_CH; i++) begin
      if (byte_level[i] > LW'(FIFO_DEPTH - 2*FRAME_STRIPS)) full = 1'b1;
      if (byte_level[i] > LW'(FIFO_DEPTH / 4)) pfull = 1'b1;
    end
  end

  // ---------------- fragment building and link
  logic w_valid, w_first, w_ready, link_busy;
  logic [15:0] w_data;
  logic [HDR_ADDR-1:0] frag_paddr;

  fragment_assembler u_asm (
    .clk, .rst, .module_id, .mode, .rec, .rec_empty, .rec_rd,
    .byte_data, .byte_empty, .byte_rd,
    .w_valid, .w_first, .w_data, .w_ready, .sync_err, .frag_paddr);

  link_tx u_tx (.clk, .rst, .w_valid, .w_first, .w_data, .w_ready,
                .link_d, .busy(link_busy), .underrun);

  always_ff @(posedge clk) begin
    if (rst) sync_sticky <= 1'b0;
    else if (sync_err) sync_sticky <= 1'b1;
  end

  // ---------------- configuration read-back (two clock latency)
  logic        re_d;
  logic [3:0]  ch_d, pg_d;
  logic [1:0]  reg_d;
  logic [31:0] rd_now;
  always_comb begin
    rd_now = '0;
    if (ch_d == 4'd15) begin
      case (reg_d)
        2'd0: rd_now = {31'd0, mode};
        2'd2: rd_now = {16'd0, frag_paddr, 1'b0, spy_busy, underrun, link_busy, full, pfull};
        default: ;
      endcase
      rd_now[31] = sync_sticky;
    end else if (ch_d < 4'(N_CH)) begin
      if (pg_d == 4'd1)
        case (reg_d)
          2'd0: rd_now = 32'(ccfg[ch_d].hdr_thr);
          2'd1: rd_now = 32'(ccfg[ch_d].low_thr);
          2'd2: rd_now = 32'(ccfg[ch_d].high_thr);
          default: ;
        endcase
      else if (pg_d == 4'd2) rd_now = 32'(spy_q[ch_d / 4]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      re_d <= 1'b0; ch_d <= '0; pg_d <= '0; reg_d <= '0; cfg_rdata <= '0;
    end else begin
      re_d <= cfg_re;
      if (cfg_re) begin ch_d <= a_ch; pg_d <= a_pg; reg_d <= cfg_addr[1:0]; end
      if (re_d) cfg_rdata <= rd_now;
    end
  end
endmodule
