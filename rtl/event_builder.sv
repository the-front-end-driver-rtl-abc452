// event_builder: builds one FED event per Level-1 trigger from the fragments
// of the 8 front-end modules, in the back-end FPGA.
//
// Each trigger's labels (event number, bunch crossing) wait in a trigger
// queue. For the oldest trigger the builder writes a header word, then copies
// the fragments of modules 0 to 7 in turn from their link receive FIFOs,
// packing four 16-bit words into each 64-bit word (first word in bits 63:48),
// pads the last word with zeros and ends with a trailer. It compares the
// pipeline address carried by every module's fragment with that of module 0:
// all must agree in a synchronous system, and a difference sets sync_err and
// the trailer's status. Event words (this design's own layout):
//   header  {4'h5, 4'h0, event number[23:0], bunch crossing[11:0], 8'h00, FED id[11:0]}
//   trailer {4'hA, status[3:0], event length in 64-bit words[23:0],
//            pipeline address[7:0], module mismatch mask[7:0], 16'h0000}
//   status  {module mismatch, APV error, overflow, raw mode}
// Interface: 64-bit words on o_valid/o_data/o_last/o_ready; the trailer has
// o_last. One 16-bit word is taken per clock while the output is free.
module event_builder
  import fed_pkg::*;
#(
  parameter int TRIG_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] fed_id,
  // triggers
  input  logic        l1a,
  input  logic [23:0] evt,
  input  logic [11:0] l1a_bx,
  output logic        trig_afull,
  output logic [$clog2(TRIG_DEPTH):0] trig_level,
  // link receive FIFOs
  input  logic [15:0] lk_data [N_MODULES],
  input  logic [N_MODULES-1:0] lk_empty,
  output logic [N_MODULES-1:0] lk_rd,
  // event output
  output logic        o_valid,
  output logic [63:0] o_data,
  output logic        o_last,
  input  logic        o_ready,
  output logic        sync_err,
  output logic [23:0] events_built
);
  typedef enum logic [2:0] {IDLE, HDR, LEN, BODY, PAD, TRL} st_e;
  st_e st;

  // output register is free to take a word
  wire out_free = !o_valid || o_ready;

  logic        t_empty, t_full;
  logic [35:0] t_q;
  sync_fifo #(.WIDTH(36), .DEPTH(TRIG_DEPTH)) u_trig (
    .clk, .rst, .wr_en(l1a), .wr_data({evt, l1a_bx}), .rd_en(st == TRL && out_free),
    .rd_data(t_q), .empty(t_empty), .full(t_full), .level(trig_level));
  assign trig_afull = (trig_level >= ($clog2(TRIG_DEPTH)+1)'(TRIG_DEPTH - 2));

  logic [2:0]  m;
  logic [15:0] remaining;
  logic        first_body;   // next body word is the fragment's word 1
  logic [47:0] acc;
  logic [1:0]  cnt;
  logic [23:0] nwords;
  logic [HDR_ADDR-1:0] ref_addr;
  logic [N_MODULES-1:0] mism;
  logic        apv_any, ovf_any, raw_any;


  wire [15:0] w = lk_data[m];
  wire take = (st == LEN || st == BODY) && !lk_empty[m] && out_free;

  always_comb begin
    lk_rd = '0;
    lk_rd[m] = take;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; m <= '0; remaining <= '0; first_body <= 1'b0; acc <= '0; cnt <= '0;
      nwords <= '0; ref_addr <= '0; mism <= '0; apv_any <= 1'b0; ovf_any <= 1'b0; raw_any <= 1'b0;
      o_valid <= 1'b0; o_data <= '0; o_last <= 1'b0; sync_err <= 1'b0; events_built <= '0;
    end else begin
      sync_err <= 1'b0;
      if (o_valid && o_ready) o_valid <= 1'b0;
      case (st)
        IDLE: if (!t_empty) begin
          st <= HDR; m <= '0; cnt <= '0; nwords <= '0; mism <= '0;
          apv_any <= 1'b0; ovf_any <= 1'b0; raw_any <= 1'b0;
        end
        HDR: if (out_free) begin
          o_valid <= 1'b1; o_last <= 1'b0;
          o_data <= {EVT_HDR_MARK, 4'h0, t_q[35:12], t_q[11:0], 8'h00, fed_id};
          nwords <= 24'd1;
          st <= LEN;
        end
        LEN, BODY: if (take) begin
          // pack the word
          acc <= {acc[31:0], w};
          cnt <= cnt + 1'b1;
          if (cnt == 2'd3) begin
            o_valid <= 1'b1; o_last <= 1'b0; o_data <= {acc, w};
            nwords <= nwords + 1'b1;
          end
          if (st == LEN) begin
            remaining <= w;
            first_body <= 1'b1;
            if (w == 16'd0) begin
              if (m == 3'(N_MODULES-1)) st <= PAD; else m <= m + 1'b1;
            end else st <= BODY;
          end else begin
            first_body <= 1'b0;
            if (first_body) begin
              if (m == '0) ref_addr <= w[15:8];
              else if (w[15:8] != ref_addr) mism[m] <= 1'b1;
              raw_any <= raw_any | w[3];
              apv_any <= apv_any | w[2];
              ovf_any <= ovf_any | w[0];
              if (w[1]) mism[m] <= 1'b1;
            end
            remaining <= remaining - 16'd1;
            if (remaining == 16'd1) begin
              if (m == 3'(N_MODULES-1)) st <= PAD;
              else begin m <= m + 1'b1; st <= LEN; end
            end
          end
        end
        PAD: if (out_free) begin
          if (cnt != 2'd0) begin
            o_valid <= 1'b1; o_last <= 1'b0;
            case (cnt)
              2'd1:    o_data <= {acc[15:0], 48'h0};
              2'd2:    o_data <= {acc[31:0], 32'h0};
              default: o_data <= {acc[47:0], 16'h0};
            endcase
            nwords <= nwords + 1'b1;
            cnt <= '0;
          end
          st <= TRL;
        end
        TRL: if (out_free) begin
          o_valid <= 1'b1; o_last <= 1'b1;
          o_data <= {EVT_TRL_MARK, {|mism, apv_any, ovf_any, raw_any}, nwords + 24'd1,
                     ref_addr, 8'(mism), 16'h0000};
          sync_err <= |mism;
          events_built <= events_built + 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_no_lost_trigger: assert property (@(posedge clk) disable iff (rst) !(l1a && t_full));
endmodule
