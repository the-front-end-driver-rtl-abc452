// fragment_assembler: gathers the data of one trigger from the 12 channel
// FIFOs of a front-end module into one fragment of 16-bit words for the link
// to the back-end, and checks that all APV25s sent the same pipeline address.
//
// A fragment is started once every channel holds a frame record. Format (all
// 16-bit words, this design's own):
//   word 0            L, the number of words that follow
//   word 1            {pipeline address of ch 0 APV 0 [15:8], module id [7:4],
//                      raw mode, any APV error, address mismatch, any overflow}
//   per channel c     {c [15:12], 8'h00, APV0 err, APV1 err, mismatch, overflow}
//                     number of data bytes n
//                     ceil(n/2) words, two bytes each, first byte in [15:8]
// The comparison of pipeline addresses of all channels is the described
// synchronisation check; a mismatch is reported in the fragment and on
// sync_err (one clock pulse per fragment).
//
// Interface: words leave on w_valid/w_data/w_ready, w_first marks word 0.
// Each data word takes two clocks to collect from the byte FIFO.
module fragment_assembler
  import fed_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] module_id,
  input  mode_e      mode,
  input  ch_rec_t    rec       [N_CH],
  input  logic [N_CH-1:0] rec_empty,
  output logic [N_CH-1:0] rec_rd,
  input  logic [7:0] byte_data [N_CH],
  input  logic [N_CH-1:0] byte_empty,
  output logic [N_CH-1:0] byte_rd,
  output logic       w_valid,
  output logic       w_first,
  output logic [15:0] w_data,
  input  logic       w_ready,
  output logic       sync_err,
  output logic [HDR_ADDR-1:0] frag_paddr
);
  typedef enum logic [2:0] {IDLE, LEN, HDR, CW0, CW1, D_HI, D_LO} st_e;
  st_e st;
  logic [3:0]  c;
  logic [9:0]  left;
  logic [7:0]  hi;
  logic [15:0] len;
  logic [N_CH-1:0] mism, mism_q;
  logic [HDR_ADDR-1:0] ref_addr;

  // fragment length and address comparison of the waiting records
  always_comb begin
    len = 16'd1;
    for (int i = 0; i < N_CH; i++)
      len = len + 16'd2 + ((16'(rec[i].nbytes) + 16'd1) >> 1);
    for (int i = 0; i < N_CH; i++)
      mism[i] = (rec[i].paddr0 != rec[0].paddr0) || (rec[i].paddr1 != rec[0].paddr0);
  end

  logic apv_any, ovf_any;
  always_comb begin
    apv_any = 1'b0; ovf_any = 1'b0;
    for (int i = 0; i < N_CH; i++) begin
      apv_any |= rec[i].apv_err0 | rec[i].apv_err1;
      ovf_any |= rec[i].ovf;
    end
  end

  always_comb begin
    w_valid = 1'b0; w_first = 1'b0; w_data = '0;
    case (st)
      LEN: begin w_valid = 1'b1; w_first = 1'b1; w_data = len; end
      HDR: begin w_valid = 1'b1;
        w_data = {ref_addr, module_id, (mode == MODE_RAW), apv_any, |mism_q, ovf_any}; end
      CW0: begin w_valid = 1'b1;
        w_data = {c, 8'h00, rec[c].apv_err0, rec[c].apv_err1, mism_q[c], rec[c].ovf}; end
      CW1: begin w_valid = 1'b1; w_data = {6'd0, rec[c].nbytes}; end
      D_LO: begin w_valid = 1'b1;
        w_data = (left == 10'd0) ? {hi, 8'h00} : {hi, byte_data[c]}; end
      default: ;
    endcase
  end

  wire fire = w_valid && w_ready;

  always_comb begin
    byte_rd = '0;
    rec_rd  = '0;
    if (st == D_HI) byte_rd[c] = 1'b1;
    if (st == D_LO && fire && left != 10'd0) byte_rd[c] = 1'b1;
    if ((st == CW1 && fire && rec[c].nbytes == 10'd0) ||
        (st == D_LO && fire && left <= 10'd1)) rec_rd[c] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; c <= '0; left <= '0; hi <= '0; sync_err <= 1'b0; ref_addr <= '0; mism_q <= '0;
    end else begin
      sync_err <= 1'b0;
      case (st)
        IDLE: if (rec_empty == '0) begin
          st <= LEN; c <= '0;
          ref_addr <= rec[0].paddr0;
          mism_q <= mism;
          sync_err <= |mism;
        end
        LEN: if (fire) st <= HDR;
        HDR: if (fire) st <= CW0;
        CW0: if (fire) st <= CW1;
        CW1: if (fire) begin
          left <= rec[c].nbytes;
          if (rec[c].nbytes == 10'd0) begin
            if (c == 4'(N_CH-1)) st <= IDLE;
            else begin c <= c + 1'b1; st <= CW0; end
          end else st <= D_HI;
        end
        D_HI: begin hi <= byte_data[c]; left <= left - 10'd1; st <= D_LO; end
        D_LO: if (fire) begin
          if (left <= 10'd1) begin
            if (c == 4'(N_CH-1)) st <= IDLE;
            else begin c <= c + 1'b1; st <= CW0; end
          end else begin
            left <= left - 10'd1;
            st <= D_HI;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign frag_paddr = ref_addr;

  a_byte_present: assert property (@(posedge clk) disable iff (rst) (st == D_HI) |-> !byte_empty[c]);
endmodule
