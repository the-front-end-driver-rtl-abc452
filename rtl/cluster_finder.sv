// cluster_finder: common mode subtraction, cluster finding and output
// formatting of one fibre's frame (256 strips in physical order).
//
// For each APV the common mode offset is obtained from cm_median (one shared
// unit, APV 0 then APV 1, selected by cm_sel) and subtracted from the strips of
// that APV. A strip is kept when its value is above high_thr, or above low_thr
// with a neighbour (within the same APV) also above low_thr: this keeps groups
// of two or more neighbouring strips over the low threshold and isolated strips
// over the high threshold, as described. Kept strips are written as clusters:
// first strip number (0..255), number of strips, then one byte per strip. Each
// pulse height is reduced to 8 bits by saturation to 0..255. In raw mode no
// common mode is subtracted and every strip is sent as two bytes (upper bits,
// then lower 8 bits). The threshold rule and the 8-bit reduction are the
// document's; the cluster byte format and saturation are this design's.
//
// Interface: the frame (vals, header) is valid while rdy is high; bank_release
// frees it when done. Output bytes use b_valid/b_ready. After the last byte one
// record (ch_rec_t) is pushed with rec_valid; a frame is only started while
// rec_ready is high. Timing: 2 x VAL_W clocks for the medians, then one clock
// per strip scanned plus one per strip of a cluster and two per cluster.
module cluster_finder
  import fed_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  mode_e            mode,
  input  logic [VAL_W-1:0] low_thr,
  input  logic [VAL_W-1:0] high_thr,
  // frame bank
  input  logic             rdy,
  input  val_t             vals [FRAME_STRIPS],
  input  logic [HDR_ADDR-1:0] paddr0,
  input  logic [HDR_ADDR-1:0] paddr1,
  input  logic             err0,
  input  logic             err1,
  input  logic             ovf_seen,
  output logic             bank_release,
  // common mode unit
  output logic             cm_start,
  output logic             cm_sel,
  input  logic             cm_done,
  input  val_t             cm_median,
  // byte output
  output logic             b_valid,
  output logic [7:0]       b_data,
  input  logic             b_ready,
  // frame record
  output logic             rec_valid,
  output ch_rec_t          rec,
  input  logic             rec_ready
);
  typedef enum logic [3:0] {IDLE, CM0, CM1, SCAN, MEAS, EMIT_A, EMIT_W, EMIT_V,
                            RAW_HI, RAW_LO, FIN} st_e;
  st_e st;
  val_t cm [2];
  logic [7:0] s, cs, e, p;
  logic [9:0] nbytes;
  logic       cm_wait;

  function automatic val_t v(input logic [7:0] i);
    return vals[i] - cm[i[7]];
  endfunction

  function automatic logic over_low(input logic [7:0] i);
    return v(i) > $signed(low_thr);
  endfunction

  // Is strip i part of a cluster?
  function automatic logic keep(input logic [7:0] i);
    logic left, right;
    left  = (i[6:0] != 7'd0)   && over_low(i - 8'd1);
    right = (i[6:0] != 7'd127) && over_low(i + 8'd1);
    return (v(i) > $signed(high_thr)) || (over_low(i) && (left || right));
  endfunction

  function automatic logic [7:0] reduce8(input val_t x);
    if (x < 0)              return 8'd0;
    else if (x > val_t'(255)) return 8'd255;
    else                    return x[7:0];
  endfunction

  wire push = b_valid && b_ready;

  always_comb begin
    b_valid = 1'b0;
    b_data  = '0;
    case (st)
      EMIT_A: begin b_valid = 1'b1; b_data = cs; end
      EMIT_W: begin b_valid = 1'b1; b_data = e - cs + 8'd1; end
      EMIT_V: begin b_valid = 1'b1; b_data = reduce8(v(p)); end
      RAW_HI: begin b_valid = 1'b1; b_data = 8'(vals[s][VAL_W-1:8]); end
      RAW_LO: begin b_valid = 1'b1; b_data = vals[s][7:0]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; s <= '0; cs <= '0; e <= '0; p <= '0; nbytes <= '0;
      cm <= '{default: '0}; cm_start <= 1'b0; cm_sel <= 1'b0; cm_wait <= 1'b0;
      bank_release <= 1'b0; rec_valid <= 1'b0; rec <= '0;
    end else begin
      cm_start     <= 1'b0;
      bank_release <= 1'b0;
      rec_valid    <= 1'b0;
      if (push) nbytes <= nbytes + 1'b1;
      case (st)
        IDLE: if (rdy && rec_ready && !bank_release) begin
          nbytes <= '0;
          s <= '0;
          if (mode == MODE_RAW) begin
            cm <= '{default: '0};
            st <= RAW_HI;
          end else begin
            cm_sel <= 1'b0; cm_start <= 1'b1; cm_wait <= 1'b1;
            st <= CM0;
          end
        end
        CM0: begin
          cm_wait <= 1'b0;
          if (cm_done && !cm_wait) begin
            cm[0] <= cm_median;
            cm_sel <= 1'b1; cm_start <= 1'b1; cm_wait <= 1'b1;
            st <= CM1;
          end
        end
        CM1: begin
          cm_wait <= 1'b0;
          if (cm_done && !cm_wait) begin
            cm[1] <= cm_median;
            st <= SCAN;
          end
        end
        SCAN: begin
          if (keep(s)) begin
            cs <= s; e <= s; st <= MEAS;
          end else if (s == 8'd255) st <= FIN;
          else s <= s + 1'b1;
        end
        MEAS: begin
          if (e[6:0] != 7'd127 && keep(e + 8'd1)) e <= e + 1'b1;
          else st <= EMIT_A;
        end
        EMIT_A: if (b_ready) st <= EMIT_W;
        EMIT_W: if (b_ready) begin p <= cs; st <= EMIT_V; end
        EMIT_V: if (b_ready) begin
          if (p == e) begin
            if (e == 8'd255) st <= FIN;
            else begin s <= e + 1'b1; st <= SCAN; end
          end else p <= p + 1'b1;
        end
        RAW_HI: if (b_ready) st <= RAW_LO;
        RAW_LO: if (b_ready) begin
          if (s == 8'd255) st <= FIN;
          else begin s <= s + 1'b1; st <= RAW_HI; end
        end
        FIN: begin
          rec_valid <= 1'b1;
          rec <= '{paddr0: paddr0, paddr1: paddr1, apv_err0: err0, apv_err1: err1,
                   ovf: ovf_seen, nbytes: nbytes};
          bank_release <= 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
