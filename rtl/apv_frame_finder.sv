// apv_frame_finder: recognises the data frame of an APV25 pair on one fibre and
// decodes its digital header.
//
// The two APV25s of a pair are multiplexed sample by sample, so every header
// bit appears twice in a row (APV 0 first, then APV 1). A sample at or above
// hdr_thr is a digital '1'. While idle the finder counts consecutive '1'
// samples; the periodic tick marks are two samples long, the 3 header start
// bits give six, so a run of six starts a frame. The following samples are the
// 8 pipeline address bits (MSB first) and the error bit of both APVs, then the
// 256 analogue samples: sample j belongs to APV j%2 with output index j/2.
// The error bit of the APV25 is active low. The frame recognition and address
// extraction are the described function; the bit layout is the APV25's own.
//
// Interface: one sample per tick (40 MHz strobe on the 160 MHz clock). For
// each analogue sample, s_valid pulses with s_apv, s_idx (APV output order) and
// s_raw. hdr_valid pulses once the header is decoded, before the first strip;
// s_last marks the final sample. Latency: one clock from the sample.
module apv_frame_finder
  import fed_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [ADC_W-1:0] sample,
  input  logic [ADC_W-1:0] hdr_thr,
  output logic             in_frame,
  output logic             hdr_valid,
  output logic [HDR_ADDR-1:0] paddr0,
  output logic [HDR_ADDR-1:0] paddr1,
  output logic             err0,
  output logic             err1,
  output logic             s_valid,
  output logic             s_apv,
  output logic [6:0]       s_idx,
  output logic [ADC_W-1:0] s_raw,
  output logic             s_last
);
  typedef enum logic [1:0] {IDLE, HEADER, DATA} st_e;
  st_e st;
  logic [2:0] run;        // consecutive '1' samples while idle
  logic [8:0] k;          // sample index within the frame
  wire bit1 = (sample >= hdr_thr);
  wire [8:0] j = k - 9'(HDR_SAMPLES);

  assign in_frame = (st != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; run <= '0; k <= '0;
      paddr0 <= '0; paddr1 <= '0; err0 <= 1'b0; err1 <= 1'b0;
      hdr_valid <= 1'b0; s_valid <= 1'b0; s_last <= 1'b0;
      s_apv <= 1'b0; s_idx <= '0; s_raw <= '0;
    end else begin
      hdr_valid <= 1'b0;
      s_valid   <= 1'b0;
      s_last    <= 1'b0;
      if (tick) begin
        case (st)
          IDLE: begin
            if (bit1) begin
              if (run == 3'(2*HDR_START-1)) begin
                st <= HEADER; k <= 9'(2*HDR_START); run <= '0;
              end else run <= run + 1'b1;
            end else run <= '0;
          end
          HEADER: begin
            k <= k + 1'b1;
            if (k < 9'(2*(HDR_START+HDR_ADDR))) begin
              if (k[0]) paddr1 <= {paddr1[HDR_ADDR-2:0], bit1};
              else      paddr0 <= {paddr0[HDR_ADDR-2:0], bit1};
            end else if (!k[0]) begin
              err0 <= !bit1;
            end else begin
              err1 <= !bit1;
              st <= DATA;
              hdr_valid <= 1'b1;
            end
          end
          DATA: begin
            k <= k + 1'b1;
            s_valid <= 1'b1;
            s_apv   <= j[0];
            s_idx   <= j[7:1];
            s_raw   <= sample;
            if (j == 9'(FRAME_STRIPS-1)) begin
              s_last <= 1'b1;
              st <= IDLE;
            end
          end
          default: st <= IDLE;
        endcase
      end
    end
  end
endmodule
