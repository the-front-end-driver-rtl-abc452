// fed_pkg: shared constants and types of the FED (Front-End Driver) readout logic.
//
// The FED digitises the multiplexed analogue frames of APV25 pairs arriving on
// 96 fibres (8 front-end modules of 12 fibres), zero-suppresses them by cluster
// finding and builds one event per Level-1 trigger for the central DAQ.
// The card-level numbers (8 modules, 12 fibres each, 2 x 128 strips per fibre,
// 10-bit ADCs, 8-bit stored pulse heights, 4-bit links) follow the design
// description. The APV25 header layout and the output order of the APV25 are
// taken from the APV25 chip itself, and the word formats of fragments and
// events are this design's own choice.
//
// Clocking: all logic runs on one 160 MHz clock (4x the 40.08 MHz LHC clock).
// ADC samples and TTC signals are qualified by a one-in-four strobe (tick40).
package fed_pkg;

  localparam int N_MODULES   = 8;    // front-end modules per FED
  localparam int N_CH        = 12;   // fibres (channels) per front-end module
  localparam int N_APV       = 2;    // APV25s multiplexed on one fibre
  localparam int N_STRIPS    = 128;  // strips read by one APV25
  localparam int FRAME_STRIPS = N_APV * N_STRIPS;   // 256 samples of analogue data
  localparam int ADC_W       = 10;   // ADC resolution
  localparam int VAL_W       = 12;   // signed width of processed strip values
  localparam int HDR_START   = 3;    // start bits of the APV25 digital header
  localparam int HDR_ADDR    = 8;    // pipeline address bits
  localparam int HDR_SAMPLES = N_APV * (HDR_START + HDR_ADDR + 1);  // 24 muxed header samples
  localparam int LINK_W      = 4;    // front-end to back-end link width (bits)
  localparam int BX_PER_ORBIT = 3564; // LHC bunch crossings per orbit

  // Link framing
  localparam logic [LINK_W-1:0] LINK_IDLE = 4'h0;
  localparam logic [LINK_W-1:0] LINK_SOF  = 4'hA;

  // Event word markers (bits 63:60 of the event header and trailer)
  localparam logic [3:0] EVT_HDR_MARK = 4'h5;
  localparam logic [3:0] EVT_TRL_MARK = 4'hA;

  typedef logic signed [VAL_W-1:0] val_t;

  // Readout mode of the front-end processing
  typedef enum logic [0:0] {
    MODE_ZS  = 1'b0,   // zero suppressed (cluster data only)
    MODE_RAW = 1'b1    // raw ADC data of all 256 strips, no processing
  } mode_e;

  // Per-channel processing settings
  typedef struct packed {
    logic [ADC_W-1:0] hdr_thr;    // ADC level above which a sample is a digital '1'
    logic [VAL_W-1:0] low_thr;    // cluster threshold for neighbouring strips
    logic [VAL_W-1:0] high_thr;   // cluster threshold for isolated strips
  } ch_cfg_t;

  // Result of one frame of one channel, handed to the fragment assembler
  typedef struct packed {
    logic [HDR_ADDR-1:0] paddr0;  // pipeline address from APV 0 header
    logic [HDR_ADDR-1:0] paddr1;  // pipeline address from APV 1 header
    logic                apv_err0; // APV 0 header error bit was set
    logic                apv_err1;
    logic                ovf;      // a frame of this channel was lost earlier
    logic [9:0]          nbytes;   // bytes of this frame in the channel FIFO
  } ch_rec_t;

  // Trouble state sent to the Trigger Control System
  typedef enum logic [3:0] {
    TTS_READY = 4'h8,
    TTS_WARN  = 4'h1,   // buffers risk to overflow: reduce trigger rate
    TTS_OOS   = 4'h2,   // out of synchronisation
    TTS_BUSY  = 4'h4,   // no more triggers can be accepted
    TTS_ERROR = 4'hC    // data lost
  } tts_e;

  // APV25 output order n (0..127) to physical strip number:
  // strip = 32*(n%4) + 8*((n/4)%4) + n/16, a permutation of the 7 index bits.
  function automatic logic [6:0] apv_phys(input logic [6:0] n);
    return {n[1:0], n[3:2], n[6:4]};
  endfunction

endpackage
