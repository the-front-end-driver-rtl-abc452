// tcs_feedback: fast feedback state of the FED for the central Trigger
// Control System, and the local VME interrupt request.
//
// The state is, in order of priority:
//   ERROR  data were lost (a link receive FIFO or channel buffer overflowed),
//   OOS    loss of synchronisation (pipeline addresses disagreed),
//   BUSY   no more triggers can be taken: event buffer above busy_level words,
//          any front-end module full, or the trigger queue almost full,
//   WARN   buffers risk to overflow, the trigger rate should be reduced:
//          event buffer above warn_level or any front-end module partially full,
//   READY  otherwise.
// ERROR and OOS are sticky until clear_err. irq_n (open-drain style, active
// low) is driven while ERROR or OOS holds and irq_en is set. The document
// asks for overflow warnings and serious-error signalling; the levels, the
// priority and the state encoding are this design's.
module tcs_feedback
  import fed_pkg::*;
#(
  parameter int OCC_W = 19
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OCC_W-1:0] occupancy,
  input  logic [OCC_W-1:0] warn_level,
  input  logic [OCC_W-1:0] busy_level,
  input  logic [N_MODULES-1:0] fe_full,
  input  logic [N_MODULES-1:0] fe_pfull,
  input  logic             trig_afull,
  input  logic             sync_err,
  input  logic             data_lost,
  input  logic             clear_err,
  input  logic             irq_en,
  output tts_e             tts,
  output logic             irq_n
);
  logic oos, err;

  always_ff @(posedge clk) begin
    if (rst) begin
      oos <= 1'b0; err <= 1'b0; tts <= TTS_READY; irq_n <= 1'b1;
    end else begin
      if (clear_err) begin oos <= 1'b0; err <= 1'b0; end
      else begin
        if (sync_err)  oos <= 1'b1;
        if (data_lost) err <= 1'b1;
      end
      if (err || data_lost)      tts <= TTS_ERROR;
      else if (oos || sync_err)  tts <= TTS_OOS;
      else if (occupancy >= busy_level || |fe_full || trig_afull) tts <= TTS_BUSY;
      else if (occupancy >= warn_level || |fe_pfull) tts <= TTS_WARN;
      else tts <= TTS_READY;
      irq_n <= !(irq_en && (err || oos));
    end
  end
endmodule
