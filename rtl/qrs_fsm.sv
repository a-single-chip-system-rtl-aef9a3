// qrs_fsm: state machine that recognises a QRS complex in one level's detail
// signal from the order of its characteristic points.
//
// Four states, as in the document:
//   ADAPT    - initial adaptation after power-up, INIT_SAMPLES level samples
//              (5 s).  The thresholds of the min/max detectors are loaded
//              meanwhile; no search is done and both outputs stay low.
//   MIN_SRCH - waiting for a local minimum.
//   ZC_SRCH  - local minimum seen, waiting for the zero crossing.
//   MAX_SRCH - zero crossing seen, waiting for the local maximum; when it
//              comes, qrs_detected pulses and the search restarts.
// A minimum and a zero crossing found on the same sample (the crossing lies
// right after the minimum) take MIN_SRCH straight to MAX_SRCH; this, and the
// absence of any time-out in the search states, are this design's reading of
// the document.
//
// Interface: sample_valid marks one level sample (used to time the adaptation);
// min/zc/max_detected are one-clock event pulses.  enable_measuring is high
// from the end of adaptation on.  Timing: qrs_detected is registered, one
// clock after the max_detected pulse that completes the sequence.
module qrs_fsm
  import ecg_pkg::*;
#(
  parameter int unsigned INIT_SAMPLES = 2000   // 5 s at the level's sample rate
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_valid,
  input  logic min_detected,
  input  logic zc_detected,
  input  logic max_detected,
  output logic qrs_detected,
  output logic enable_measuring
);

  typedef enum logic [1:0] {ADAPT, MIN_SRCH, ZC_SRCH, MAX_SRCH} state_t;

  localparam int unsigned CW = cnt_w(INIT_SAMPLES);

  state_t        state;
  logic [CW-1:0] init_cnt;

  assign enable_measuring = (state != ADAPT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ADAPT;
      init_cnt     <= '0;
      qrs_detected <= 1'b0;
    end else begin
      qrs_detected <= 1'b0;
      unique case (state)
        ADAPT: if (sample_valid) begin
          if (init_cnt == CW'(INIT_SAMPLES - 1)) state <= MIN_SRCH;
          else                                   init_cnt <= init_cnt + 1'b1;
        end
        MIN_SRCH: if (min_detected) state <= zc_detected ? MAX_SRCH : ZC_SRCH;
        ZC_SRCH:  if (zc_detected)  state <= MAX_SRCH;
        MAX_SRCH: if (max_detected) begin
          state        <= MIN_SRCH;
          qrs_detected <= 1'b1;
        end
        default: state <= ADAPT;
      endcase
    end
  end

endmodule
