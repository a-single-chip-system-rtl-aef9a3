// rr_hr_calculator: RR interval (ms) and heart rate (beats/min) from the
// one-clock Short_pulse that marks each accepted QRS complex.
//
// Built, as in the document, from four counters, two latch registers and a
// shifter:
//   C1  divides the clock down to a 1 ms tick (its overflow).
//   C2  counts milliseconds; Short_pulse latches it into RR_int and clears it.
//   C3  counts milliseconds up to WINDOW_MS (15 s); its overflow latches
//       C4 << 2 into HR and clears C4.
//   C4  counts Short_pulses.
// Since 60 s = 4 x 15 s, the beat count of a 15 s window shifted left by two
// is the heart rate.  Everything is held cleared until enable_measuring
// rises (end of the detector's adaptation).  Design choices: C2 and C4
// saturate instead of wrapping; the first RR value after enable is measured
// from the moment enable rose, as the counters simply start there.
//
// Timing: rr_valid / hr_valid pulse for one clock when RR_int / HR change,
// one clock after the Short_pulse / the 15 s overflow.
module rr_hr_calculator
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned WINDOW_MS = 15_000,
  parameter int unsigned RR_W      = 11,
  parameter int unsigned HR_W      = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable_measuring,
  input  logic            short_pulse,
  output logic [RR_W-1:0] rr_int,
  output logic            rr_valid,
  output logic [HR_W-1:0] hr,
  output logic            hr_valid
);

  localparam int unsigned C1_N = ms_to_cycles(CLK_HZ, 1);
  localparam int unsigned C1_W = cnt_w(C1_N);
  localparam int unsigned C3_W = cnt_w(WINDOW_MS);
  localparam int unsigned C4_W = HR_W - 2;

  logic [C1_W-1:0] c1;
  logic [RR_W-1:0] c2;
  logic [C3_W-1:0] c3;
  logic [C4_W-1:0] c4;
  logic            ms_tick;    // C1 overflow
  logic            win_end;    // C3 overflow

  assign ms_tick = (c1 == C1_W'(C1_N - 1));
  assign win_end = ms_tick && (c3 == C3_W'(WINDOW_MS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; c3 <= '0; c4 <= '0;
      rr_int <= '0; rr_valid <= 1'b0;
      hr <= '0;     hr_valid <= 1'b0;
    end else if (!enable_measuring) begin
      c1 <= '0; c2 <= '0; c3 <= '0; c4 <= '0;
      rr_valid <= 1'b0;
      hr_valid <= 1'b0;
    end else begin
      rr_valid <= 1'b0;
      hr_valid <= 1'b0;
      // C1: 1 ms prescaler
      c1 <= ms_tick ? '0 : c1 + 1'b1;
      // C2 and the RR latch
      if (short_pulse) begin
        rr_int   <= c2;
        rr_valid <= 1'b1;
        c2       <= '0;
      end else if (ms_tick && c2 != '1) begin
        c2 <= c2 + 1'b1;
      end
      // C3: 15 s window
      if (ms_tick) c3 <= win_end ? '0 : c3 + 1'b1;
      // C4, the HR latch and the <<2 shifter
      if (win_end) begin
        hr       <= {c4, 2'b00};
        hr_valid <= 1'b1;
        c4       <= C4_W'(short_pulse);
      end else if (short_pulse && c4 != '1) begin
        c4 <= c4 + 1'b1;
      end
    end
  end

endmodule
