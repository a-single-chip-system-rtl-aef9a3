// threshold_tracker: adaptive threshold for the modulus-maxima search.
//
// The detail stream of one level is cut into windows of NC samples (1 s of
// signal at that level).  During a window the most extreme value is tracked
// (the largest one when IS_MAX = 1, the smallest when IS_MAX = 0).  At the end
// of the window that extreme is shifted into a four-deep history REG1..REG4,
// so the history always holds the extremes of the last four seconds.  The
// threshold is
//     T = 5/8 * (REG1 + REG2 + REG3 + REG4) / 4
// computed with shifts only (divide by 4, multiply by 5 = 4+1, divide by 8),
// each division rounding towards minus infinity.
//
// The window extreme starts from zero (a design choice), so a maximum is never
// below zero and a minimum never above it; the history resets to zero, which
// gives a zero threshold until the first windows have been loaded (the QRS
// state machine ignores detections during its 5 s adaptation).
//
// Timing: the history and the threshold change in the clock after the
// in_valid of the last sample of a window.
module threshold_tracker
  import ecg_pkg::*;
#(
  parameter int unsigned NC     = 400,   // samples per 1 s window at this level
  parameter bit          IS_MAX = 1'b1   // 1: track maxima (T_p), 0: minima (T_n)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_d,
  output coef_t threshold
);

  localparam int unsigned CW = cnt_w(NC);

  logic [CW-1:0] win_cnt;
  coef_t         win_ext;         // extreme of the current window so far
  coef_t         hist [4];        // REG1..REG4
  coef_t         ext_with_cur;    // extreme including the arriving sample

  logic signed [COEF_W+1:0] sum4;   // REG1+..+REG4
  logic signed [COEF_W-1:0] avg;    // sum / 4
  logic signed [COEF_W+2:0] avg5;   // 5 * avg

  always_comb begin
    if (IS_MAX) ext_with_cur = (in_d > win_ext) ? in_d : win_ext;
    else        ext_with_cur = (in_d < win_ext) ? in_d : win_ext;
    sum4 = (COEF_W+2)'(hist[0]) + (COEF_W+2)'(hist[1])
         + (COEF_W+2)'(hist[2]) + (COEF_W+2)'(hist[3]);
    avg  = sum4[COEF_W+1:2];
    avg5 = ((COEF_W+3)'(avg) <<< 2) + (COEF_W+3)'(avg);
    threshold = avg5[COEF_W+2:3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt <= '0;
      win_ext <= '0;
      for (int k = 0; k < 4; k++) hist[k] <= '0;
    end else if (in_valid) begin
      if (win_cnt == CW'(NC - 1)) begin
        win_cnt <= '0;
        win_ext <= '0;
        hist[0] <= ext_with_cur;
        for (int k = 1; k < 4; k++) hist[k] <= hist[k-1];
      end else begin
        win_cnt <= win_cnt + 1'b1;
        win_ext <= ext_with_cur;
      end
    end
  end

endmodule
