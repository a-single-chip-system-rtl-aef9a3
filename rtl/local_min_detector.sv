// local_min_detector: finds local minima of one level's detail coefficients D_i.
//
// Three registers REG5, REG6, REG7 hold the last three coefficients D_i(n),
// D_i(n-1), D_i(n-2).  The middle one, REG6, is a local minimum when
//     REG7 > REG6, REG6 < T_n and REG5 > REG6
// where T_n is the adaptive threshold, 5/8 of the mean of the last four
// one-second minima (threshold_tracker).  These rules and registers follow
// the document; the registered single-clock output pulse is this design's
// choice.
//
// Interface: in_valid / in_d carry D_i; min_detected pulses for one clock
// and min_value holds the coefficient found.
// Timing: the decision on D_i(n-1) is made once D_i(n) has arrived and is
// output two clocks after that sample's in_valid.
module local_min_detector
  import ecg_pkg::*;
#(
  parameter int unsigned NC = 400      // samples per second at this level
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_d,
  output logic  min_detected,
  output coef_t min_value,
  output coef_t threshold
);

  coef_t reg5, reg6, reg7;   // D_i(n), D_i(n-1), D_i(n-2)
  coef_t t_n;
  logic  eval_q;             // registers updated last clock: evaluate now

  threshold_tracker #(.NC(NC), .IS_MAX(1'b0)) u_thr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_d     (in_d),
    .threshold(t_n)
  );

  assign threshold = t_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg5 <= '0;
      reg6 <= '0;
      reg7 <= '0;
      eval_q <= 1'b0;
      min_detected <= 1'b0;
      min_value    <= '0;
    end else begin
      eval_q <= in_valid;
      if (in_valid) begin
        reg5 <= in_d;
        reg6 <= reg5;
        reg7 <= reg6;
      end
      min_detected <= 1'b0;
      if (eval_q && (reg7 > reg6) && (reg6 < t_n) && (reg5 > reg6)) begin
        min_detected <= 1'b1;
        min_value    <= reg6;
      end
    end
  end

endmodule
