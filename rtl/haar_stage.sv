// haar_stage: one level of the integer-to-integer Haar wavelet transform.
//
// Pairs of input samples X[2n], X[2n+1] are taken as they arrive; when the
// odd sample of a pair arrives the stage produces
//     A[n] = floor((X[2n] + X[2n+1]) / 2)      (low-pass, approximation)
//     D[n] = X[2n] - X[2n+1]                   (high-pass, detail)
// which is the integer Haar pair used by the design, followed by the
// downsampling by 2 of the Mallat scheme.  The sum and difference are formed
// one bit wider than the input; A always fits back into COEF_W bits, D is
// saturated to COEF_W bits (a design choice: the document keeps D at 12 bits
// without saying how the extra bit is handled).
//
// Timing: out_valid pulses for one clock, one clock after the in_valid that
// carried the odd sample; the output rate is half the input rate.
module haar_stage
  import ecg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t in_x,
  output logic  out_valid,
  output coef_t out_a,
  output coef_t out_d
);

  localparam logic signed [COEF_W:0] DMAX = (COEF_W+1)'(2**(COEF_W-1) - 1);
  localparam logic signed [COEF_W:0] DMIN = -(COEF_W+1)'(2**(COEF_W-1));

  coef_t even_q;        // X[2n] waiting for its partner
  logic  have_even_q;   // 1 when even_q holds the first sample of a pair

  logic signed [COEF_W:0] sum, diff;
  coef_t d_sat;

  always_comb begin
    sum  = {even_q[COEF_W-1], even_q} + {in_x[COEF_W-1], in_x};
    diff = {even_q[COEF_W-1], even_q} - {in_x[COEF_W-1], in_x};
    if (diff > DMAX)      d_sat = coef_t'(DMAX);
    else if (diff < DMIN) d_sat = coef_t'(DMIN);
    else                  d_sat = diff[COEF_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      even_q      <= '0;
      have_even_q <= 1'b0;
      out_valid   <= 1'b0;
      out_a       <= '0;
      out_d       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have_even_q) begin
          even_q      <= in_x;
          have_even_q <= 1'b1;
        end else begin
          have_even_q <= 1'b0;
          out_valid   <= 1'b1;
          out_a       <= sum[COEF_W:1];   // arithmetic >>1 = floor(sum/2)
          out_d       <= d_sat;
        end
      end
    end
  end

endmodule
