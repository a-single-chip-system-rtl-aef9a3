// haar_dwt: three-level Haar discrete wavelet transform (Mallat scheme).
//
// The unsigned 12-bit A/D code is first turned into a signed value centred on
// zero by inverting its MSB (offset binary to two's complement; a design
// choice).  It then passes through a cascade of haar_stage instances: level i
// takes the approximations A_{i-1} of the previous level (A_0 = X) and gives
// A_i and D_i at fs / 2^i.  Only the detail coefficients are used downstream;
// the approximations are brought out for observation.
//
// Interface: x / x_valid in; a[i], d[i], valid[i] for level i+1 (index 0 is
// level 1).  Timing: level i output appears i clocks after the in_valid of
// the sample that completes its pair.
module haar_dwt
  import ecg_pkg::*;
#(
  parameter int unsigned N_LEVELS = LEVELS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  sample_t x,
  output logic  [N_LEVELS-1:0] valid,
  output coef_t [N_LEVELS-1:0] a,
  output coef_t [N_LEVELS-1:0] d
);

  logic  [N_LEVELS:0] v_in;
  coef_t [N_LEVELS:0] x_in;

  assign v_in[0] = x_valid;
  assign x_in[0] = coef_t'({~x[COEF_W-1], x[COEF_W-2:0]});

  for (genvar i = 0; i < N_LEVELS; i++) begin : g_level
    haar_stage u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v_in[i]),
      .in_x     (x_in[i]),
      .out_valid(valid[i]),
      .out_a    (a[i]),
      .out_d    (d[i])
    );
    assign v_in[i+1] = valid[i];
    assign x_in[i+1] = a[i];
  end

endmodule
