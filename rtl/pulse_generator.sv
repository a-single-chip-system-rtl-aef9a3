// pulse_generator: stretches a one-clock QRS_detected event into a pulse of
// fixed length (Pulse_i, 30 ms in the document).
//
// A down-counter is loaded with LEN_CYCLES on each trigger and the output is
// high while it is non-zero; a trigger during a pulse restarts it (a design
// choice, the document only gives the length).
//
// Timing: pulse rises one clock after trig and lasts LEN_CYCLES clocks.
module pulse_generator
  import ecg_pkg::*;
#(
  parameter int unsigned LEN_CYCLES = 1_500_000   // 30 ms at 50 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse
);

  localparam int unsigned CW = $clog2(LEN_CYCLES + 1);

  logic [CW-1:0] cnt;

  assign pulse = (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cnt <= '0;
    else if (trig)      cnt <= CW'(LEN_CYCLES);
    else if (cnt != '0) cnt <= cnt - 1'b1;
  end

endmodule
