// final_pulse_generator: turns OR_gate_pulse into the chip's QRS output.
//
// On each rising edge of OR_gate_pulse it checks how long ago the previous
// rising edge was.  If at least MIN_RR_MS (200 ms, the lower physiological
// limit of an RR interval) has passed, it starts Pulse_for_QRS (PULSE_MS,
// 20 ms long) and gives Short_pulse, one clock wide, at its rising edge;
// otherwise the edge is rejected.  The interval is measured between
// successive rising edges of OR_gate_pulse, accepted or not (this design's
// reading of "between two sequent OR_gate_pulses"); the first edge after reset
// is always accepted.  rejected pulses for one clock on a refused edge.
//
// Timing: Short_pulse and the rise of Pulse_for_QRS come one clock after the
// rising edge of or_pulse.
module final_pulse_generator
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned PULSE_MS  = 20,
  parameter int unsigned MIN_RR_MS = 200
) (
  input  logic clk,
  input  logic rst_n,
  input  logic or_pulse,
  output logic pulse_for_qrs,
  output logic short_pulse,
  output logic rejected
);

  localparam int unsigned LEN   = ms_to_cycles(CLK_HZ, PULSE_MS);
  localparam int unsigned MINRR = ms_to_cycles(CLK_HZ, MIN_RR_MS);
  localparam int unsigned LW    = $clog2(LEN + 1);
  localparam int unsigned GW    = $clog2(MINRR + 1);

  logic          or_q;
  logic          rise;
  logic [GW-1:0] gap;       // clocks since the previous rising edge, saturating
  logic [LW-1:0] len_cnt;

  assign rise          = or_pulse && !or_q;
  assign pulse_for_qrs = (len_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      or_q        <= 1'b0;
      gap         <= GW'(MINRR);
      len_cnt     <= '0;
      short_pulse <= 1'b0;
      rejected    <= 1'b0;
    end else begin
      or_q        <= or_pulse;
      short_pulse <= 1'b0;
      rejected    <= 1'b0;
      if (len_cnt != '0) len_cnt <= len_cnt - 1'b1;
      if (rise) begin
        gap <= GW'(1);
        if (gap >= GW'(MINRR)) begin
          len_cnt     <= LW'(LEN);
          short_pulse <= 1'b1;
        end else begin
          rejected <= 1'b1;
        end
      end else if (gap < GW'(MINRR)) begin
        gap <= gap + 1'b1;
      end
    end
  end

endmodule
