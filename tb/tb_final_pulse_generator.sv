// tb_final_pulse_generator: self-checking test of the 200 ms rule and of the
// Pulse_for_QRS / Short_pulse outputs.
//
// CLK_HZ = 10 kHz makes 1 ms ten clocks: Pulse_for_QRS must last 200 clocks
// (20 ms) and OR_gate_pulse edges closer than 2000 clocks (200 ms) to the
// previous edge must be rejected.  The testbench sends 30 ms OR pulses at
// chosen gaps (first edge, 100 ms, 199.9 ms, exactly 200 ms, 600 ms, a gap
// measured from a rejected edge) and checks each accept/reject decision,
// the pulse length, that Short_pulse is one clock wide and that both rise one
// clock after the OR edge.
module tb_final_pulse_generator;
  localparam int CLK_HZ = 10_000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic or_pulse = 1'b0;
  logic pfq, sp, rej;

  final_pulse_generator #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .or_pulse, .pulse_for_qrs(pfq), .short_pulse(sp), .rejected(rej)
  );

  int checks = 0, failures = 0;
  int n_short = 0, n_rej = 0, pfq_len = 0;
  bit started = 1'b0;

  always @(posedge clk) if (started) begin
    if (sp)  n_short++;
    if (rej) n_rej++;
  end

  // send an OR pulse whose rising edge comes `gap` clocks after the previous one
  task automatic send(int gap, bit accept, string what);
    int s0, r0, w;
    repeat (gap) @(posedge clk);
    s0 = n_short; r0 = n_rej;
    or_pulse <= 1'b1;
    @(posedge clk);            // edge reaches the block here
    @(posedge clk);
    checks++;
    if (sp !== accept || pfq !== accept || rej !== !accept) begin
      failures++;
      $display("FAIL %s: short=%0b pulse=%0b rejected=%0b, expected accept=%0b", what, sp, pfq, rej, accept);
    end
    w = 0;
    for (int k = 0; k < 300; k++) begin
      if (k == 298) or_pulse <= 1'b0;
      if (pfq) w++;
      @(posedge clk);
    end
    checks++;
    if (w != (accept ? 200 : 0)) begin
      failures++;
      $display("FAIL %s: Pulse_for_QRS %0d clocks", what, w);
    end
    checks++;
    if (n_short - s0 != int'(accept) || n_rej - r0 != int'(!accept)) begin
      failures++;
      $display("FAIL %s: %0d short pulses, %0d rejections", what, n_short - s0, n_rej - r0);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1'b1;
    repeat (10) @(posedge clk);
    // each send() uses 302 clocks after the edge; gaps are edge to edge
    send(1,    1'b1, "first");
    send(1000 - 302, 1'b0, "100 ms");
    send(1999 - 302, 1'b0, "199.9 ms after a rejected edge");
    send(2000 - 302, 1'b1, "200 ms");
    send(6000 - 302, 1'b1, "600 ms");
    send(1500 - 302, 1'b0, "150 ms");
    send(2100 - 302, 1'b1, "210 ms after the rejected edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
