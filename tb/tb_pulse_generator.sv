// tb_pulse_generator: self-checking test of the fixed-length pulse stretcher.
//
// With LEN_CYCLES = 37 the testbench checks that a trigger gives a pulse that
// starts one clock later and lasts exactly 37 clocks, several times with
// random gaps, and that a trigger during a pulse restarts the length.
module tb_pulse_generator;
  localparam int LEN = 37;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic trig = 1'b0, pulse;
  pulse_generator #(.LEN_CYCLES(LEN)) dut (.clk, .rst_n, .trig, .pulse);

  int checks = 0, failures = 0;

  task automatic measure(int expected, string what);
    int w;
    w = 0;
    @(posedge clk);
    while (pulse) begin w++; @(posedge clk); end
    checks++;
    if (w != expected) begin
      failures++;
      $display("FAIL %s: pulse %0d clocks, expected %0d", what, w, expected);
    end
  endtask

  initial begin
    #1_000_000;
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
    repeat (2) @(posedge clk);
    checks++;
    if (pulse) begin failures++; $display("FAIL pulse high after reset"); end
    for (int k = 0; k < 10; k++) begin
      @(posedge clk);
      trig <= 1'b1;
      @(posedge clk);
      trig <= 1'b0;
      checks++;
      if (pulse) begin failures++; $display("FAIL pulse rose with trigger"); end
      measure(LEN, "single");
      repeat ($urandom_range(20)) @(posedge clk);
    end
    // retrigger 10 clocks into the pulse: total LEN + 10
    @(posedge clk);
    trig <= 1'b1;
    @(posedge clk);
    trig <= 1'b0;
    repeat (9) @(posedge clk);
    trig <= 1'b1;
    @(posedge clk);
    trig <= 1'b0;
    measure(LEN, "after retrigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
