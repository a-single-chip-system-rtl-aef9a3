// tb_qrs_fsm: self-checking test of the QRS recognition state machine.
//
// With a 20-sample adaptation, the testbench checks that: events during
// adaptation are ignored and enable_measuring stays low for exactly 20 level
// samples; min -> zc -> max gives one qrs_detected pulse one clock after max;
// max alone, min -> max without a crossing, and zc -> max without a minimum
// give none; a minimum and a crossing in the same clock followed by a maximum
// count as a QRS; repeated minima before the crossing do not matter.
module tb_qrs_fsm;
  import ecg_pkg::*;

  localparam int INIT = 20;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic sample_valid = 1'b0, mn = 1'b0, zc = 1'b0, mx = 1'b0;
  logic qrs, en;

  qrs_fsm #(.INIT_SAMPLES(INIT)) dut (
    .clk, .rst_n, .sample_valid,
    .min_detected(mn), .zc_detected(zc), .max_detected(mx),
    .qrs_detected(qrs), .enable_measuring(en)
  );

  int checks = 0, failures = 0, n_qrs = 0;
  bit started = 1'b0;

  always @(posedge clk) if (started && qrs) n_qrs++;

  task automatic ev(bit m, bit z, bit x);
    @(posedge clk);
    mn <= m; zc <= z; mx <= x;
    @(posedge clk);
    mn <= 1'b0; zc <= 1'b0; mx <= 1'b0;
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_qrs(int n, string what);
    checks++;
    if (n_qrs != n) begin
      failures++;
      $display("FAIL %s: %0d QRS so far, expected %0d", what, n_qrs, n);
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
    started = 1'b1;
    // adaptation: a full sequence of events must be ignored
    for (int k = 0; k < INIT; k++) begin
      checks++;
      if (en) begin failures++; $display("FAIL enable high during adaptation"); end
      if (k == 5) ev(1, 0, 0);
      if (k == 6) ev(0, 1, 0);
      if (k == 7) ev(0, 0, 1);
      @(posedge clk);
      sample_valid <= 1'b1;
      @(posedge clk);
      sample_valid <= 1'b0;
      @(posedge clk);
    end
    @(posedge clk);
    checks++;
    if (!en) begin failures++; $display("FAIL enable low after adaptation"); end
    expect_qrs(0, "adaptation");
    // proper sequence and its latency
    ev(1, 0, 0); ev(0, 1, 0);
    @(posedge clk);
    mx <= 1'b1;
    @(posedge clk);
    mx <= 1'b0;
    @(posedge clk);
    checks++;
    if (!qrs) begin failures++; $display("FAIL qrs_detected not one clock after max"); end
    repeat (3) @(posedge clk);
    expect_qrs(1, "min-zc-max");
    ev(0, 0, 1);                        expect_qrs(1, "max alone");
    ev(1, 0, 0); ev(0, 0, 1);           expect_qrs(1, "min-max");
    ev(0, 1, 0); ev(0, 0, 1);           expect_qrs(2, "zc-max after pending min");
    ev(0, 1, 0); ev(0, 0, 1);           expect_qrs(2, "zc-max without min");
    ev(1, 1, 0); ev(0, 0, 1);           expect_qrs(3, "min+zc together then max");
    ev(1, 0, 0); ev(1, 0, 0); ev(0, 1, 0); ev(0, 0, 1);
                                        expect_qrs(4, "two minima");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
