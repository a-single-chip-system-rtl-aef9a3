// tb_rr_hr_calculator: self-checking test of the RR-interval and heart-rate
// counters.
//
// CLK_HZ = 10 kHz (1 ms = 10 clocks) and the document's 15 s window.  After
// enable_measuring rises, Short_pulses are sent at known times: first every
// 700 ms, then every 900 ms, then one 2500 ms gap.  The testbench checks each
// latched RR value against the time since the previous pulse (to within the
// 1 ms resolution; 2047 for the long gap, where the counter saturates), that
// HR after each 15 s window equals four times the number of pulses in that
// window, that nothing counts while enable is low, and that rr_valid and
// hr_valid are one clock wide.
module tb_rr_hr_calculator;
  localparam int CLK_HZ = 10_000;
  localparam int MS = CLK_HZ / 1000;
  localparam int WIN = 15_000 * MS;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic en = 1'b0, sp = 1'b0;
  logic [10:0] rr_int;
  logic [8:0]  hr;
  logic        rr_valid, hr_valid;

  rr_hr_calculator #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .enable_measuring(en), .short_pulse(sp),
    .rr_int, .rr_valid, .hr, .hr_valid
  );

  int checks = 0, failures = 0;
  longint cyc = 0, en_cyc = 0, last_sp = 0;
  int pulses_in_win [8];
  int n_hr = 0, exp_rr = 0, n_rr = 0;
  bit prev_rrv = 0, prev_hrv = 0;

  always @(posedge clk) begin
    cyc++;
    if (rr_valid) begin
      n_rr++;
      checks++;
      if (n_rr > 1 && (int'(rr_int) < exp_rr - 1 || int'(rr_int) > exp_rr)) begin
        failures++;
        $display("FAIL RR %0d ms, expected %0d", rr_int, exp_rr);
      end
    end
    if (hr_valid) begin
      checks++;
      if (int'(hr) != 4 * pulses_in_win[n_hr]) begin
        failures++;
        $display("FAIL HR %0d in window %0d, expected %0d", hr, n_hr, 4 * pulses_in_win[n_hr]);
      end
      n_hr++;
    end
    if ((rr_valid && prev_rrv) || (hr_valid && prev_hrv)) begin
      failures++;
      $display("FAIL valid strobe wider than one clock");
    end
    prev_rrv = rr_valid;
    prev_hrv = hr_valid;
  end

  task automatic beat_after(int ms);
    repeat (ms * MS - 1) @(posedge clk);
    sp <= 1'b1;
    exp_rr = (n_rr_pulses() == 0) ? 0 : ((cyc - last_sp) / MS > 2047 ? 2047 : int'((cyc - last_sp) / MS));
    last_sp = cyc;
    pulses_in_win[int'((cyc - en_cyc) / WIN)]++;
    @(posedge clk);
    sp <= 1'b0;
  endtask

  int np = 0;
  function automatic int n_rr_pulses();
    return np++;
  endfunction

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pulses_in_win[k]) pulses_in_win[k] = 0;
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // pulses while disabled are ignored
    repeat (20) begin
      repeat (50) @(posedge clk);
      sp <= 1'b1;
      @(posedge clk);
      sp <= 1'b0;
    end
    checks++;
    if (n_rr != 0 || rr_int != 0 || hr != 0) begin
      failures++;
      $display("FAIL counted while enable was low");
    end
    @(posedge clk);
    en <= 1'b1;
    en_cyc = cyc + 1;
    for (int k = 0; k < 25; k++) beat_after(700);
    for (int k = 0; k < 15; k++) beat_after(900);
    beat_after(2500);
    for (int k = 0; k < 10; k++) beat_after(800);
    while (n_hr < 3) @(posedge clk);
    checks++;
    if (n_rr != 51) begin failures++; $display("FAIL %0d RR values, expected 51", n_rr); end
    $display("HR windows: %0d %0d %0d", pulses_in_win[0], pulses_in_win[1], pulses_in_win[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
