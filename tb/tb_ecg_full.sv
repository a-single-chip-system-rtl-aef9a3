// tb_ecg_full: full-size test of the ECG feature extractor with every
// parameter at its default (50 MHz clock, 800 Hz sampling, 115200 baud).
//
// One complete pass of the detection path: the 5 s threshold adaptation,
// then beats detected, RR intervals measured and sent on the serial line.
// To keep the run to a few minutes it stops after the second RR value (about
// 5.9 s of ECG, 3e8 clocks) instead of waiting for the first 15 s heart-rate
// window; the heart-rate path is covered by tb_ecg_feature_extractor at a
// reduced clock.  Stimulus and checks are in ecg_tb_checker.
module tb_ecg_full;
  logic        clk, rst_n;
  logic        adc_cs_n, adc_sclk, adc_din, adc_dout, adc_eoc;
  logic        pulse_for_qrs, enable_measuring, rr_valid, hr_valid, uart_txd;
  logic [2:0]  pulse_level;
  logic [10:0] rr_int;
  logic [8:0]  hr;
  logic [6:0]  hex0, hex1, hex2;
  logic        done;
  int          checks, failures;

  ecg_feature_extractor dut (.*);

  ecg_tb_checker #(.CLK_HZ(50_000_000), .BAUD(115_200), .FULL_RUN(1'b0),
                   .FIRST_BEAT_MS(600)) chk (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 7 s of simulated time
  initial begin
    repeat (7 * 50_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
