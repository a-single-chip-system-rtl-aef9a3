// tb_ecg_feature_extractor: end-to-end test of the ECG feature extractor at a
// reduced clock (200 kHz instead of 50 MHz) so that about 21 s of ECG - the
// 5 s adaptation, one full 15 s heart-rate window and a beat after it -
// simulate quickly.  All timing inside the design is derived from CLK_HZ, so
// its behaviour in milliseconds is the same as at full speed.  The serial line
// runs at 20 kbit/s and the converter I/O clock at CLK_HZ/4.  Stimulus and
// checks are in ecg_tb_checker.
module tb_ecg_feature_extractor;
  localparam int unsigned CLK_HZ = 200_000;
  localparam int unsigned BAUD   = 20_000;

  logic        clk, rst_n;
  logic        adc_cs_n, adc_sclk, adc_din, adc_dout, adc_eoc;
  logic        pulse_for_qrs, enable_measuring, rr_valid, hr_valid, uart_txd;
  logic [2:0]  pulse_level;
  logic [10:0] rr_int;
  logic [8:0]  hr;
  logic [6:0]  hex0, hex1, hex2;
  logic        done;
  int          checks, failures;

  ecg_feature_extractor #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .SCLK_HALF(2)) dut (.*);

  ecg_tb_checker #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) chk (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 25 s of simulated time
  initial begin
    repeat (25 * CLK_HZ) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
