// tb_adc_controller: self-checking test of the serial A/D converter
// controller, run against the tlc2543_model converter model.
//
// CLK_HZ = 1 MHz and FS_HZ = 1 kHz give 1000 clocks per sample.  The
// testbench sets a new random analog code before every frame and checks that
// each sample delivered equals the code set for the previous frame (the
// converter returns the previous conversion), that samples come exactly 1000
// clocks apart, that the command word selects channel 0, 12-bit, MSB-first,
// unipolar, and that the I/O clock stays within the TLC2543's 4.1 MHz.
module tb_adc_controller;
  import ecg_pkg::*;

  localparam int CLK_HZ = 1_000_000;
  localparam int FS_HZ  = 1_000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic cs_n, sclk, din, dout, eoc;
  logic [11:0] code = '0;
  logic [7:0]  last_cmd;
  int          frames;
  sample_t     sample;
  logic        sample_valid;

  adc_controller #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .SCLK_HALF(2)) dut (
    .clk, .rst_n,
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_din(din), .adc_dout(dout), .adc_eoc(eoc),
    .sample, .sample_valid
  );

  tlc2543_model u_adc (
    .cs_n, .sclk, .din, .dout, .eoc, .analog_code(code), .last_cmd, .frames
  );

  int checks = 0, failures = 0, n_samp = 0;
  int codes [$];
  longint cyc = 0, last_t = -1;
  bit started = 1'b0;

  // a new analog value for every frame, taken when cs_n falls
  always @(negedge cs_n) begin
    code = 12'($urandom);
    codes.push_back(int'(code));
  end

  always @(posedge clk) begin
    cyc++;
    if (started && sample_valid) begin
      n_samp++;
      if (n_samp > 1) begin
        int e;
        e = codes.pop_front();
        checks++;
        if (int'(sample) != e) begin
          failures++;
          $display("FAIL sample %0d = %03x, expected %03x", n_samp, sample, e);
        end
        checks++;
        if (cyc - last_t != CLK_HZ / FS_HZ) begin
          failures++;
          $display("FAIL sample spacing %0d clocks", cyc - last_t);
        end
      end
      last_t = cyc;
      checks++;
      if (last_cmd != 8'b0000_0000) begin
        failures++;
        $display("FAIL command word %b", last_cmd);
      end
    end
  end

  // shape of the I/O clock: each high phase lasts SCLK_HALF = 2 clocks
  int hi_len = 0;
  always @(posedge clk) if (started) begin
    if (sclk) hi_len++; else if (hi_len != 0) begin
      checks++;
      if (hi_len != 2) begin failures++; $display("FAIL I/O clock high for %0d clocks", hi_len); end
      hi_len = 0;
    end
  end

  initial begin
    #50_000_000;
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
    while (n_samp < 40) @(posedge clk);
    checks++;
    if (frames != 40) begin failures++; $display("FAIL %0d frames for 40 samples", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
