// tb_rs232_tx: self-checking test of the RR-interval serial sender.
//
// CLK_HZ = 1 MHz and BAUD = 100 kbit/s give 10 clocks per bit.  The testbench
// holds a serial receiver that finds each start bit, samples in the middle of
// every bit and checks the stop bit; for each random RR value sent it expects
// two characters, {5'b0, rr[10:8]} then rr[7:0].  It also checks the bit
// period, that the line idles high, and that a value offered while busy is
// dropped.
module tb_rs232_tx;
  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 100_000;
  localparam int BITC   = CLK_HZ / BAUD;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic        rr_valid = 1'b0;
  logic [10:0] rr_int = '0;
  logic        txd, busy;

  rs232_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .rr_valid, .rr_int, .txd, .busy);

  int checks = 0, failures = 0;
  int rx_q [$];
  bit started = 1'b0;

  // receiver
  initial begin
    logic [7:0] b;
    forever begin
      @(posedge clk);
      if (started && txd === 1'b0) begin
        repeat (BITC / 2) @(posedge clk);
        checks++;
        if (txd !== 1'b0) begin failures++; $display("FAIL start bit too short"); end
        for (int i = 0; i < 8; i++) begin
          repeat (BITC) @(posedge clk);
          b[i] = txd;
        end
        repeat (BITC) @(posedge clk);
        checks++;
        if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
        rx_q.push_back(int'(b));
      end
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, hi, lo, t0;
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (txd !== 1'b1) begin failures++; $display("FAIL line not idle high"); end
    for (int k = 0; k < 20; k++) begin
      v = (k == 0) ? 2047 : (k == 1) ? 0 : int'($urandom_range(2047));
      @(posedge clk);
      rr_valid <= 1'b1;
      rr_int <= 11'(v);
      @(posedge clk);
      rr_valid <= 1'b0;
      @(posedge clk);
      t0 = 0;
      if (k == 3) begin            // offered while busy: must be dropped
        repeat (30) @(posedge clk);
        t0 = 31;
        rr_valid <= 1'b1;
        rr_int <= 11'(v ^ 11'h555);
        @(posedge clk);
        rr_valid <= 1'b0;
      end
      while (busy) begin t0++; @(posedge clk); end
      checks++;
      if (k != 3 && t0 != 20 * BITC) begin
        failures++;
        $display("FAIL frame took %0d clocks, expected %0d", t0, 20 * BITC);
      end
      repeat (3 * BITC) @(posedge clk);
      checks++;
      if (rx_q.size() != 2) begin
        failures++;
        $display("FAIL received %0d characters, expected 2", rx_q.size());
        rx_q.delete();
      end else begin
        hi = rx_q.pop_front();
        lo = rx_q.pop_front();
        if (hi != (v >> 8) || lo != (v & 255)) begin
          failures++;
          $display("FAIL received %02x %02x for %0d", hi, lo, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
