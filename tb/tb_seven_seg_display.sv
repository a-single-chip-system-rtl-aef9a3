// tb_seven_seg_display: self-checking test of the heart-rate display.
//
// Every value 0..511 is applied; one clock later the three displays must
// show its hundreds, tens and units.  The expected digits come from / and %,
// and the expected segments from a table of lit segments per digit written
// here as strings of segment letters, independently of the block's code.
module tb_seven_seg_display;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [8:0] hr = '0;
  logic [6:0] hex0, hex1, hex2;

  seven_seg_display dut (.clk, .rst_n, .hr, .hex0, .hex1, .hex2);

  int checks = 0, failures = 0;

  // segments lit for each digit
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic logic [6:0] expect_seg(int dgt);
    logic [6:0] s;
    s = 7'b1111111;                    // active low: 1 = dark
    for (int i = 0; i < lit[dgt].len(); i++) s[lit[dgt][i] - "a"] = 1'b0;
    return s;
  endfunction

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
    for (int v = 0; v < 512; v++) begin
      @(posedge clk);
      hr <= 9'(v);
      @(posedge clk);
      @(posedge clk);
      checks++;
      if (hex0 !== expect_seg(v % 10) || hex1 !== expect_seg((v / 10) % 10) ||
          hex2 !== expect_seg(v / 100)) begin
        failures++;
        $display("FAIL %0d shown as %b %b %b", v, hex2, hex1, hex0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
