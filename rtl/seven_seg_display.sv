// seven_seg_display: shows the heart rate (0..511 beats/min) as three decimal
// digits on common-anode seven-segment displays.
//
// The binary value is converted to BCD with the shift-and-add-3 (double
// dabble) method, written as a combinational loop, and each digit is decoded
// into segments {g,f,e,d,c,b,a}, active low (a segment is lit by a 0).  The
// segment outputs are registered.  The document only says HR is shown on
// 7-segment displays; the code, polarity and digit count are this design's.
//
// Timing: the displays follow hr one clock later.
module seven_seg_display
  import ecg_pkg::*;
#(
  parameter int unsigned HR_W = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [HR_W-1:0] hr,
  output logic [6:0]      hex0,   // units
  output logic [6:0]      hex1,   // tens
  output logic [6:0]      hex2    // hundreds
);

  logic [11:0] bcd;

  function automatic logic [6:0] seg(input logic [3:0] dgt);
    unique case (dgt)
      4'd0: seg = 7'b1000000;
      4'd1: seg = 7'b1111001;
      4'd2: seg = 7'b0100100;
      4'd3: seg = 7'b0110000;
      4'd4: seg = 7'b0011001;
      4'd5: seg = 7'b0010010;
      4'd6: seg = 7'b0000010;
      4'd7: seg = 7'b1111000;
      4'd8: seg = 7'b0000000;
      4'd9: seg = 7'b0010000;
      default: seg = 7'b1111111;
    endcase
  endfunction

  always_comb begin
    bcd = '0;
    for (int i = HR_W - 1; i >= 0; i--) begin
      if (bcd[3:0]  >= 4'd5) bcd[3:0]  = bcd[3:0]  + 4'd3;
      if (bcd[7:4]  >= 4'd5) bcd[7:4]  = bcd[7:4]  + 4'd3;
      if (bcd[11:8] >= 4'd5) bcd[11:8] = bcd[11:8] + 4'd3;
      bcd = {bcd[10:0], hr[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hex0 <= 7'b1111111;
      hex1 <= 7'b1111111;
      hex2 <= 7'b1111111;
    end else begin
      hex0 <= seg(bcd[3:0]);
      hex1 <= seg(bcd[7:4]);
      hex2 <= seg(bcd[11:8]);
    end
  end

endmodule
