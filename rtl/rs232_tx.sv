// rs232_tx: sends every new RR interval out on an RS232 line.
//
// Frame format (this design's choice; the document only says RR intervals go
// out over the serial port): two 8N1 characters, high byte first,
//     byte 0 = {5'b0, rr[10:8]},  byte 1 = rr[7:0]
// at BAUD bits per second.  Each character is a start bit (0), eight data
// bits LSB first and a stop bit (1); the line idles high.  A value that
// arrives while a frame is still being sent is dropped (at the default rate a
// frame takes about 0.2 ms, RR intervals are at least 200 ms apart).
//
// Timing: the start bit of byte 0 begins one clock after rr_valid; each bit
// lasts CLK_HZ / BAUD clocks; busy is high from then to the end of byte 1's
// stop bit.
module rs232_tx
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned RR_W   = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rr_valid,
  input  logic [RR_W-1:0] rr_int,
  output logic            txd,
  output logic            busy
);

  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned BW       = cnt_w(BIT_CLKS);

  logic [15:0]   frame;      // the two bytes still to send, high byte first
  logic [9:0]    shreg;      // start, 8 data, stop of the current character
  logic [3:0]    bit_idx;    // 0..9 within the character
  logic          byte_idx;   // 0: high byte, 1: low byte
  logic [BW-1:0] baud_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame    <= '0;
      shreg    <= '1;
      bit_idx  <= '0;
      byte_idx <= 1'b0;
      baud_cnt <= '0;
      busy     <= 1'b0;
      txd      <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (rr_valid) begin
        frame    <= 16'(rr_int);
        shreg    <= {1'b1, 8'(16'(rr_int) >> 8), 1'b0};
        bit_idx  <= '0;
        byte_idx <= 1'b0;
        baud_cnt <= '0;
        busy     <= 1'b1;
        txd      <= 1'b0;
      end
    end else begin
      if (baud_cnt == BW'(BIT_CLKS - 1)) begin
        baud_cnt <= '0;
        if (bit_idx == 4'd9) begin
          if (!byte_idx) begin
            byte_idx <= 1'b1;
            bit_idx  <= '0;
            shreg    <= {1'b1, frame[7:0], 1'b0};
            txd      <= 1'b0;
          end else begin
            busy <= 1'b0;
            txd  <= 1'b1;
          end
        end else begin
          bit_idx <= bit_idx + 1'b1;
          shreg   <= {1'b1, shreg[9:1]};
          txd     <= shreg[1];
        end
      end else begin
        baud_cnt <= baud_cnt + 1'b1;
      end
    end
  end

endmodule
