// adc_controller: reads the external 12-bit serial A/D converter (a TLC2543)
// at the ECG sampling rate fs.
//
// A sample timer gives one conversion request every CLK_HZ / FS_HZ clocks.
// For each request, once the converter reports end of conversion (eoc high),
// the controller pulls cs_n low and runs 12 cycles of the converter's I/O
// clock.  During them it shifts out, MSB first, the 8-bit input word
// {channel[3:0], 2'b00 (12-bit output), 1'b0 (MSB first), 1'b0 (unipolar)}
// followed by four zeros, and shifts in the 12 result bits, sampled at each
// rising edge of the I/O clock (the converter changes its output on the
// falling edge).  The converter returns the result of the conversion started
// by the previous frame, so samples lag by one sampling period.  The
// converter protocol is the TLC2543's; the command word, the clock divider and
// the one-sample lag handling are this design's choices.
//
// Interface: adc_cs_n, adc_sclk, adc_din go to the converter, adc_dout and
// adc_eoc come from it; sample / sample_valid (one-clock pulse) go to the
// wavelet transform.  Timing: an I/O clock period is 2 * SCLK_HALF clocks
// (3.125 MHz at 50 MHz); a frame takes 26 * SCLK_HALF clocks.
module adc_controller
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned FS_HZ     = 800,
  parameter int unsigned SCLK_HALF = 8,
  parameter logic [3:0]  CHANNEL   = 4'd0
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    adc_cs_n,
  output logic    adc_sclk,
  output logic    adc_din,
  input  logic    adc_dout,
  input  logic    adc_eoc,
  output sample_t sample,
  output logic    sample_valid
);

  localparam int unsigned PERIOD = CLK_HZ / FS_HZ;
  localparam int unsigned PW     = cnt_w(PERIOD);
  localparam int unsigned HW     = cnt_w(SCLK_HALF);
  localparam logic [11:0] CMD    = {CHANNEL, 2'b00, 1'b0, 1'b0, 4'b0000};

  typedef enum logic [2:0] {IDLE, SETUP, CLK_LO, CLK_HI, HOLD} state_t;

  state_t        state;
  logic [PW-1:0] period_cnt;
  logic          pending;      // a sampling instant has passed, frame not yet run
  logic [HW-1:0] half_cnt;
  logic [3:0]    bit_idx;
  logic [11:0]   cmd_sh;
  logic [11:0]   data_sh;
  logic          half_done;

  assign half_done = (half_cnt == HW'(SCLK_HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt <= '0;
      pending    <= 1'b0;
    end else begin
      if (period_cnt == PW'(PERIOD - 1)) begin
        period_cnt <= '0;
        pending    <= 1'b1;
      end else begin
        period_cnt <= period_cnt + 1'b1;
        if (state == IDLE && pending && adc_eoc) pending <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      half_cnt     <= '0;
      bit_idx      <= '0;
      cmd_sh       <= '0;
      data_sh      <= '0;
      adc_cs_n     <= 1'b1;
      adc_sclk     <= 1'b0;
      adc_din      <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      half_cnt     <= half_done ? '0 : half_cnt + 1'b1;
      unique case (state)
        IDLE: begin
          half_cnt <= '0;
          if (pending && adc_eoc) begin
            state    <= SETUP;
            adc_cs_n <= 1'b0;
            cmd_sh   <= CMD;
            bit_idx  <= '0;
          end
        end
        SETUP: if (half_done) begin          // CS set-up time, first input bit
          state   <= CLK_LO;
          adc_din <= cmd_sh[11];
          cmd_sh  <= {cmd_sh[10:0], 1'b0};
        end
        CLK_LO: if (half_done) begin         // rising edge: both sides sample
          state    <= CLK_HI;
          adc_sclk <= 1'b1;
          data_sh  <= {data_sh[10:0], adc_dout};
        end
        CLK_HI: if (half_done) begin         // falling edge: next bits
          adc_sclk <= 1'b0;
          if (bit_idx == 4'd11) begin
            state <= HOLD;
          end else begin
            state   <= CLK_LO;
            bit_idx <= bit_idx + 1'b1;
            adc_din <= cmd_sh[11];
            cmd_sh  <= {cmd_sh[10:0], 1'b0};
          end
        end
        HOLD: if (half_done) begin           // end the frame
          state        <= IDLE;
          adc_cs_n     <= 1'b1;
          adc_din      <= 1'b0;
          sample       <= data_sh;
          sample_valid <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
