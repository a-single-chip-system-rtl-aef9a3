// tlc2543_model: behavioural model of a TLC2543 12-bit serial A/D converter,
// for testbenches only (not synthesizable).
//
// While cs_n is low the model shifts in the input word on rising edges of
// sclk (the first eight bits are kept as the last command) and shifts out the
// result of the previous conversion MSB first, its first bit appearing when
// cs_n falls and the next ones after each falling sclk edge.  At the twelfth
// falling edge it samples `analog_code` (the code the analog input would give)
// as the next result and pulls eoc low; eoc returns high when cs_n rises,
// standing in for the few microseconds a real conversion takes.  Timing
// parameters of the real part are not modelled.
module tlc2543_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  output logic        eoc,
  input  logic [11:0] analog_code,
  output logic [7:0]  last_cmd,
  output int          frames
);
  logic [11:0] result = 12'd0;
  logic [11:0] out_sh = 12'd0;
  logic [11:0] in_sh  = 12'd0;
  int          nclk   = 0;

  initial begin
    dout     = 1'b0;
    eoc      = 1'b1;
    last_cmd = 8'd0;
    frames   = 0;
  end

  always @(negedge cs_n) begin
    out_sh = result;
    dout   = result[11];
    nclk   = 0;
  end

  always @(posedge cs_n) eoc = 1'b1;

  always @(posedge sclk) if (!cs_n) begin
    in_sh = {in_sh[10:0], din};
    nclk++;
  end

  always @(negedge sclk) if (!cs_n) begin
    out_sh = {out_sh[10:0], 1'b0};
    dout   = out_sh[11];
    if (nclk == 12) begin
      result   = analog_code;
      last_cmd = in_sh[11:4];
      eoc      = 1'b0;
      frames++;
    end
  end
endmodule
