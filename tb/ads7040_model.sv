// ads7040_model: behavioural model of one 8-bit serial sampling ADC
// (ADS7040-style) for testbenches; not synthesizable.
//
// On the falling edge of cs_n the model samples `value` and drives the first
// of two leading zeros on sdo; each falling sclk edge while cs_n is low moves
// to the next bit: 0, 0, D7, ..., D0. While cs_n is high sdo is 0. It counts
// the sclk rising edges of every frame: `startup_ok` is set when the first
// frame after power-up had at least 16 of them, `last_clocks` holds the count
// of the last finished frame, `frames` counts finished frames and `latched`
// is the value converted in the current or last frame.
module ads7040_model (
  input  logic       cs_n,
  input  logic       sclk,
  input  logic [7:0] value,
  output logic       sdo,
  output logic       startup_ok,
  output int         last_clocks,
  output int         frames,
  output logic [7:0] latched
);
  logic [9:0] bits;
  int         idx;
  int         clocks;
  bit         in_frame = 1'b0;

  initial begin
    sdo = 1'b0; startup_ok = 1'b0; last_clocks = 0; frames = 0;
    latched = '0; bits = '0; idx = 0; clocks = 0;
  end

  always @(negedge cs_n) begin
    in_frame = 1'b1;
    latched = value;
    bits    = {2'b00, value};
    idx     = 9;
    clocks  = 0;
    sdo     = bits[idx];
  end

  always @(posedge cs_n) if (in_frame) begin
    in_frame = 1'b0;
    if (frames == 0 && clocks >= 16) startup_ok = 1'b1;
    last_clocks = clocks;
    frames++;
    sdo = 1'b0;
  end

  always @(posedge sclk) if (!cs_n) clocks++;

  always @(negedge sclk) begin
    if (!cs_n) begin
      idx = idx - 1;
      sdo = (idx >= 0) ? bits[idx] : 1'b0;
    end
  end
endmodule
