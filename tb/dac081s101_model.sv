// dac081s101_model: behavioural model of one 8-bit serial DAC
// (DAC081S101-style) for testbenches; not synthesizable.
//
// A falling sync_n starts a frame; din is taken on every falling sclk edge
// while sync_n is low, most significant bit first. After the sixteenth bit
// the output code becomes bits 11..4 of the word and `mode` bits 13..12;
// `writes` counts complete frames and `bad_frames` frames that ended (sync_n
// rising) with a bit count other than 16.
module dac081s101_model (
  input  logic       sclk,
  input  logic       sync_n,
  input  logic       din,
  output logic [7:0] code,
  output logic [1:0] mode,
  output int         writes,
  output int         bad_frames
);
  logic [15:0] sh;
  int          n;
  bit          in_frame = 1'b0;

  initial begin
    code = '0; mode = '0; writes = 0; bad_frames = 0; sh = '0; n = 0;
  end

  always @(negedge sync_n) begin n = 0; in_frame = 1'b1; end

  always @(negedge sclk) begin
    if (!sync_n && n < 16) begin
      sh = {sh[14:0], din};
      n++;
      if (n == 16) begin
        code = sh[11:4];
        mode = sh[13:12];
        writes++;
      end
    end
  end

  always @(posedge sync_n) if (in_frame) begin
    in_frame = 1'b0;
    if (n != 16) bad_frames++;
  end
endmodule
