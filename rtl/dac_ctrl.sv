// dac_ctrl: serial writer for the DAC081S101-style 8-bit gain DACs of one
// receiver array.
//
// All DACs of an array share one serial clock (sclk) and one frame sync
// (sync_n); every DAC has its own data line (din), so one 16-bit frame writes
// all of them at once. The frame is DB15 first: two unused zero bits, two
// power-down bits (00, normal operation), the 8-bit code in DB11..DB4 and four
// unused zero bits. The DAC takes a bit on each falling sclk edge and
// updates its output after the sixteenth.
//
// Timing: a serial clock period is SCLK_DIV fabric clocks, high for the first
// half and low for the second; din changes at the start of a period, half a
// period before the falling edge that samples it. sclk idles high. A write:
// sync_n falls with the first bit, 16 periods follow, then sync_n rises and
// stays high for at least SYNC_HIGH clocks before the next frame. With the
// default SCLK_DIV of 4 (25 MHz) a write takes 66 clocks.
//
// Interface: `load` with `codes` (one 8-bit code per DAC) requests a write;
// a request that arrives during a frame is kept and sent next, with the codes
// present at `load`. `busy` is high from the request until sync_n rises.
// The shared sclk/sync_n, the separate data lines and the 16-bit frame follow
// the system description; the clock rate, idle levels and request buffering
// are this design's choices.
module dac_ctrl
  import r3cap_pkg::*;
#(
  parameter int unsigned N_CH      = N_DAC,
  parameter int unsigned SCLK_DIV  = 4,
  parameter int unsigned SYNC_HIGH = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N_CH-1:0][7:0]  codes,
  output logic                  busy,
  // DAC pins
  output logic                  sclk,
  output logic                  sync_n,
  output logic [N_CH-1:0]       din
);

  localparam int unsigned PW = $clog2(SCLK_DIV) + 1;
  localparam int unsigned HW = $clog2(SYNC_HIGH) + 1;

  typedef enum logic [1:0] {IDLE, SHIFT, GAP} state_e;
  state_e state;

  logic [N_CH-1:0][15:0] word;      // frames being sent
  logic [N_CH-1:0][7:0]  pend_codes;
  logic                  pend;
  logic [3:0]            bitn;      // bit being sent, 15 down to 0
  logic [PW-1:0]         ph;        // phase inside a serial clock period
  logic [HW-1:0]         gap;

  function automatic logic [15:0] frame(input logic [7:0] code);
    return {4'b0000, code, 4'b0000};
  endfunction

  assign busy = pend || state != IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      word       <= '0;
      pend_codes <= '0;
      pend       <= 1'b0;
      bitn       <= '0;
      ph         <= '0;
      gap        <= '0;
      sclk       <= 1'b1;
      sync_n     <= 1'b1;
      din        <= '0;
    end else begin
      if (load) begin
        pend       <= 1'b1;
        pend_codes <= codes;
      end
      unique case (state)
        IDLE: begin
          sclk <= 1'b1;
          if (pend) begin
            for (int c = 0; c < N_CH; c++) begin
              word[c] <= frame(pend_codes[c]);
              din[c]  <= frame(pend_codes[c])[15];
            end
            if (!load) pend <= 1'b0;
            sync_n <= 1'b0;
            bitn   <= 4'd15;
            ph     <= '0;
            state  <= SHIFT;
          end
        end
        SHIFT: begin
          if (ph == PW'(SCLK_DIV - 1)) begin
            ph <= '0;
            if (bitn == 4'd0) begin
              sclk   <= 1'b1;
              sync_n <= 1'b1;
              gap    <= '0;
              state  <= GAP;
            end else begin
              bitn <= bitn - 4'd1;
              sclk <= 1'b1;
              for (int c = 0; c < N_CH; c++) din[c] <= word[c][bitn - 4'd1];
            end
          end else begin
            ph <= ph + 1'b1;
            if (ph == PW'(SCLK_DIV / 2 - 1)) sclk <= 1'b0;
          end
        end
        GAP: begin
          din <= '0;
          if (gap == HW'(SYNC_HIGH - 1)) state <= IDLE;
          else gap <= gap + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
