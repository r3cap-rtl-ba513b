// axi_regs: AXI4-Lite register bank through which the processor reads one
// array's correlation matrix.
//
// The ten 112-bit matrix entries and a ready flag need 1121 bits, which is
// 36 32-bit registers:
//   word 0      bit 0: ready, set when a new matrix arrives, cleared by
//               writing word 0 with bit 0 set; other bits read as zero
//   words 1-35  the entries r11 r12 r13 r14 r22 r23 r24 r33 r34 r44 packed
//               back to back, r11 first, least significant word first: word
//               k holds bits 32(k-1)+31 .. 32(k-1) of the 1120-bit string
//               {r44, ..., r12, r11}. Within an entry the real part is the
//               upper 56 bits and the imaginary part the lower 56.
// Byte address = 4 * word. A new matrix replaces the whole bank on `r_new`;
// the processor has 1.024 ms to read it before the next one arrives.
//
// AXI4-Lite: one transaction at a time per channel. A read is accepted when
// no read data is waiting and answered in the next clock; a write is accepted
// when address and data are both valid and no response is waiting. Reads of
// words past 35 return zero with SLVERR; writes to words other than 0 are
// ignored (OKAY), so bresp is constant. Register count and content follow the system description;
// the bit packing, the ready-flag clearing rule and the error responses are
// this design's choices.
module axi_regs
  import r3cap_pkg::*;
#(
  parameter int unsigned NE = N_ENTRIES
) (
  input  logic                clk,
  input  logic                rst_n,
  input  entry_t [NE-1:0]     r,
  input  logic                r_new,
  input  axil_req_t           req,
  output axil_rsp_t           rsp
);

  localparam int unsigned NBITS  = NE * ENTRY_W;
  localparam int unsigned NWORDS = (NBITS + 31) / 32 + 1;   // 36

  logic [NWORDS*32-33:0] bank;   // words 1.. NWORDS-1
  logic                  ready;
  logic [AXI_AW-3:0]     rword, wword;
  logic                  aw_fire, ar_fire;
  logic                  bvalid, rvalid;
  logic [1:0]            bresp, rresp;
  logic [31:0]           rdata;

  assign rword   = req.araddr[AXI_AW-1:2];
  assign wword   = req.awaddr[AXI_AW-1:2];
  assign aw_fire = req.awvalid && req.wvalid && !bvalid;
  assign ar_fire = req.arvalid && !rvalid;

  always_comb begin
    rsp         = '0;
    rsp.awready = aw_fire;
    rsp.wready  = aw_fire;
    rsp.arready = ar_fire;
    rsp.bvalid  = bvalid;
    rsp.bresp   = bresp;
    rsp.rvalid  = rvalid;
    rsp.rdata   = rdata;
    rsp.rresp   = rresp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank      <= '0;
      ready     <= 1'b0;
      bvalid <= 1'b0;
      bresp  <= 2'b00;
      rvalid <= 1'b0;
      rdata  <= '0;
      rresp  <= 2'b00;
    end else begin
      if (r_new) begin
        bank  <= (NWORDS*32-32)'(r);
        ready <= 1'b1;
      end else if (aw_fire && wword == '0 && req.wstrb[0] && req.wdata[0]) begin
        ready <= 1'b0;
      end

      if (aw_fire) begin
        bvalid <= 1'b1;
        bresp  <= 2'b00;
      end else if (req.bready) begin
        bvalid <= 1'b0;
      end

      if (ar_fire) begin
        rvalid <= 1'b1;
        rresp  <= 2'b00;
        if (rword == '0)
          rdata <= {31'd0, ready};
        else if (32'(rword) < NWORDS)
          rdata <= bank[32*(32'(rword)-1) +: 32];
        else begin
          rdata <= '0;
          rresp <= 2'b10;
        end
      end else if (req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // handshake rules: a response stays until it is taken
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  rvalid && !req.rready |=> rvalid && $stable(rdata));
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  bvalid && !req.bready |=> bvalid);

endmodule
