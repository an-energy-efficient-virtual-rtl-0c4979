// vc_buffer: the flit FIFO of one virtual channel, with a power-gate input.
//
// Each input port of a router holds NVC of these, each DEPTH flits deep
// (4 flits of 128 bits by default). A flit is written when `wr` is high and
// read from the head on `rd`; head data is visible combinationally. When
// `pwr_en` is low the buffer models a power-gated SRAM/register file: its
// contents are lost, so the occupancy is cleared and writes are refused.
// The power controller only gates an empty buffer, so nothing valid is lost.
// Timing: write and read take effect on the rising edge; a flit written in
// one cycle is readable in the next. The FIFO organisation is this design's
// choice; the depth and width follow the network configuration.
module vc_buffer #(
  parameter int unsigned W     = 131,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pwr_en,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign rdata = mem[rptr];

  wire do_wr = wr && pwr_en && !full;
  wire do_rd = rd && pwr_en && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (!pwr_en) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr |-> (pwr_en && !full))
    else $error("vc_buffer: write to a full or power-gated VC");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    rd |-> !empty)
    else $error("vc_buffer: read from an empty VC");
endmodule
