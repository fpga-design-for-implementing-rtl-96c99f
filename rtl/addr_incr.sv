// addr_incr: address increment module of one main module.
//
// Holds the local-bus word address RADDR for the next burst and advances it by
// the size of every burst the SDRAM controller accepts, so the main module
// never computes addresses itself. It also proposes the size of the next
// burst: the requested burst size, cut so the burst neither runs past `limit`
// (the end of the buffer, or the number of words to read back) nor crosses a
// boundary of the programmed SDRAM burst length. SDRAM bursts wrap inside a
// block of BL columns, so a burst crossing such a boundary would land on the
// wrong columns.
//
// Interface: clear returns the address to zero (start of a buffer); advance
// adds `step` (the size of the burst just acknowledged). remaining =
// limit - addr; at_end is high once addr has reached limit.
// Timing: addr updates on the edge after clear/advance; burst, remaining and
// at_end are combinational from addr and the inputs.
//
// From the document: automatic address incrementing, address width
// RADDR[30:0], burst sizes 1..BL with BL of 1, 2, 4 or 8. Cutting bursts at
// the limit and at BL boundaries is this design's own rule.
module addr_incr
  import das_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              advance,
  input  logic [BSZ_W-1:0]  step,
  input  logic [ADDR_W-1:0] limit,
  input  logic [BSZ_W-1:0]  bsize,    // requested burst size, 1..8
  input  logic [1:0]        bl_code,  // programmed burst length code
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] remaining,
  output logic [BSZ_W-1:0]  burst,
  output logic              at_end
);
  logic [BSZ_W-1:0] bl_words, to_boundary, b0;
  logic [2:0]       offs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr <= '0;
    else if (clear)   addr <= '0;
    else if (advance) addr <= addr + ADDR_W'(step);
  end

  always_comb begin
    bl_words    = BSZ_W'(1) << bl_code;
    // Offset of addr inside its BL-aligned block.
    offs        = addr[2:0] & 3'(bl_words - 1'b1);
    to_boundary = bl_words - BSZ_W'(offs);
    remaining   = (addr >= limit) ? '0 : limit - addr;
    at_end      = (remaining == '0);
    b0          = (bsize == '0) ? BSZ_W'(1) : bsize;
    if (b0 > to_boundary) b0 = to_boundary;
    if (ADDR_W'(b0) > remaining) b0 = BSZ_W'(remaining);
    burst       = b0;
  end
endmodule
