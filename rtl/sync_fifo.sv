// sync_fifo: single-clock first-word-fall-through FIFO.
//
// The head word is visible on dout whenever empty is low; pop removes it.
// push writes din at the tail. A push while full and a pop while empty are
// ignored (the callers check full/empty). count gives the occupancy, used by
// the main modules to decide when a whole burst can be written or received.
// DEPTH must be a power of two. Storage is a plain array; the read is
// asynchronous so the head is available in the cycle a request is granted.
// This buffer is not named in the document; it is this design's elastic store
// between the fixed-rate ADC / DSP sides and the bursty SDRAM side.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1024,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic [AW:0]      count,
  output logic             full,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
