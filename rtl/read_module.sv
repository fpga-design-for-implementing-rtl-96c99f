// read_module: hands stored samples from the SDRAM being read to the DSP.
//
// The SDRAM side delivers words in bursts at the memory clock; the DSP takes
// them more slowly, one word per cycle in which it raises dsp_ready. The read
// module selects the sink port of the main module currently reading
// (rd_sel, from the main module controller), stores its words with their
// end-of-buffer flag in an output FIFO, and offers the FIFO head to the DSP
// with a valid/ready handshake. `space` tells the main modules how many
// words the FIFO can still take, so they only request bursts that fit and no
// word is ever dropped. words_out counts words handed to the DSP.
//
// Interface: snk_* are per-main-module arrays; dsp_valid/dsp_ready transfer a
// word on every clock edge where both are high; dsp_last marks the last word
// of a buffer. Timing: a word pushed at edge n is offered from edge n on.
//
// From the document: data read at a slower speed and transferred to a DSP.
// This design's own: the FIFO, its depth, the handshake and the last flag.
module read_module
  import das_pkg::*;
#(
  parameter int FIFO_DEPTH = 512,
  localparam int CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(NBUF)-1:0]     rd_sel,
  input  logic [NBUF-1:0]             snk_push,
  input  logic [NBUF-1:0][DATA_W-1:0] snk_data,
  input  logic [NBUF-1:0]             snk_last,
  output logic [CW-1:0]               space,
  output logic [DATA_W-1:0]           dsp_data,
  output logic                        dsp_last,
  output logic                        dsp_valid,
  input  logic                        dsp_ready,
  output logic [31:0]                 words_out
);
  logic [CW-1:0] count;
  logic          full, empty, push, pop;
  logic [DATA_W:0] din, dout;

  assign push = snk_push[rd_sel];
  assign din  = {snk_last[rd_sel], snk_data[rd_sel]};
  assign pop  = dsp_valid && dsp_ready;

  sync_fifo #(.WIDTH(DATA_W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .din, .pop, .dout, .count, .full, .empty
  );

  assign space     = CW'(FIFO_DEPTH) - count;
  assign dsp_valid = !empty;
  assign dsp_data  = dout[DATA_W-1:0];
  assign dsp_last  = dout[DATA_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   words_out <= '0;
    else if (pop) words_out <= words_out + 1'b1;
  end

  // Flow control upstream must never overfill the FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
endmodule
