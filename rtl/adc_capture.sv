// adc_capture: takes one ADC sample on every rising clock edge while
// acquisition is enabled and queues it for the SDRAM writer.
//
// The 12-bit ADC word (after the LVDS input buffers) is registered in an input
// stage together with a valid flag, acq_en AND adc_valid, zero-extended to the
// 16-bit SDRAM word and pushed into an elastic FIFO on the next clock. The
// FIFO rides out the cycles in which the SDRAM cannot take data (refresh,
// row activation, a switch to another SDRAM). If a sample arrives while the
// FIFO is full it is dropped, lost_cnt counts it and overrun stays set until
// reset, so a lossless run can be proven from the outside.
//
// adc_valid marks clocks that carry a new sample; tie it high when the ADC
// delivers a word on every clock edge, as in the document, or drive it from
// the ADC's data-ready when the sample rate is below the system clock.
// Interface: the read side is first-word-fall-through (dout valid while
// !empty, pop consumes); count is the occupancy; busy is high while a sample
// sits in the input stage and has not yet reached the FIFO.
// Timing: a sample on adc_data at edge n appears in the FIFO after edge n+1.
//
// From the document: one sample per positive clock edge from a 12-bit ADC.
// This design's own choices: one clock domain for ADC and SDRAM side, the
// adc_valid qualifier,
// zero-extension to 16 bits, the FIFO and its depth, the loss counter.
module adc_capture
  import das_pkg::*;
#(
  parameter int FIFO_DEPTH = 1024,
  localparam int CW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acq_en,
  input  logic              adc_valid,
  input  logic [ADC_W-1:0]  adc_data,
  input  logic              pop,
  output logic [DATA_W-1:0] dout,
  output logic [CW-1:0]     count,
  output logic              empty,
  output logic              busy,
  output logic [31:0]       lost_cnt,
  output logic              overrun
);
  logic [ADC_W-1:0] in_q;
  logic             in_v;
  logic             full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q <= '0;
      in_v <= 1'b0;
    end else begin
      in_q <= adc_data;
      in_v <= acq_en && adc_valid;
    end
  end

  assign busy = in_v;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push  (in_v),
    .din   (DATA_W'(in_q)),
    .pop,
    .dout,
    .count,
    .full,
    .empty
  );

  // A sample that meets a full FIFO is dropped and counted.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lost_cnt <= '0;
      overrun  <= 1'b0;
    end else if (in_v && full) begin
      lost_cnt <= lost_cnt + 1'b1;
      overrun  <= 1'b1;
    end
  end
endmodule
