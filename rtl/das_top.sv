// das_top: FPGA data-acquisition system that streams ADC samples into three
// SDRAMs and reads them back to a DSP.
//
// Samples from a 12-bit ADC (after the LVDS input buffers) are taken on every
// clock while acq_en is high and queued by adc_capture. Three main modules,
// one per SDRAM, each act as the local-bus master of an SDRAM controller
// (CoreSDR-style soft IP, outside this RTL: its local bus is brought out as
// lb_req[i] / lb_rsp[i] and its run-time settings as sdr_cfg / sd_init). The
// main module controller rotates the SDRAMs: one is written with the ADC
// stream while a filled one is read back through read_module to the DSP,
// which may be slower. config_reg holds the run-time SDRAM timing (speed
// grade), geometry and the write/read burst sizes.
//
// Interface:
//   adc_data, acq_en    ADC word and capture enable, sampled every clock
//   adc_valid           new-sample qualifier (tie high for one sample/clock)
//   cfg_*               host register port of config_reg
//   lb_req / lb_rsp     local bus of the three SDRAM controllers
//   sdr_cfg, sd_init    settings and re-init strobe for the SDRAM controllers
//   dsp_*               valid/ready word stream to the DSP, last word of a
//                       buffer flagged
//   status outputs      lost samples, buffer states, counters
// Everything runs on one clock, clk, with active-low asynchronous reset.
//
// From the document: the ADC, three main modules with SDRAM controllers, the
// main module controller, automatic address increment, the run-time
// configuration register and slower readout to a DSP. The buffering, rotation
// scheme and handshakes are this design's own.
module das_top
  import das_pkg::*;
#(
  parameter int unsigned BUF_WORDS      = SDRAM_WORDS,  // words per SDRAM
  parameter int          CAP_FIFO_DEPTH = 1024,
  parameter int          RD_FIFO_DEPTH  = 512
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ADC
  input  logic                  acq_en,
  input  logic                  adc_valid,
  input  logic [ADC_W-1:0]      adc_data,
  // configuration port
  input  logic                  cfg_we,
  input  logic [4:0]            cfg_addr,
  input  logic [15:0]           cfg_wdata,
  output logic [15:0]           cfg_rdata,
  // SDRAM controllers
  output lb_req_t [NBUF-1:0]    lb_req,
  input  lb_rsp_t [NBUF-1:0]    lb_rsp,
  output sdr_cfg_t              sdr_cfg,
  output logic                  sd_init,
  // DSP
  output logic [DATA_W-1:0]     dsp_data,
  output logic                  dsp_last,
  output logic                  dsp_valid,
  input  logic                  dsp_ready,
  // status
  output logic [31:0]           lost_cnt,
  output logic                  overrun,
  output buf_state_e [NBUF-1:0] buf_state,
  output logic [31:0]           bufs_filled,
  output logic [31:0]           wait_cycles,
  output logic [31:0]           words_out
);
  localparam int CAP_CW = $clog2(CAP_FIFO_DEPTH) + 1;
  localparam int RD_CW  = $clog2(RD_FIFO_DEPTH) + 1;
  localparam int SW     = $clog2(NBUF);

  logic [BSZ_W-1:0]  wr_bsize, rd_bsize;

  // capture
  logic [DATA_W-1:0] cap_data;
  logic [CAP_CW-1:0] cap_count;
  logic              cap_empty, cap_busy, cap_pop;

  // controller
  logic [NBUF-1:0]             start_wr, start_rd, flush, wr_done, rd_done, mm_busy;
  logic [NBUF-1:0][ADDR_W-1:0] wr_len;
  logic [ADDR_W-1:0]           rd_len;
  logic [SW-1:0]               wr_sel, rd_sel;
  logic                        wr_active, rd_active;

  // read path
  logic [NBUF-1:0]             src_pop, snk_push, snk_last;
  logic [NBUF-1:0][DATA_W-1:0] snk_data;
  logic [RD_CW-1:0]            rd_space;

  config_reg u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .sdr_cfg, .wr_bsize, .rd_bsize, .sd_init
  );

  adc_capture #(.FIFO_DEPTH(CAP_FIFO_DEPTH)) u_cap (
    .clk, .rst_n, .acq_en, .adc_valid, .adc_data,
    .pop   (cap_pop),
    .dout  (cap_data),
    .count (cap_count),
    .empty (cap_empty),
    .busy  (cap_busy),
    .lost_cnt,
    .overrun
  );

  assign cap_pop = |src_pop;

  main_ctrl u_ctrl (
    .clk, .rst_n, .acq_en, .cap_busy, .cap_empty,
    .wr_done, .wr_len, .rd_done,
    .start_wr, .start_rd, .flush, .rd_len,
    .wr_sel, .rd_sel, .wr_active, .rd_active,
    .buf_state, .bufs_filled, .wait_cycles
  );

  for (genvar i = 0; i < NBUF; i++) begin : g_mm
    main_module #(
      .BUF_WORDS (BUF_WORDS),
      .SRC_CW    (CAP_CW),
      .SNK_CW    (RD_CW)
    ) u_mm (
      .clk, .rst_n,
      .start_wr  (start_wr[i]),
      .start_rd  (start_rd[i]),
      .rd_len,
      .flush     (flush[i]),
      .wr_done   (wr_done[i]),
      .wr_len    (wr_len[i]),
      .rd_done   (rd_done[i]),
      .busy      (mm_busy[i]),
      .wr_bsize,
      .rd_bsize,
      .bl_code   (sdr_cfg.bl),
      .src_count (cap_count),
      .src_data  (cap_data),
      .src_pop   (src_pop[i]),
      .snk_space (rd_space),
      .snk_push  (snk_push[i]),
      .snk_data  (snk_data[i]),
      .snk_last  (snk_last[i]),
      .lb_req    (lb_req[i]),
      .lb_rsp    (lb_rsp[i])
    );
  end

  read_module #(.FIFO_DEPTH(RD_FIFO_DEPTH)) u_rd (
    .clk, .rst_n, .rd_sel, .snk_push, .snk_data, .snk_last,
    .space (rd_space),
    .dsp_data, .dsp_last, .dsp_valid, .dsp_ready, .words_out
  );

  // Only the selected writer may take words from the capture FIFO.
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(src_pop));
endmodule
