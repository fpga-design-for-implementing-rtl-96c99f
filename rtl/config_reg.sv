// config_reg: run-time configuration register of the acquisition system.
//
// Holds the SDRAM controller's timing and geometry settings (so one bitstream
// serves SDRAMs of different speed grades and sizes) and the write and read
// burst sizes used by the main modules. A host writes one field per address
// over a simple synchronous register port and can read every field back.
//
// Register map (cfg_addr, field, reset value for a 133 MHz x16 512 Mb part):
//   0 RAS 6    1 RCD 3    2 RRD 2    3 RP 3     4 RC 9     5 RFC 9
//   6 MRD 2    7 CL 3     8 BL 3(8)  9 WR 2    10 DELAY 26600 (200 us)
//  11 REF 1037 (7.8 us)  12 COLBITS 5 (10)  13 ROWBITS 2 (13)  14 REGDIMM 0
//  15 write burst size 8    16 read burst size 8
//  17 control: writing bit 0 = 1 pulses sd_init for one clock (reads 0)
// A write is clamped into the field's valid range from the controller's
// parameter table (for example CL 1..4, RC 3..12). The burst sizes are
// clamped to 1..8 on write and, on their outputs, to the programmed burst
// length BL (B_SIZE may be 1 through BL).
// Timing: a write on edge n is visible on the outputs after edge n; cfg_rdata
// is combinational from cfg_addr.
//
// From the document: the field list, widths and valid ranges, run-time
// configuration of speed grade and burst sizes, the SD_INIT re-initialise
// strobe. This design's own: the register map, reset values, clamping and the
// host port. DELAY and REF are counted in clock cycles, as the table's
// descriptions say.
module config_reg
  import das_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [4:0]        cfg_addr,
  input  logic [15:0]       cfg_wdata,
  output logic [15:0]       cfg_rdata,
  output sdr_cfg_t          sdr_cfg,
  output logic [BSZ_W-1:0]  wr_bsize,
  output logic [BSZ_W-1:0]  rd_bsize,
  output logic              sd_init
);
  sdr_cfg_t         cfg_q;
  logic [BSZ_W-1:0] wbs_q, rbs_q, bl_words;

  // Saturate v into [lo, hi].
  function automatic logic [15:0] clamp(input logic [15:0] v, input logic [15:0] lo,
                                        input logic [15:0] hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q.ras     <= 4'd6;
      cfg_q.rcd     <= 3'd3;
      cfg_q.rrd     <= 2'd2;
      cfg_q.rp      <= 3'd3;
      cfg_q.rc      <= 4'd9;
      cfg_q.rfc     <= 4'd9;
      cfg_q.mrd     <= 3'd2;
      cfg_q.cl      <= 3'd3;
      cfg_q.bl      <= 2'd3;
      cfg_q.wr      <= 2'd2;
      cfg_q.delay   <= 16'd26600;
      cfg_q.ref_per <= 16'd1037;
      cfg_q.colbits <= 3'd5;
      cfg_q.rowbits <= 2'd2;
      cfg_q.regdimm <= 1'b0;
      wbs_q         <= 4'd8;
      rbs_q         <= 4'd8;
      sd_init       <= 1'b0;
    end else begin
      sd_init <= 1'b0;
      if (cfg_we) begin
        unique case (cfg_addr)
          5'd0:  cfg_q.ras     <= 4'(clamp(cfg_wdata, 1, 10));
          5'd1:  cfg_q.rcd     <= 3'(clamp(cfg_wdata, 2, 5));
          5'd2:  cfg_q.rrd     <= 2'(clamp(cfg_wdata, 2, 3));
          5'd3:  cfg_q.rp      <= 3'(clamp(cfg_wdata, 1, 4));
          5'd4:  cfg_q.rc      <= 4'(clamp(cfg_wdata, 3, 12));
          5'd5:  cfg_q.rfc     <= 4'(clamp(cfg_wdata, 2, 14));
          5'd6:  cfg_q.mrd     <= 3'(clamp(cfg_wdata, 1, 7));
          5'd7:  cfg_q.cl      <= 3'(clamp(cfg_wdata, 1, 4));
          5'd8:  cfg_q.bl      <= 2'(clamp(cfg_wdata, 0, 3));
          5'd9:  cfg_q.wr      <= 2'(clamp(cfg_wdata, 1, 3));
          5'd10: cfg_q.delay   <= clamp(cfg_wdata, 10, 16'hFFFF);
          5'd11: cfg_q.ref_per <= clamp(cfg_wdata, 10, 16'hFFFF);
          5'd12: cfg_q.colbits <= 3'(clamp(cfg_wdata, 3, 7));
          5'd13: cfg_q.rowbits <= 2'(clamp(cfg_wdata, 0, 3));
          5'd14: cfg_q.regdimm <= cfg_wdata[0];
          5'd15: wbs_q         <= 4'(clamp(cfg_wdata, 1, 8));
          5'd16: rbs_q         <= 4'(clamp(cfg_wdata, 1, 8));
          5'd17: sd_init       <= cfg_wdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (cfg_addr)
      5'd0:  cfg_rdata = 16'(cfg_q.ras);
      5'd1:  cfg_rdata = 16'(cfg_q.rcd);
      5'd2:  cfg_rdata = 16'(cfg_q.rrd);
      5'd3:  cfg_rdata = 16'(cfg_q.rp);
      5'd4:  cfg_rdata = 16'(cfg_q.rc);
      5'd5:  cfg_rdata = 16'(cfg_q.rfc);
      5'd6:  cfg_rdata = 16'(cfg_q.mrd);
      5'd7:  cfg_rdata = 16'(cfg_q.cl);
      5'd8:  cfg_rdata = 16'(cfg_q.bl);
      5'd9:  cfg_rdata = 16'(cfg_q.wr);
      5'd10: cfg_rdata = cfg_q.delay;
      5'd11: cfg_rdata = cfg_q.ref_per;
      5'd12: cfg_rdata = 16'(cfg_q.colbits);
      5'd13: cfg_rdata = 16'(cfg_q.rowbits);
      5'd14: cfg_rdata = 16'(cfg_q.regdimm);
      5'd15: cfg_rdata = 16'(wbs_q);
      5'd16: cfg_rdata = 16'(rbs_q);
      default: cfg_rdata = '0;
    endcase
  end

  assign sdr_cfg  = cfg_q;
  assign bl_words = BSZ_W'(1) << cfg_q.bl;
  assign wr_bsize = (wbs_q > bl_words) ? bl_words : wbs_q;
  assign rd_bsize = (rbs_q > bl_words) ? bl_words : rbs_q;
endmodule
