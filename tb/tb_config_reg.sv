// tb_config_reg: self-checking test of the configuration register.
// Checks the reset values, write/read-back of every field, clamping of
// out-of-range writes to the valid ranges of the SDRAM controller's parameter
// table, clamping of the burst sizes to the programmed burst length, the
// one-clock sd_init strobe and the packing of the sdr_cfg output.
module tb_config_reg;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [4:0] cfg_addr = 0;
  logic [15:0] cfg_wdata = 0, cfg_rdata;
  sdr_cfg_t sdr_cfg;
  logic [BSZ_W-1:0] wr_bsize, rd_bsize;
  logic sd_init;
  int checks = 0, failures = 0;

  config_reg dut (.*);
  always #5 clk = ~clk;

  // Valid range and reset value of each field, from the parameter table.
  int lo  [17] = '{1, 2, 2, 1, 3, 2, 1, 1, 0, 1, 10, 10, 3, 0, 0, 1, 1};
  int hi  [17] = '{10, 5, 3, 4, 12, 14, 7, 4, 3, 3, 65535, 65535, 7, 3, 1, 8, 8};
  int rst [17] = '{6, 3, 2, 3, 9, 9, 2, 3, 3, 2, 26600, 1037, 5, 2, 0, 8, 8};
  int model [17];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  // cfg_rdata is combinational from cfg_addr.
  task automatic rd(input int a, output int v);
    cfg_addr = 5'(a);
    #1;
    v = int'(cfg_rdata);
  endtask
  int v;

  task automatic check_outputs();
    int blw = 1 << model[8];
    check(sdr_cfg.ras == 4'(model[0]) && sdr_cfg.rcd == 3'(model[1]) && sdr_cfg.rrd == 2'(model[2])
          && sdr_cfg.rp == 3'(model[3]) && sdr_cfg.rc == 4'(model[4]) && sdr_cfg.rfc == 4'(model[5])
          && sdr_cfg.mrd == 3'(model[6]) && sdr_cfg.cl == 3'(model[7]) && sdr_cfg.bl == 2'(model[8])
          && sdr_cfg.wr == 2'(model[9]) && sdr_cfg.delay == 16'(model[10])
          && sdr_cfg.ref_per == 16'(model[11]) && sdr_cfg.colbits == 3'(model[12])
          && sdr_cfg.rowbits == 2'(model[13]) && sdr_cfg.regdimm == model[14][0], "sdr_cfg fields");
    check(int'(wr_bsize) == ((model[15] > blw) ? blw : model[15]), "wr_bsize clamp to BL");
    check(int'(rd_bsize) == ((model[16] > blw) ? blw : model[16]), "rd_bsize clamp to BL");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 17; a++) begin
      model[a] = rst[a];
      rd(a, v);
      check(v == rst[a], $sformatf("reset value of register %0d", a));
    end
    check_outputs();
    for (int n = 0; n < 400; n++) begin
      int a, d;
      a = $urandom_range(0, 16);
      case ($urandom_range(0, 3))
        0: d = lo[a] - 1;
        1: d = hi[a] + 1;
        default: d = $urandom_range(lo[a], hi[a]);
      endcase
      if (d < 0) d = 0;
      if (d > 65535) d = 65535;
      wr(a, d);
      if (a == 14) model[a] = d & 1;
      else model[a] = (d < lo[a]) ? lo[a] : (d > hi[a]) ? hi[a] : d;
      rd(a, v);
      check(v == model[a], $sformatf("read-back of register %0d after writing %0d", a, d));
      check_outputs();
    end
    // sd_init: a single one-clock pulse per write of 1 to register 17
    begin
      int pulses;
      pulses = 0;
      @(negedge clk); cfg_we = 1; cfg_addr = 17; cfg_wdata = 1;
      @(negedge clk); cfg_we = 0;
      for (int c = 0; c < 5; c++) begin
        if (sd_init) pulses++;
        @(negedge clk);
      end
      check(pulses == 1, "sd_init one-clock pulse");
      rd(17, v);
      check(v == 0, "control register reads 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
