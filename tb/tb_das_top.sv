// tb_das_top: end-to-end test of the acquisition system with three SDRAM
// controller models, at reduced buffer and FIFO sizes.
// The ADC delivers a 12-bit ramp (sample n carries n mod 4096) so every word
// at the DSP can be checked against its position in the stream.
// The controller models chain back-to-back requests.
// Phase 1, lossless: more samples than five buffers hold are captured at about
// 80 % of the clock rate while the DSP takes words with random stalls. The
// DSP must receive every sample in order, the last flag must mark each buffer
// end, and nothing may be lost. The writer rotates through all three SDRAMs
// and wraps, full buffers are switched, the tail goes out as a short burst
// after acquisition stops, refreshes interrupt bursts, bursts are chained and
// the read FIFO fills.
// Phase 2, overload: the DSP stops while samples keep arriving, so all
// buffers fill, the writer waits for a free buffer and the capture FIFO
// overflows. After the DSP resumes, the words it receives must be the ramp
// with gaps, and the gaps must add up to the reported loss.
// The configuration port is used to set the burst sizes between the phases.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_das_top;
  import das_pkg::*;
  localparam int unsigned BUF = 300;
  logic clk = 0, rst_n = 0;
  logic acq_en = 0, adc_valid = 0;
  logic [ADC_W-1:0] adc_data = 0;
  logic cfg_we = 0;
  logic [4:0] cfg_addr = 0;
  logic [15:0] cfg_wdata = 0, cfg_rdata;
  lb_req_t [NBUF-1:0] lb_req;
  lb_rsp_t [NBUF-1:0] lb_rsp;
  sdr_cfg_t sdr_cfg;
  logic sd_init;
  logic [DATA_W-1:0] dsp_data;
  logic dsp_last, dsp_valid, dsp_ready = 0;
  logic [31:0] lost_cnt, bufs_filled, wait_cycles, words_out;
  logic overrun;
  buf_state_e [NBUF-1:0] buf_state;
  int refreshes [NBUF], wbursts [NBUF], rbursts [NBUF], errors [NBUF];
  int checks = 0, failures = 0;

  das_top #(.BUF_WORDS(BUF), .CAP_FIFO_DEPTH(64), .RD_FIFO_DEPTH(32)) dut (.*);

  for (genvar i = 0; i < NBUF; i++) begin : g_sdr
    coresdr_model #(.DEPTH(512), .REF_PER(150 + 7 * i)) u_sdr (
      .clk, .rst_n, .cascade(1'b1), .no_refresh(1'b0), .lb_req(lb_req[i]), .lb_rsp(lb_rsp[i]),
      .refreshes(refreshes[i]), .wbursts(wbursts[i]), .rbursts(rbursts[i]), .errors(errors[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- ADC ramp ----
  int sent = 0;
  int dsp_prob = 70;   // percent of cycles the DSP is ready
  always @(negedge clk) begin
    adc_data <= ADC_W'(sent);
  end
  always @(posedge clk) if (rst_n && acq_en && adc_valid) sent <= sent + 1;

  // ---- DSP side checker ----
  int got = 0, exp_seq = 0, gaps = 0, lasts = 0, bp_cycles = 0, phase = 1;
  int in_buf = 0, short_last = 0;
  always @(posedge clk) if (rst_n) begin
    if (dsp_valid && !dsp_ready) bp_cycles++;
    if (dsp_valid && dsp_ready) begin
      int v, gap;
      v   = int'(dsp_data);
      gap = (v - exp_seq) & 12'hFFF;
      if (phase == 1) check(v == (exp_seq & 12'hFFF), $sformatf("phase 1 word in order (got %0d, expected %0d)", v, exp_seq & 12'hFFF));
      else gaps += gap;
      check(dsp_data[15:12] == 4'h0, "upper bits zero");
      exp_seq = exp_seq + gap + 1;
      got++;
      in_buf++;
      if (dsp_last) begin
        lasts++;
        if (in_buf != int'(BUF)) short_last++;
        in_buf = 0;
      end else check(in_buf < int'(BUF), "last flag at buffer end");
    end
  end
  always @(negedge clk) dsp_ready <= ($urandom_range(0, 99) < dsp_prob);

  // ---- mechanism counters, from the top's ports only ----
  int rfifo_full = 0, wraps = 0, short_bursts = 0, wr_bsize_set = 8, chained = 0;
  int last_wr_sdram = -1;
  always @(posedge clk) if (rst_n) begin
    logic reading, rd_busy;
    reading = 1'b0;
    rd_busy = 1'b0;
    for (int i = 0; i < NBUF; i++) begin
      if (buf_state[i] == BUF_READING) reading = 1'b1;
      if (lb_req[i].r_req || lb_rsp[i].r_valid) rd_busy = 1'b1;
      if (lb_rsp[i].rw_ack && (lb_rsp[i].d_req || lb_rsp[i].r_valid)) chained++;
      if (lb_req[i].w_req && lb_rsp[i].rw_ack) begin
        if (i < last_wr_sdram) wraps++;
        last_wr_sdram = i;
        if (int'(lb_req[i].b_size) < wr_bsize_set) short_bursts++;
      end
    end
    // reader holds back because the read FIFO has no room for a burst
    if (reading && !rd_busy && dsp_valid && !dsp_ready) rfifo_full++;
  end

  task automatic cfg_write(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 5'(a); cfg_wdata = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n1, wait1, t;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- phase 1 ----
    n1 = 5 * BUF + 137;
    @(negedge clk);
    acq_en = 1;
    while (sent < n1) begin
      adc_valid = ($urandom_range(0, 99) < 80);
      @(negedge clk);
      if (sent >= n1) adc_valid = 0;
    end
    adc_valid = 0;
    acq_en = 0;
    t = 0;
    while (got < n1 && t < 100000) begin @(negedge clk); t++; end
    repeat (50) @(negedge clk);
    check(got == n1, $sformatf("phase 1 delivered all %0d words (got %0d)", n1, got));
    check(lost_cnt == 0 && !overrun, "phase 1 lossless");
    check(lasts == 6 && short_last == 1, "phase 1 buffer ends flagged");
    check(int'(words_out) == got, "words_out counter");
    check(bufs_filled == 6, "phase 1 filled six buffers");
    for (int i = 0; i < NBUF; i++) check(buf_state[i] == BUF_EMPTY, "all buffers empty after readout");
    wait1 = int'(wait_cycles);
    // ---- reconfigure: write bursts of 4, read bursts of 8 ----
    cfg_write(15, 4);
    wr_bsize_set = 4;
    cfg_write(16, 8);
    cfg_addr = 15; #1; check(cfg_rdata == 4, "config read-back");
    // ---- phase 2: overload ----
    phase = 2;
    dsp_prob = 0;
    acq_en = 1;
    for (int k = 0; k < 5000; k++) begin
      adc_valid = ($urandom_range(0, 99) < 40);
      @(negedge clk);
    end
    acq_en = 0;
    adc_valid = 0;
    repeat (20) @(negedge clk);
    check(overrun && lost_cnt > 0, "overload loses samples");
    check(wait_cycles > wait1 + 100, "writer waited for a free buffer");
    dsp_prob = 60;
    t = 0;
    while (got + int'(lost_cnt) < sent && t < 200000) begin @(negedge clk); t++; end
    repeat (50) @(negedge clk);
    check(got + int'(lost_cnt) == sent, $sformatf("delivered %0d + lost %0d = sent %0d", got, lost_cnt, sent));
    // samples lost after the last stored one leave no gap behind them
    check(gaps + (sent - exp_seq) == int'(lost_cnt),
          $sformatf("gaps %0d + tail %0d match loss %0d", gaps, sent - exp_seq, lost_cnt));
    // ---- mechanisms ----
    begin
      int refr, errs;
      refr = 0;
      errs = 0;
      for (int i = 0; i < NBUF; i++) begin refr += refreshes[i]; errs += errors[i]; end
      check(errs == 0, "no local-bus protocol errors");
      check(refr > 0, "mechanism: refresh stall");
      check(lasts - short_last >= 5, "mechanism: switch on full buffer");
      check(wraps > 0, "mechanism: rotation wraps to the first SDRAM");
      check(short_bursts > 0, "mechanism: short tail burst on flush");
      check(rfifo_full > 0, "mechanism: read FIFO full, reader holds back");
      check(bp_cycles > 0, "mechanism: DSP back-pressure");
      check(chained > 0, "mechanism: chained bursts");
      $display("chained=%0d", chained);
    $display("refreshes=%0d full_buffers=%0d wraps=%0d short_bursts=%0d rfifo_full=%0d bp=%0d lost=%0d wait=%0d",
               refr, lasts - short_last, wraps, short_bursts, rfifo_full, bp_cycles, lost_cnt, wait_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
