// tb_das_full: one complete acquisition through das_top at its default sizes
// (one buffer = a whole 512 Mb x16 SDRAM, 33,554,432 words).
// The controller models chain back-to-back requests.
// A 12-bit ramp is captured on nine clocks out of ten until the first SDRAM is
// completely full and 1000 further samples have gone into the second one;
// acquisition then stops, the tail is flushed, and both buffers are read back
// to a DSP that is always ready. Every word is checked against the ramp, the
// last flags must close exactly the two buffers, and nothing may be lost.
module tb_das_full;
  import das_pkg::*;
  localparam int N = SDRAM_WORDS + 1000;
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
  logic dsp_last, dsp_valid, dsp_ready = 1;
  logic [31:0] lost_cnt, bufs_filled, wait_cycles, words_out;
  logic overrun;
  buf_state_e [NBUF-1:0] buf_state;
  int refreshes [NBUF], wbursts [NBUF], rbursts [NBUF], errors [NBUF];
  int checks = 0, failures = 0;

  das_top dut (.*);

  for (genvar i = 0; i < NBUF; i++) begin : g_sdr
    coresdr_model #(.DEPTH(SDRAM_WORDS), .REF_PER(1037)) u_sdr (
      .clk, .rst_n, .cascade(1'b1), .no_refresh(1'b0), .lb_req(lb_req[i]), .lb_rsp(lb_rsp[i]),
      .refreshes(refreshes[i]), .wbursts(wbursts[i]), .rbursts(rbursts[i]), .errors(errors[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int sent = 0, got = 0, bad = 0, lasts = 0, last_pos0 = -1, last_pos1 = -1;
  always @(posedge clk) if (rst_n) begin
    if (acq_en && adc_valid) sent <= sent + 1;
    if (dsp_valid && dsp_ready) begin
      if (dsp_data != DATA_W'(got[ADC_W-1:0])) begin
        bad++;
        if (bad < 5) $display("mismatch at word %0d: %h", got, dsp_data);
      end
      if (dsp_last) begin
        lasts++;
        if (lasts == 1) last_pos0 = got;
        else last_pos1 = got;
      end
      got <= got + 1;
    end
  end

  initial begin
    repeat (300_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    acq_en = 1;
    for (int c = 1; sent < N; c++) begin
      adc_valid = (c % 10 != 0);
      adc_data  = ADC_W'(sent);
      @(negedge clk);
    end
    acq_en = 0;
    adc_valid = 0;
    while (got < N) @(negedge clk);
    repeat (50) @(negedge clk);
    check(sent == N, "samples sent");
    check(got == N, "all words delivered");
    check(bad == 0, "words match the ramp");
    check(lost_cnt == 0 && !overrun, "no sample lost");
    check(lasts == 2 && last_pos0 == SDRAM_WORDS - 1 && last_pos1 == N - 1, "buffer ends flagged");
    check(bufs_filled == 2, "two buffers filled");
    check(errors[0] == 0 && errors[1] == 0, "no local-bus protocol errors");
    check(wbursts[0] == SDRAM_WORDS / 8, "first SDRAM written in full bursts of 8");
    $display("refreshes=%0d/%0d wbursts=%0d/%0d rbursts=%0d/%0d", refreshes[0], refreshes[1],
             wbursts[0], wbursts[1], rbursts[0], rbursts[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
