// tb_main_module: self-checking test of one main module against a
// behavioural model of the SDRAM controller's local bus.
// 1. Full buffer: more words than the buffer holds are offered at a random
//    rate; the write must stop at BUF_WORDS (not a multiple of 8, so the last
//    burst is cut), report wr_len = BUF_WORDS, and the model's storage must
//    hold exactly the first BUF_WORDS words.
// 2. Flush: a new write with burst size 5 takes the words left over plus new
//    ones, then flush ends it with a short tail burst; storage and wr_len are
//    checked.
// 3. Read-back with burst size 3 into a small sink FIFO drained at random:
//    every word in order, the last flag only on the final word, rd_done.
// The model flags bursts that cross an 8-word boundary, oversize bursts and
// dropped requests; it must report none, and refreshes must have occurred
// while bursts were running.
module tb_main_module;
  import das_pkg::*;
  localparam int unsigned BUF = 203;
  localparam int SNK_DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic start_wr = 0, start_rd = 0, flush = 0;
  logic [ADDR_W-1:0] rd_len = 0, wr_len;
  logic wr_done, rd_done, busy;
  logic [BSZ_W-1:0] wr_bsize = 8, rd_bsize = 8;
  logic [1:0] bl_code = 3;
  logic [10:0] src_count;
  logic [DATA_W-1:0] src_data, snk_data, sink_dout;
  logic src_pop, snk_push, snk_last;
  logic [4:0] snk_count;
  logic [4:0] snk_space;
  logic src_push = 0, sink_pop = 0, sink_empty, src_full, src_empty, sink_full;
  logic [DATA_W-1:0] src_din = 0;
  logic cascade = 0, no_refresh = 0;
  lb_req_t lb_req;
  lb_rsp_t lb_rsp;
  int refreshes, wbursts, rbursts, errors;
  int checks = 0, failures = 0;

  main_module #(.BUF_WORDS(BUF), .SRC_CW(11), .SNK_CW(5)) dut (.*);

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(1024)) u_src (
    .clk, .rst_n, .push(src_push), .din(src_din), .pop(src_pop), .dout(src_data),
    .count(src_count), .full(src_full), .empty(src_empty));

  logic [DATA_W:0] sink_q;
  sync_fifo #(.WIDTH(DATA_W + 1), .DEPTH(SNK_DEPTH)) u_snk (
    .clk, .rst_n, .push(snk_push), .din({snk_last, snk_data}), .pop(sink_pop),
    .dout(sink_q), .count(snk_count), .full(sink_full), .empty(sink_empty));
  assign snk_space = 5'(SNK_DEPTH) - snk_count;

  coresdr_model #(.DEPTH(256), .REF_PER(97)) u_sdr (.*);

  always #5 clk = ~clk;

  logic [DATA_W-1:0] sent [$];
  int sent_n = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic offer(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin src_push = 0; @(negedge clk); end
      src_push = 1;
      src_din  = DATA_W'($urandom);
      sent.push_back(src_din);
    end
    @(negedge clk);
    src_push = 0;
  endtask

  task automatic wait_done(ref logic sig, input string what);
    int t = 0;
    while (!sig && t < 20000) begin @(posedge clk); t++; end
    check(sig, what);
    @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int len2;
  int rd_done_seen = 0;
  // throughput probes for the chained phases
  int dreq_n = 0, dreq_first = -1, dreq_last = -1, rv_n = 0, rv_first = -1, rv_last = -1;
  int cyc = 0, rd_got = 0, rd_bad = 0;
  logic drain = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && cascade && lb_rsp.d_req) begin
      if (dreq_first < 0) dreq_first = cyc;
      dreq_last = cyc;
      dreq_n++;
    end
    if (rst_n && cascade && drain && lb_rsp.r_valid) begin
      if (rv_first < 0) rv_first = cyc;
      rv_last = cyc;
      rv_n++;
    end
  end
  // phase 5 sink: pop every clock, compare with what phase 4 stored
  always @(negedge clk) if (drain) begin
    sink_pop = !sink_empty;
    if (!sink_empty) begin
      if (sink_q[DATA_W-1:0] != sent[BUF + len2 + rd_got]) rd_bad++;
      rd_got++;
    end
  end
  always @(posedge clk) if (rst_n && rd_done) rd_done_seen++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. fill the whole buffer
    @(negedge clk); start_wr = 1; @(negedge clk); start_wr = 0;
    check(busy, "busy in write mode");
    offer(BUF + 47);
    wait_done(wr_done, "wr_done on full buffer");
    check(wr_len == ADDR_W'(BUF), "wr_len = buffer size");
    for (int a = 0; a < BUF; a++) check(u_sdr.peek(a) == sent[a], "stored word (full buffer)");
    check(src_count == 11'(47), "words beyond the buffer stay queued");
    // 2. new buffer, burst size 5, ended by flush
    wr_bsize = 5;
    @(negedge clk); start_wr = 1; @(negedge clk); start_wr = 0;
    offer(30);
    repeat (20) @(negedge clk);
    flush = 1;
    wait_done(wr_done, "wr_done after flush");
    flush = 0;
    len2 = 77;
    check(wr_len == ADDR_W'(len2), "wr_len after flush");
    for (int a = 0; a < len2; a++) check(u_sdr.peek(a) == sent[BUF + a], "stored word (flushed buffer)");
    check(src_count == 0, "source drained");
    // 3. read back with burst size 3
    rd_bsize = 3;
    rd_len = ADDR_W'(len2);
    @(negedge clk); start_rd = 1; @(negedge clk); start_rd = 0;
    for (int a = 0; a < len2; a++) begin
      int t = 0;
      sink_pop = 0;
      while (sink_empty && t < 5000) begin @(negedge clk); t++; end
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      check(!sink_empty && sink_q[DATA_W-1:0] == sent[BUF + a], "read-back word");
      check(sink_q[DATA_W] == (a == len2 - 1), "last flag");
      sink_pop = 1;
      @(negedge clk);
      sink_pop = 0;
    end
    repeat (10) @(negedge clk);
    check(!busy, "idle after read");
    check(sink_empty, "no extra words");
    check(rd_done_seen == 1, $sformatf("rd_done once (seen %0d)", rd_done_seen));
    check(errors == 0, "no local-bus protocol errors");
    check(refreshes > 0, "refresh stalls occurred");
    check(wbursts >= 26 + 16 && rbursts >= 26, "burst counts");
    // 4. chained bursts: with the FIFO already holding a whole buffer and a
    //    controller that chains requests, D_REQ must be continuous: 203 words
    //    in 203 consecutive clocks (full memory throughput).
    cascade = 1;
    no_refresh = 1;
    wr_bsize = 8;
    offer(BUF);
    @(negedge clk); start_wr = 1; @(negedge clk); start_wr = 0;
    wait_done(wr_done, "wr_done, chained writes");
    check(dreq_n == BUF && dreq_last - dreq_first == BUF - 1,
          $sformatf("write throughput: %0d words in %0d clocks", dreq_n, dreq_last - dreq_first + 1));
    for (int a = 0; a < BUF; a++) check(u_sdr.peek(a) == sent[BUF + len2 + a], "stored word (chained)");
    // 5. chained reads into a sink drained every clock: also continuous
    rd_bsize = 8;
    rd_len = ADDR_W'(BUF);
    drain = 1;
    @(negedge clk); start_rd = 1; @(negedge clk); start_rd = 0;
    wait_done(rd_done, "rd_done, chained reads");
    repeat (5) @(negedge clk);
    check(rv_n == BUF && rv_last - rv_first == BUF - 1,
          $sformatf("read throughput: %0d words in %0d clocks", rv_n, rv_last - rv_first + 1));
    check(rd_bad == 0 && rd_got == BUF, "chained read-back words");
    check(errors == 0, "no local-bus protocol errors (chained)");
    $display("wbursts=%0d rbursts=%0d refreshes=%0d", wbursts, rbursts, refreshes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
