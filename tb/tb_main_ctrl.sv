// tb_main_ctrl: self-checking test of the main module controller.
// The testbench stands in for the three main modules: it answers each
// start_wr after a random time with wr_done and a random length (sometimes
// zero), and each start_rd after a longer random time with rd_done, so the
// reader is slower than the writer and the writer has to wait for free
// buffers. A model of the buffer states checks: write and read order
// 0,1,2,0,...; a write only into an EMPTY buffer and a read only of a FULL one;
// rd_len equal to the length written; buf_state; flush only to the active
// writer and only when acquisition is off and the capture stage is idle; no
// start is held back for more than two cycles once it is possible; and the
// filled-buffer and wait counters.
module tb_main_ctrl;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  logic acq_en = 0, cap_busy = 0, cap_empty = 1;
  logic [NBUF-1:0] wr_done = 0, rd_done = 0, start_wr, start_rd, flush;
  logic [NBUF-1:0][ADDR_W-1:0] wr_len = '0;
  logic [ADDR_W-1:0] rd_len;
  logic [1:0] wr_sel, rd_sel;
  logic wr_active, rd_active;
  buf_state_e [NBUF-1:0] buf_state;
  logic [31:0] bufs_filled, wait_cycles;
  int checks = 0, failures = 0;

  main_ctrl dut (.*);
  always #5 clk = ~clk;

  buf_state_e m_state [NBUF];
  int m_len [NBUF];
  int m_wp = 0, m_rp = 0, w_idx = -1, r_idx = -1, w_timer = 0, r_timer = 0;
  int m_filled = 0, waits_seen = 0, idle_wr = 0, idle_rd = 0, reads = 0;
  int pend_wr = -1, pend_len = 0, pend_rd = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_state[i]) begin m_state[i] = BUF_EMPTY; m_len[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // effects of done strobes seen at the last edge
      if (pend_wr >= 0) begin
        m_len[pend_wr] = pend_len;
        if (pend_len == 0) m_state[pend_wr] = BUF_EMPTY;
        else begin
          m_state[pend_wr] = BUF_FULL;
          m_wp = (m_wp + 1) % NBUF;
          m_filled++;
        end
        pend_wr = -1;
      end
      if (pend_rd >= 0) begin
        m_state[pend_rd] = BUF_EMPTY;
        m_rp = (m_rp + 1) % NBUF;
        pend_rd = -1;
      end
      // start pulses issued at the last edge
      for (int i = 0; i < NBUF; i++) begin
        if (start_wr[i]) begin
          check(i == m_wp && m_state[i] == BUF_EMPTY && w_idx < 0, "write start order/state");
          m_state[i] = BUF_WRITING;
          w_idx = i;
          w_timer = $urandom_range(3, 60);
        end
        if (start_rd[i]) begin
          check(i == m_rp && m_state[i] == BUF_FULL && r_idx < 0, "read start order/state");
          check(int'(rd_len) == m_len[i], "rd_len");
          m_state[i] = BUF_READING;
          r_idx = i;
          r_timer = $urandom_range(20, 150);
          reads++;
        end
      end
      for (int i = 0; i < NBUF; i++) check(buf_state[i] == m_state[i], "buf_state");
      check(int'(bufs_filled) == m_filled, "bufs_filled");
      // a start that is possible must come within two cycles
      if (w_idx < 0 && m_state[m_wp] == BUF_EMPTY && (acq_en || !cap_empty)) idle_wr++;
      else idle_wr = 0;
      check(idle_wr <= 2, "writer started promptly");
      if (r_idx < 0 && m_state[m_rp] == BUF_FULL) idle_rd++;
      else idle_rd = 0;
      check(idle_rd <= 2, "reader started promptly");
      if (w_idx < 0 && acq_en && m_state[m_wp] != BUF_EMPTY) waits_seen++;
      // inputs for the next edge
      if (cyc % 2000 == 0) acq_en = (cyc % 6000 != 4000);
      cap_busy  = acq_en ? 1'b1 : ($urandom_range(0, 3) == 0);
      cap_empty = $urandom_range(0, 1);
      wr_done = '0;
      rd_done = '0;
      #1;
      for (int i = 0; i < NBUF; i++)
        check(flush[i] == (i == w_idx && !acq_en && !cap_busy), "flush");
      if (w_idx >= 0) begin
        if (w_timer > 0) w_timer--;
        else begin
          wr_done[w_idx] = 1'b1;
          pend_len = ($urandom_range(0, 7) == 0) ? 0 : $urandom_range(1, 5000);
          wr_len[w_idx] = ADDR_W'(pend_len);
          pend_wr = w_idx;
          w_idx = -1;
        end
      end
      if (r_idx >= 0) begin
        if (r_timer > 0) r_timer--;
        else begin
          rd_done[r_idx] = 1'b1;
          pend_rd = r_idx;
          r_idx = -1;
        end
      end
    end
    check(waits_seen > 0 && wait_cycles > 0, "writer waited for a free buffer");
    check(reads > 10, "buffers were read back");
    $display("filled=%0d reads=%0d waits=%0d", m_filled, reads, waits_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
