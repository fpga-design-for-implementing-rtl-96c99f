// main_ctrl: main module controller; rotates the three SDRAM buffers.
//
// Each SDRAM (with its main module) is one buffer that is EMPTY, WRITING,
// FULL or READING. The ADC stream is written into one buffer at a time, in
// the fixed order 0, 1, 2, 0, ...; full buffers are read back to the DSP in
// the same order. Because one buffer fills while another is read and a third
// is free to take over, capture can run on indefinitely while the DSP reads
// at a lower rate, as long as its average rate keeps up.
//
// Writer: when no buffer is being written and the next buffer in order is
// EMPTY, that main module gets a start_wr pulse (if acquisition is on or
// captured words are still waiting). When it reports wr_done the buffer
// becomes FULL with the reported length (or EMPTY again if it got no word)
// and the write pointer moves on. A writer is told to flush its tail once
// acquisition is off and no sample is left in the capture input stage. If the
// next buffer is not yet EMPTY the capture FIFO has to absorb the wait;
// wait_cycles counts such cycles.
// Reader: when no buffer is being read and the next buffer in read order is
// FULL, its main module gets start_rd with that buffer's length; on rd_done
// the buffer is EMPTY again.
//
// Interface: per-buffer arrays of start/done strobes; wr_sel / rd_sel index
// the main module writing / reading (valid while wr_active / rd_active).
// Timing: a done strobe is seen at edge n; the follow-up start pulse comes at
// the earliest at edge n+1.
//
// From the document: three main modules and a controller over them, capture
// without losing a word while reading out more slowly. The rotation scheme,
// states and flush are this design's own reading of that.
module main_ctrl
  import das_pkg::*;
#(
  localparam int SW = $clog2(NBUF)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        acq_en,
  input  logic                        cap_busy,   // sample in capture input stage
  input  logic                        cap_empty,  // capture FIFO empty
  input  logic [NBUF-1:0]             wr_done,
  input  logic [NBUF-1:0][ADDR_W-1:0] wr_len,
  input  logic [NBUF-1:0]             rd_done,
  output logic [NBUF-1:0]             start_wr,
  output logic [NBUF-1:0]             start_rd,
  output logic [NBUF-1:0]             flush,
  output logic [ADDR_W-1:0]           rd_len,
  output logic [SW-1:0]               wr_sel,
  output logic [SW-1:0]               rd_sel,
  output logic                        wr_active,
  output logic                        rd_active,
  output buf_state_e [NBUF-1:0]       buf_state,
  output logic [31:0]                 bufs_filled,
  output logic [31:0]                 wait_cycles
);
  logic [NBUF-1:0][ADDR_W-1:0] len_q;
  logic                        go_wr, go_rd;

  function automatic logic [SW-1:0] nxt(input logic [SW-1:0] i);
    return (i == SW'(NBUF - 1)) ? '0 : i + 1'b1;
  endfunction

  assign go_wr = !wr_active && buf_state[wr_sel] == BUF_EMPTY && (acq_en || !cap_empty);
  assign go_rd = !rd_active && buf_state[rd_sel] == BUF_FULL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_state   <= {NBUF{BUF_EMPTY}};
      len_q       <= '0;
      wr_sel      <= '0;
      rd_sel      <= '0;
      wr_active   <= 1'b0;
      rd_active   <= 1'b0;
      start_wr    <= '0;
      start_rd    <= '0;
      rd_len      <= '0;
      bufs_filled <= '0;
      wait_cycles <= '0;
    end else begin
      start_wr <= '0;
      start_rd <= '0;
      // writer side
      if (wr_active && wr_done[wr_sel]) begin
        wr_active <= 1'b0;
        len_q[wr_sel] <= wr_len[wr_sel];
        if (wr_len[wr_sel] == '0) begin
          buf_state[wr_sel] <= BUF_EMPTY;
        end else begin
          buf_state[wr_sel] <= BUF_FULL;
          wr_sel            <= nxt(wr_sel);
          bufs_filled       <= bufs_filled + 1'b1;
        end
      end else if (go_wr) begin
        wr_active          <= 1'b1;
        buf_state[wr_sel]  <= BUF_WRITING;
        start_wr[wr_sel]   <= 1'b1;
      end else if (!wr_active && acq_en) begin
        wait_cycles <= wait_cycles + 1'b1;
      end
      // reader side
      if (rd_active && rd_done[rd_sel]) begin
        rd_active         <= 1'b0;
        buf_state[rd_sel] <= BUF_EMPTY;
        rd_sel            <= nxt(rd_sel);
      end else if (go_rd) begin
        rd_active         <= 1'b1;
        buf_state[rd_sel] <= BUF_READING;
        start_rd[rd_sel]  <= 1'b1;
        rd_len            <= len_q[rd_sel];
      end
    end
  end

  always_comb begin
    flush = '0;
    flush[wr_sel] = wr_active && !acq_en && !cap_busy;
  end

  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_active && rd_active) |-> (wr_sel != rd_sel));
endmodule
