// main_module: local-bus master of one SDRAM controller (one per SDRAM).
//
// In write mode it moves ADC words from the capture FIFO into its SDRAM; in
// read mode it reads a filled buffer back into the read module's FIFO. The
// main module controller chooses the mode with one-cycle start pulses.
//
// Write mode (start_wr): the address counter is cleared. Whenever the capture
// FIFO holds a full burst beyond the words already promised to earlier
// bursts, W_REQ is raised with RADDR and B_SIZE from the address increment
// module and held until RW_ACK. On RW_ACK the address advances by B_SIZE.
// Each D_REQ pops one word and presents it on DATAIN on the next clock, since
// the controller raises D_REQ one clock before it needs the data. The write
// ends when the buffer (BUF_WORDS words) is full, or, while `flush` is high,
// when the FIFO has been emptied; the tail is written as a short burst.
// wr_done then pulses with wr_len = words written.
//
// Read mode (start_rd, rd_len words): R_REQ bursts are issued while the read
// module's FIFO has room for the burst plus all words still in flight. Each
// R_VALID word is pushed to the read module; the last word of the buffer is
// marked with snk_last. rd_done pulses once every word has arrived.
//
// One request is outstanding at a time on the request lines, but the next
// request may be raised while the data of the previous one is still moving,
// so back-to-back (cascaded) bursts are possible. AUTO_PCH is held low: the
// controller's bank management closes rows itself.
//
// From the document: the local-bus signals and their meaning (RADDR, B_SIZE,
// R_REQ, W_REQ, RW_ACK, D_REQ one clock before data, R_VALID), run-time write
// and read burst sizes, automatic address increment. The two-mode sequencing,
// the flow-control rules and the flush are this design's own.
module main_module
  import das_pkg::*;
#(
  parameter int unsigned BUF_WORDS = SDRAM_WORDS,
  parameter int SRC_CW = 11,   // width of the capture FIFO count
  parameter int SNK_CW = 10    // width of the read FIFO free-space count
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the main module controller
  input  logic              start_wr,
  input  logic              start_rd,
  input  logic [ADDR_W-1:0] rd_len,
  input  logic              flush,
  output logic              wr_done,
  output logic [ADDR_W-1:0] wr_len,
  output logic              rd_done,
  output logic              busy,
  // run-time configuration
  input  logic [BSZ_W-1:0]  wr_bsize,
  input  logic [BSZ_W-1:0]  rd_bsize,
  input  logic [1:0]        bl_code,
  // capture FIFO (write source)
  input  logic [SRC_CW-1:0] src_count,
  input  logic [DATA_W-1:0] src_data,
  output logic              src_pop,
  // read module FIFO (read sink)
  input  logic [SNK_CW-1:0] snk_space,
  output logic              snk_push,
  output logic [DATA_W-1:0] snk_data,
  output logic              snk_last,
  // local bus to the SDRAM controller
  output lb_req_t           lb_req,
  input  lb_rsp_t           lb_rsp
);
  typedef enum logic [1:0] {M_IDLE, M_WRITE, M_READ} mode_e;

  mode_e             mode;
  logic              req_q;       // request line held until RW_ACK
  logic [BSZ_W-1:0]  req_size;
  logic [ADDR_W-1:0] req_addr;
  logic [ADDR_W:0]   inflight;    // words granted but not yet moved
  logic [DATA_W-1:0] datain_q;

  logic [ADDR_W-1:0] addr, remaining, limit;
  logic [BSZ_W-1:0]  burst, bsize;
  logic              at_end, ack, clear;
  logic [ADDR_W:0]   src_free;    // FIFO words not yet promised
  logic [ADDR_W:0]   snk_free;    // FIFO room not yet promised
  logic [BSZ_W-1:0]  next_size;
  logic              can_req;

  assign ack   = req_q && lb_rsp.rw_ack;
  assign clear = start_wr || start_rd;
  assign limit = (mode == M_READ) ? rd_len : ADDR_W'(BUF_WORDS);
  assign bsize = (mode == M_READ) ? rd_bsize : wr_bsize;

  addr_incr u_addr (
    .clk, .rst_n,
    .clear,
    .advance (ack),
    .step    (req_size),
    .limit,
    .bsize,
    .bl_code,
    .addr,
    .remaining,
    .burst,
    .at_end
  );

  always_comb begin
    src_free  = (ADDR_W+1)'(src_count) - inflight;
    snk_free  = (ADDR_W+1)'(snk_space) - inflight;
    next_size = burst;
    can_req   = 1'b0;
    if (!req_q && !at_end && !clear) begin
      if (mode == M_WRITE) begin
        if (src_free >= (ADDR_W+1)'(burst)) begin
          can_req = 1'b1;
        end else if (flush && src_free != '0) begin
          can_req   = 1'b1;
          next_size = BSZ_W'(src_free);   // tail burst, shorter than `burst`
        end
      end else if (mode == M_READ) begin
        // snk_space is sampled before words in flight land, so compare with
        // the room left after them.
        if (snk_space >= SNK_CW'(inflight) && snk_free >= (ADDR_W+1)'(burst))
          can_req = 1'b1;
      end
    end
  end

  logic moved;
  assign moved = (mode == M_WRITE) ? lb_rsp.d_req : (mode == M_READ) ? lb_rsp.r_valid : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= M_IDLE;
      req_q    <= 1'b0;
      req_size <= '0;
      req_addr <= '0;
      inflight <= '0;
      datain_q <= '0;
      wr_done  <= 1'b0;
      rd_done  <= 1'b0;
      wr_len   <= '0;
    end else begin
      wr_done <= 1'b0;
      rd_done <= 1'b0;
      if (lb_rsp.d_req && mode == M_WRITE) datain_q <= src_data;
      inflight <= inflight + (ack ? (ADDR_W+1)'(req_size) : '0) - (ADDR_W+1)'(moved);
      if (ack) req_q <= 1'b0;
      if (can_req) begin
        req_q    <= 1'b1;
        req_size <= next_size;
        req_addr <= addr;
      end
      case (mode)
        M_IDLE: begin
          if (start_wr)      mode <= M_WRITE;
          else if (start_rd) mode <= M_READ;
        end
        M_WRITE: begin
          if (!req_q && !can_req && inflight == '0 && !clear &&
              (at_end || (flush && src_count == '0))) begin
            mode    <= M_IDLE;
            wr_done <= 1'b1;
            wr_len  <= addr;
          end
        end
        M_READ: begin
          if (!req_q && inflight == '0 && at_end && !clear) begin
            mode    <= M_IDLE;
            rd_done <= 1'b1;
          end
        end
        default: mode <= M_IDLE;
      endcase
    end
  end

  assign busy     = (mode != M_IDLE);
  assign src_pop  = (mode == M_WRITE) && lb_rsp.d_req;
  assign snk_push = (mode == M_READ) && lb_rsp.r_valid;
  assign snk_data = lb_rsp.dataout;
  assign snk_last = snk_push && at_end && !req_q && inflight == (ADDR_W+1)'(1);

  always_comb begin
    lb_req          = '0;
    lb_req.raddr    = req_addr;
    lb_req.b_size   = req_size;
    lb_req.w_req    = req_q && (mode == M_WRITE);
    lb_req.r_req    = req_q && (mode == M_READ);
    lb_req.auto_pch = 1'b0;
    lb_req.datain   = datain_q;
  end

  // Local-bus rules: a request is held until acknowledged with stable fields,
  // and only one of R_REQ / W_REQ is raised.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (req_q && !lb_rsp.rw_ack) |=> (req_q && $stable(req_addr) && $stable(req_size)));
  a_one_req: assert property (@(posedge clk) disable iff (!rst_n)
    !(lb_req.w_req && lb_req.r_req));
  a_size_ok: assert property (@(posedge clk) disable iff (!rst_n)
    req_q |-> (req_size != '0 && req_size <= 4'd8));
endmodule
