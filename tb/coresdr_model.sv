// coresdr_model: behavioural model of an SDRAM controller's local bus with
// the SDRAM storage behind it, for testbenches only.
//
// A request (W_REQ or R_REQ, held by the master) is acknowledged with a
// one-cycle RW_ACK after ACK_LAT idle cycles (row activation). For a write,
// D_REQ is then high for B_SIZE cycles and the word on DATAIN one cycle
// after each D_REQ is stored; W_VALID is D_REQ delayed by one cycle. For a
// read, R_VALID is high for B_SIZE cycles starting CL cycles after RW_ACK,
// with DATAOUT from storage.
// With `cascade` high, a request in the same direction that is waiting when
// the last word of a burst is moved is acknowledged in that same cycle and
// its words follow without a gap, as the real core does for chained
// sequential accesses; with `cascade` low a new request is taken only after
// the previous burst has ended. Every REF_PER cycles an auto-refresh keeps
// the model from acknowledging anything for RFC cycles, once no burst is
// active (never while `no_refresh` is high).
// The model counts refreshes and bursts, and counts as protocol errors a
// burst size outside 1..8, a burst crossing an 8-word boundary, an access
// beyond DEPTH and a request dropped before its acknowledge.
module coresdr_model
  import das_pkg::*;
#(
  parameter int unsigned DEPTH   = 4096,
  parameter int          ACK_LAT = 3,
  parameter int          CL      = 3,
  parameter int          REF_PER = 300,
  parameter int          RFC     = 9
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cascade,
  input  logic    no_refresh,
  input  lb_req_t lb_req,
  output lb_rsp_t lb_rsp,
  output int      refreshes,
  output int      wbursts,
  output int      rbursts,
  output int      errors
);
  logic [DATA_W-1:0] mem [DEPTH];

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_WDATA, S_RLAT, S_RDATA, S_REF} st_e;
  st_e st;
  int  cnt, left, ref_cnt;
  logic [ADDR_W-1:0] a, wa_pipe, wa_d1;
  logic dq;          // D_REQ of the previous cycle
  logic was_req, req, chain_w, chain_r;

  assign req     = (lb_req.w_req || lb_req.r_req) && !lb_rsp.rw_ack;
  assign chain_w = cascade && ref_cnt != 0 && lb_req.w_req && !lb_rsp.rw_ack;
  assign chain_r = cascade && ref_cnt != 0 && lb_req.r_req && !lb_rsp.rw_ack;

  function automatic bit bad_request(input lb_req_t r);
    return r.b_size == 0 || r.b_size > 8 || int'(r.raddr[2:0]) + int'(r.b_size) > 8 ||
           longint'(r.raddr) + longint'(r.b_size) > longint'(DEPTH);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= 0; left <= 0; ref_cnt <= REF_PER; a <= '0;
      wa_pipe <= '0; wa_d1 <= '0; dq <= 1'b0; was_req <= 1'b0;
      lb_rsp <= '0; refreshes <= 0; wbursts <= 0; rbursts <= 0; errors <= 0;
    end else begin
      lb_rsp.rw_ack  <= 1'b0;
      lb_rsp.d_req   <= 1'b0;
      lb_rsp.r_valid <= 1'b0;
      lb_rsp.w_valid <= lb_rsp.d_req;
      dq    <= lb_rsp.d_req;
      wa_d1 <= wa_pipe;
      if (dq) mem[wa_d1] <= lb_req.datain;
      if (ref_cnt > 0 && !no_refresh) ref_cnt <= ref_cnt - 1;
      was_req <= req;
      if (was_req && !(lb_req.w_req || lb_req.r_req) && !lb_rsp.rw_ack) errors <= errors + 1;
      case (st)
        S_IDLE: begin
          if (ref_cnt == 0) begin
            st <= S_REF; cnt <= RFC; ref_cnt <= REF_PER; refreshes <= refreshes + 1;
          end else if (req) begin
            st <= S_WAIT; cnt <= ACK_LAT;
          end
        end
        S_WAIT: begin
          if (!(lb_req.w_req || lb_req.r_req)) st <= S_IDLE;
          else if (cnt > 1) cnt <= cnt - 1;
          else begin
            lb_rsp.rw_ack <= 1'b1;
            a    <= lb_req.raddr;
            left <= int'(lb_req.b_size);
            if (bad_request(lb_req)) errors <= errors + 1;
            if (lb_req.w_req) begin
              st <= S_WDATA; wbursts <= wbursts + 1;
            end else begin
              st <= S_RLAT; cnt <= CL; rbursts <= rbursts + 1;
            end
          end
        end
        S_WDATA: begin
          if (left > 0) begin
            lb_rsp.d_req <= 1'b1;
            wa_pipe <= a;
            a    <= a + 1'b1;
            left <= left - 1;
            if (left == 1 && chain_w) begin
              lb_rsp.rw_ack <= 1'b1;
              a    <= lb_req.raddr;
              left <= int'(lb_req.b_size);
              wbursts <= wbursts + 1;
              if (bad_request(lb_req)) errors <= errors + 1;
            end
          end else if (!lb_rsp.d_req && !dq) begin
            st <= S_IDLE;
          end
        end
        S_RLAT: begin
          if (cnt > 1) cnt <= cnt - 1;
          else st <= S_RDATA;
        end
        S_RDATA: begin
          if (left > 0) begin
            lb_rsp.r_valid <= 1'b1;
            lb_rsp.dataout <= mem[a];
            a    <= a + 1'b1;
            left <= left - 1;
            if (left == 1 && chain_r) begin
              lb_rsp.rw_ack <= 1'b1;
              a    <= lb_req.raddr;
              left <= int'(lb_req.b_size);
              rbursts <= rbursts + 1;
              if (bad_request(lb_req)) errors <= errors + 1;
            end
          end else st <= S_IDLE;
        end
        S_REF: begin
          if (cnt > 1) cnt <= cnt - 1;
          else st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  function automatic logic [DATA_W-1:0] peek(input int unsigned addr);
    return mem[addr];
  endfunction
endmodule
