// tb_addr_incr: self-checking test of the address increment module.
// Random clears, advances, burst sizes, burst-length codes and limits are
// applied; a reference address kept by the testbench predicts addr, and the
// proposed burst is checked against an independently written rule: at least
// one word, at most the requested size, never past the limit, never across
// a BL-aligned boundary, and maximal under those constraints.
module tb_addr_incr;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear, advance;
  logic [BSZ_W-1:0] step, bsize, burst;
  logic [1:0] bl_code;
  logic [ADDR_W-1:0] limit, addr, remaining;
  logic at_end;
  int checks = 0, failures = 0;
  longint ref_addr;

  addr_incr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%0d ref=%0d bsize=%0d bl=%0d limit=%0d burst=%0d", what,
               addr, ref_addr, bsize, bl_code, limit, burst);
    end
  endtask

  function automatic int exp_burst(longint ad, int bs, int blc, longint lim);
    int blw = 1 << blc;
    int b = (bs == 0) ? 1 : bs;
    int room = blw - int'(ad % blw);
    longint rem = (ad >= lim) ? 0 : lim - ad;
    if (b > room) b = room;
    if (b > rem) b = int'(rem);
    return b;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; advance = 0; step = 0; bsize = 8; bl_code = 3; limit = 100;
    ref_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(addr == 0, "reset");
    for (int i = 0; i < 3000; i++) begin
      if (i % 200 == 0) begin
        limit = ADDR_W'($urandom_range(1, 300));
        if (i == 1000) limit = ADDR_W'(SDRAM_WORDS);
        clear = 1;
        @(negedge clk);
        clear = 0;
        ref_addr = 0;
        if (i == 1000) begin
          // jump near the end of a full-size buffer
          force dut.addr = ADDR_W'(SDRAM_WORDS - 21);
          @(negedge clk);
          release dut.addr;
          ref_addr = SDRAM_WORDS - 21;
        end
      end
      bsize   = BSZ_W'($urandom_range(0, 8));
      bl_code = 2'($urandom_range(0, 3));
      #1;
      check(remaining == ((ref_addr >= limit) ? 0 : ADDR_W'(limit - ref_addr)), "remaining");
      check(at_end == (ref_addr >= limit), "at_end");
      if (!at_end) check(int'(burst) == exp_burst(ref_addr, bsize, bl_code, limit), "burst");
      advance = !at_end && ($urandom_range(0, 3) != 0);
      step    = burst;
      @(negedge clk);
      if (advance) ref_addr += step;
      advance = 0;
      check(addr == ADDR_W'(ref_addr), "addr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
