// tb_read_module: self-checking test of the read module.
// Three sink ports are driven; only the one selected by rd_sel carries
// words (the others carry decoy pushes that must be ignored). Words are
// pushed only while `space` allows, the DSP side takes words with a random
// ready pattern, and the testbench checks order, data, the last flag, the
// space report, the delivered-word counter and the valid/ready rule that a
// word is held until taken.
module tb_read_module;
  import das_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] rd_sel = 0;
  logic [NBUF-1:0] snk_push = 0, snk_last = 0;
  logic [NBUF-1:0][DATA_W-1:0] snk_data = '0;
  logic [$clog2(DEPTH):0] space;
  logic [DATA_W-1:0] dsp_data;
  logic dsp_last, dsp_valid, dsp_ready = 0;
  logic [31:0] words_out;
  int checks = 0, failures = 0;

  read_module #(.FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  logic [DATA_W:0] q[$];
  int taken = 0, stalls = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(int'(space) == DEPTH && !dsp_valid, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      // drive both sides for the coming edge
      snk_push = '0;
      snk_last = '0;
      if (i % 500 == 0) rd_sel = 2'($urandom_range(0, NBUF - 1));
      for (int p = 0; p < NBUF; p++) snk_data[p] = DATA_W'($urandom);
      if (space > 0 && $urandom_range(0, 2) != 0) begin
        snk_push[rd_sel] = 1'b1;
        snk_last[rd_sel] = ($urandom_range(0, 9) == 0);
      end
      for (int p = 0; p < NBUF; p++) if (p != rd_sel) begin
        snk_push[p] = 1'($urandom_range(0, 1));
        snk_last[p] = 1'b1;
      end
      dsp_ready = ($urandom_range(0, 2) == 0);
      #1;
      // check the state before the edge, then apply the edge to the model
      check(int'(space) == DEPTH - q.size(), "space");
      check(int'(words_out) == taken, "words_out");
      if (dsp_valid) begin
        check(q.size() > 0 && {dsp_last, dsp_data} == q[0], "head word and last flag");
        if (dsp_ready) begin void'(q.pop_front()); taken++; end
        else stalls++;
      end else check(q.size() == 0, "valid while words held");
      if (snk_push[rd_sel]) q.push_back({snk_last[rd_sel], snk_data[rd_sel]});
      @(negedge clk);
    end
    check(stalls > 0, "DSP back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
