// tb_adc_capture: self-checking test of the ADC capture stage.
// A reference model in the testbench (an input register and a queue of
// bounded size) predicts which samples reach the FIFO, in which order, and
// which are lost. Phase 1 captures random samples with random gaps and random
// pops and must lose nothing; phase 2 stops popping so the FIFO overflows and
// the loss counter and overrun flag must match the model; the FIFO is then
// drained and the surviving samples checked. busy and the 2-clock latency from
// adc_data to the FIFO are checked too.
module tb_adc_capture;
  import das_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic acq_en = 0, adc_valid = 0, pop = 0;
  logic [ADC_W-1:0] adc_data = 0;
  logic [DATA_W-1:0] dout;
  logic [$clog2(DEPTH):0] count;
  logic empty, busy, overrun;
  logic [31:0] lost_cnt;
  int checks = 0, failures = 0;

  adc_capture #(.FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  // reference model
  logic [DATA_W-1:0] q[$];
  logic m_v = 0;
  logic [ADC_W-1:0] m_d = 0;
  int m_lost = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pop && q.size() > 0) void'(q.pop_front());
    if (m_v) begin
      if (q.size() == DEPTH + (pop ? 1 : 0)) m_lost++;   // full before the edge
      else q.push_back(DATA_W'(m_d));
    end
    m_v <= acq_en && adc_valid;
    m_d <= adc_data;
  end

  // compare at each falling edge
  always @(negedge clk) if (rst_n) begin
    check(int'(count) == q.size(), "count");
    check(empty == (q.size() == 0), "empty");
    if (q.size() > 0) check(dout == q[0], "head word");
    check(int'(lost_cnt) == m_lost, "lost count");
    check(overrun == (m_lost > 0), "overrun flag");
    check(busy == m_v, "busy");
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: no loss, pops keep up on average
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      acq_en    = ($urandom_range(0, 9) != 0);
      adc_valid = ($urandom_range(0, 3) != 0);
      adc_data  = ADC_W'($urandom);
      pop      = !empty && ($urandom_range(0, 4) != 0);
    end
    acq_en = 0;
    check(m_lost == 0, "no loss while draining keeps up");
    // phase 2: overflow
    pop = 0;
    for (int i = 0; i < 3 * DEPTH; i++) begin
      @(negedge clk);
      acq_en    = 1;
      adc_valid = 1;
      adc_data  = ADC_W'(i);
    end
    @(negedge clk);
    acq_en = 0;
    repeat (3) @(negedge clk);
    check(m_lost > 0 && overrun, "overflow happened");
    // drain
    while (!empty) begin
      pop = 1;
      @(negedge clk);
    end
    pop = 0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
