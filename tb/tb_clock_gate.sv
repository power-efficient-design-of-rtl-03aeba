// tb_clock_gate -- self-checking test of the latch-based clock gate.
//
// en is changed at random points of both clock phases. The testbench checks
// that gclk follows clk exactly in the cycles whose enable was high at the
// rising edge (sampled while clk was low), that gclk stays low otherwise, and
// that a change of en while clk is high never reaches gclk (no glitch).
module tb_clock_gate;
  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic en;
  logic gclk;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  int n_on = 0, n_off = 0;

  initial begin
    bit e;
    en = 1'b0;
    @(negedge clk);
    for (int c = 0; c < 400; c++) begin
      // low phase: choose the enable for the coming rising edge
      e = 1'(($urandom_range(0, 2)) != 0);
      #2 en = e;
      @(posedge clk);
      #1;
      checks++;
      if (gclk != e) begin failures++; $display("FAIL cycle %0d gclk=%0d en=%0d", c, gclk, e); end
      if (e) n_on++; else n_off++;
      // high phase: a change of en must not reach gclk
      en = ~e;
      #2;
      checks++;
      if (gclk != e) begin failures++; $display("FAIL glitch in cycle %0d", c); end
      @(negedge clk);
      #1;
      checks++;
      if (gclk != 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
