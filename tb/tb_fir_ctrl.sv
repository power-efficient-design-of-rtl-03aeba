// tb_fir_ctrl -- self-checking test of the filter sequencer.
//
// in_valid is driven with random gaps and long back-to-back runs. For every
// accepted sample the testbench expects: exactly 8 MAC cycles with j = 0..7
// directly after the load cycle, first on j = 0 and last on j = 7, tree_en
// one cycle after last, conv_en two cycles after and out_valid three cycles
// after (N_SER + 3 = 11 cycles after the load), and no acceptance while a
// frame is before its last MAC cycle. Back-to-back samples must be accepted
// exactly 8 cycles apart (the 20 MHz / 160 MHz rate).
module tb_fir_ctrl;
  int checks   = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n, in_valid, in_ready, smp_load, mac_en, first, last;
  logic       tree_en, conv_en, out_valid;
  logic [2:0] j;

  fir_ctrl #(.N_SER(8)) dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  longint loads [$];
  longint last_load = -1;
  int     n_b2b = 0, n_idle = 0, n_out = 0, n_load = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cycle, msg);
    end
  endtask

  // expected outputs from the history of load cycles
  always @(posedge clk) begin
    if (rst_n) begin
      longint since;
      bit     in_frame;
      int     ej;
      in_frame = 0; ej = 0;
      if (last_load >= 0 && cycle - last_load >= 1 && cycle - last_load <= 8) begin
        in_frame = 1; ej = int'(cycle - last_load - 1);
      end
      chk(mac_en == in_frame, "mac_en");
      if (in_frame) begin
        chk(int'(j) == ej, "j");
        chk(first == (ej == 0), "first");
        chk(last == (ej == 7), "last");
      end
      chk(in_ready == (!in_frame || ej == 7), "in_ready");
      chk(smp_load == (in_valid && in_ready), "smp_load");
      since = (loads.size() > 0) ? cycle - loads[0] : -1;
      chk(tree_en   == (loads.size() > 0 && since == 9),  "tree_en");
      chk(conv_en   == (loads.size() > 0 && since == 10), "conv_en");
      chk(out_valid == (loads.size() > 0 && since == 11), "out_valid");
      if (out_valid) begin void'(loads.pop_front()); n_out++; end
      if (smp_load) begin
        if (last_load >= 0 && cycle - last_load == 8) n_b2b++;
        if (last_load >= 0) chk(cycle - last_load >= 8, "rate");
        last_load = cycle;
        loads.push_back(cycle);
        n_load++;
      end
      if (!mac_en) n_idle++;
    end
    cycle <= cycle + 1;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      if (c < 1000) in_valid = 1'b1;                       // back to back
      else          in_valid = ($urandom_range(0, 9) == 0);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks += 2;
    if (n_b2b < 100 || n_idle == 0) begin failures++; $display("FAIL coverage b2b=%0d idle=%0d", n_b2b, n_idle); end
    if (n_out != n_load) begin failures++; $display("FAIL %0d outputs for %0d loads", n_out, n_load); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
