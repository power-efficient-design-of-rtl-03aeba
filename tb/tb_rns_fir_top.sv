// tb_rns_fir_top -- end-to-end self-checking test of the RNS serial/parallel
// FIR filter at its full size (128 taps, 16 TAPs of 8, ten moduli).
//
// A reference model in the testbench keeps the coefficient set and the sample
// history and computes y(n) = sum a_k x(n-k) exactly in 64-bit integers; the
// expected output is that sum read modulo the RNS dynamic range as a signed
// number and truncated to 36 bits (equal to the exact sum whenever it fits).
// The test runs these phases and counts how often each mechanism happened:
//   1. initial coefficient load (small random mask), back-to-back samples;
//   2. samples with idle gaps (engine idle, register-file clocks stopped);
//   3. mask change: a new full-range coefficient set, then full-range samples
//      whose sums exceed the 36-bit range (outputs wrap);
//   4. a sparse mask and samples with many zeros (zero-operand detection).
// It also checks the rate (a new sample accepted every 8 cycles when samples
// are back to back), the latency (out_valid 11 cycles after the load cycle)
// and the clock gating: the sample register file of one TAP is clocked once
// per sample and the coefficient file of another only when written.
module tb_rns_fir_top;
  localparam int N_TAPS = 128;
  localparam int N_SER  = 8;
  localparam int LAT    = N_SER + 3;
  localparam longint MT = longint'(rns_pkg::dyn_range());

  logic                clk = 1'b0;
  logic                rst_n;
  logic                coef_we;
  logic [6:0]          coef_addr;
  logic signed [17:0]  coef_data;
  logic                in_valid;
  logic                in_ready;
  logic signed [17:0]  x_in;
  logic                out_valid;
  logic signed [35:0]  y_out;

  rns_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  longint cycle = 0;

  // reference model
  longint coef [N_TAPS];
  longint hist [N_TAPS];          // hist[k] = x(n-k)
  longint exp_q [$];
  longint t_q   [$];

  // mechanism counters
  int n_coef_wr = 0, n_loads = 0, n_b2b = 0, n_gap = 0, n_reload = 0;
  int n_wrap = 0, n_neg = 0, n_zero_x = 0, n_outputs = 0;
  longint last_load = -100;

  function automatic longint map_out(longint s);
    longint r = s % MT;
    logic [63:0] u;
    if (r < 0) r += MT;
    if (r > (MT - 1) / 2) r -= MT;
    u = r;
    return longint'($signed(u[35:0]));
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // accepted samples: update the model, queue the expected output
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      longint s;
      s = 0;
      for (int k = N_TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(x_in);
      for (int k = 0; k < N_TAPS; k++) s += coef[k] * hist[k];
      exp_q.push_back(map_out(s));
      t_q.push_back(cycle);
      if (map_out(s) != s) n_wrap++;
      if (s < 0) n_neg++;
      if (x_in == 0) n_zero_x++;
      if (cycle - last_load == N_SER) n_b2b++;
      else if (cycle - last_load > N_SER && last_load >= 0) n_gap++;
      checks++;
      if (cycle - last_load < N_SER) begin
        failures++;
        $display("FAIL sample accepted %0d cycles after the previous one", cycle - last_load);
      end
      last_load = cycle;
      n_loads++;
    end
  end

  // outputs
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e, t;
      n_outputs++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL output with no sample pending");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (longint'(y_out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d expected %0d", y_out, e);
        end
        if (cycle - t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d expected %0d", cycle - t, LAT);
        end
      end
    end
  end

  // clock-gating observation: TAP 3 of the modulus-11 channel
  int n_gclk_smp = 0, n_gclk_coef = 0, n_wr_tap3 = 0;
  always @(posedge dut.g_ch[3].u_ch.g_tap[3].u_tap.gclk_smp)  if (rst_n) n_gclk_smp++;
  always @(posedge dut.g_ch[3].u_ch.g_tap[3].u_tap.gclk_coef) if (rst_n) n_gclk_coef++;

  task automatic write_coef(int k, longint v);
    coef_we   = 1'b1;
    coef_addr = 7'(k);
    coef_data = 18'(v);
    coef[k]   = v;
    n_coef_wr++;
    if (k / N_SER == 3) n_wr_tap3++;
    @(posedge clk);
    #1 coef_we = 1'b0;
  endtask

  task automatic send(longint v);
    in_valid = 1'b1;
    x_in     = 18'(v);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic drain();
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    #1;
  endtask

  function automatic longint rnd(int bits);   // signed, |v| < 2^(bits-1)
    return longint'($signed($urandom_range(0, (1 << bits) - 1))) - (longint'(1) << (bits - 1));
  endfunction

  initial begin
    rst_n = 1'b0; coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    in_valid = 1'b0; x_in = '0;
    for (int k = 0; k < N_TAPS; k++) begin coef[k] = 0; hist[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // 1. initial mask, back-to-back samples (outputs stay inside 36 bits)
    for (int k = 0; k < N_TAPS; k++) write_coef(k, rnd(12));
    for (int n = 0; n < 200; n++) send(rnd(18));
    drain();

    // 2. samples with idle gaps
    for (int n = 0; n < 60; n++) begin
      send(rnd(18));
      repeat ($urandom_range(0, 12)) @(posedge clk);
      #1;
    end
    drain();

    // 3. mask change to full-range coefficients, full-range samples
    n_reload++;
    for (int k = 0; k < N_TAPS; k++) write_coef(k, rnd(18));
    for (int n = 0; n < 200; n++) send((n % 2 == 0) ? 131071 : rnd(18));
    for (int n = 0; n < 20; n++) send(-131072);
    drain();

    // 4. sparse mask, sparse samples
    n_reload++;
    for (int k = 0; k < N_TAPS; k++) write_coef(k, ($urandom_range(0, 3) == 0) ? rnd(18) : 0);
    for (int n = 0; n < 200; n++) send(($urandom_range(0, 2) == 0) ? rnd(18) : 0);
    drain();

    // every mechanism must have happened
    checks += 9;
    if (n_coef_wr == 0) begin failures++; $display("FAIL no coefficient write"); end
    if (n_b2b     == 0) begin failures++; $display("FAIL no back-to-back samples"); end
    if (n_gap     == 0) begin failures++; $display("FAIL no idle gap"); end
    if (n_reload  == 0) begin failures++; $display("FAIL no mask change"); end
    if (n_wrap    == 0) begin failures++; $display("FAIL no output beyond 36 bits"); end
    if (n_neg     == 0) begin failures++; $display("FAIL no negative output"); end
    if (n_zero_x  == 0) begin failures++; $display("FAIL no zero sample"); end
    if (n_outputs != n_loads) begin
      failures++; $display("FAIL %0d outputs for %0d samples", n_outputs, n_loads);
    end
    if (n_gclk_smp != n_loads || n_gclk_coef != n_wr_tap3) begin
      failures++;
      $display("FAIL gated clocks: sample file %0d edges for %0d loads, coef file %0d edges for %0d writes",
               n_gclk_smp, n_loads, n_gclk_coef, n_wr_tap3);
    end
    $display("coef writes %0d, samples %0d (back-to-back %0d, after gap %0d), mask changes %0d",
             n_coef_wr, n_loads, n_b2b, n_gap, n_reload);
    $display("wrapped outputs %0d, negative %0d, zero samples %0d, gated edges smp %0d coef %0d",
             n_wrap, n_neg, n_zero_x, n_gclk_smp, n_gclk_coef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
