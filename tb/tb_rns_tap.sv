// tb_rns_tap -- self-checking test of one TAP (multiply-accumulate unit with
// clock-gated coefficient and sample register files), modulus 11 and 32.
//
// The testbench writes random coefficient residues, then repeatedly shifts a
// random sample into the sample file and runs one frame of 8 MAC cycles
// (first on j = 0, last on j = 7), the next load coinciding with the last
// MAC cycle as in the filter. A model of both register files gives the
// expected partial sum <sum_j c[j] s[j]>_M, checked in psum after each frame,
// and the expected sample leaving on smp_out. It also counts the edges of
// both gated clocks: one per load and one per write, none while idle.
module tb_rns_tap;
  int checks   = 0;
  int failures = 0;
  int done     = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  typedef int unsigned ml_t [2];
  localparam ml_t ML = '{11, 32};

  for (genvar g = 0; g < 2; g++) begin : g_m
    localparam int unsigned M = ML[g];
    localparam int W = rns_pkg::cw(M);

    logic         rst_n, coef_we, smp_load, mac_en, first, last;
    logic [2:0]   coef_idx, j;
    logic [W-1:0] coef_res, smp_in, smp_out, psum;

    rns_tap #(.M(M), .N_SER(8)) dut (.*);

    int c_m [8];
    int s_m [8];
    int n_gs = 0, n_gc = 0, n_ld = 0, n_wr = 0;
    always @(posedge dut.gclk_smp)  if (rst_n) n_gs++;
    always @(posedge dut.gclk_coef) if (rst_n) n_gc++;

    initial begin
      int expv;
      rst_n = 0; coef_we = 0; smp_load = 0; mac_en = 0; first = 0; last = 0;
      coef_idx = 0; j = 0; coef_res = 0; smp_in = 0;
      for (int k = 0; k < 8; k++) begin c_m[k] = 0; s_m[k] = 0; end
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      // write coefficients in a scrambled order
      for (int k = 0; k < 8; k++) begin
        int idx = (k * 5 + 3) % 8;
        int v   = $urandom_range(0, M - 1);
        coef_we = 1; coef_idx = 3'(idx); coef_res = W'(v); c_m[idx] = v; n_wr++;
        @(posedge clk); #1;
      end
      coef_we = 0;
      repeat (3) @(posedge clk);
      #1;
      for (int f = 0; f < 40; f++) begin
        // load cycle (also the last MAC cycle of the previous frame)
        smp_load = 1; smp_in = W'((f % 7 == 0) ? 0 : $urandom_range(0, M - 1));
        expv = s_m[7];
        checks++;
        if (int'(smp_out) != expv) begin
          failures++; $display("FAIL m=%0d smp_out=%0d expected %0d", M, smp_out, expv);
        end
        @(posedge clk); #1;
        for (int k = 7; k > 0; k--) s_m[k] = s_m[k-1];
        s_m[0] = int'(smp_in);
        smp_load = 0; n_ld++;
        expv = 0;
        for (int k = 0; k < 8; k++) expv = (expv + c_m[k] * s_m[k]) % M;
        for (int k = 0; k < 8; k++) begin
          mac_en = 1; j = 3'(k); first = (k == 0); last = (k == 7);
          @(posedge clk); #1;
        end
        mac_en = 0; first = 0; last = 0;
        checks++;
        if (int'(psum) != expv) begin
          failures++; $display("FAIL m=%0d psum=%0d expected %0d", M, psum, expv);
        end
        // idle: nothing may change
        repeat (f % 3) @(posedge clk);
        #1;
        checks++;
        if (int'(psum) != expv) begin
          failures++; $display("FAIL m=%0d psum changed while idle", M);
        end
      end
      checks += 2;
      if (n_gs != n_ld) begin failures++; $display("FAIL m=%0d %0d sample clock edges for %0d loads", M, n_gs, n_ld); end
      if (n_gc != n_wr) begin failures++; $display("FAIL m=%0d %0d coef clock edges for %0d writes", M, n_gc, n_wr); end
      done++;
    end
  end

  initial begin
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
