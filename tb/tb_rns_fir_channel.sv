// tb_rns_fir_channel -- self-checking test of the filter of one modulus
// (moduli 11 and 32, 128 taps as 16 TAPs of 8).
//
// The testbench plays the sequencer: after writing 128 random coefficient
// residues it feeds random sample residues, each followed by a frame of 8 MAC
// cycles and a tree_en pulse, with some frames back to back (load in the last
// MAC cycle) and some separated by idle cycles. A model keeps the 128-sample
// history and checks y_res = <sum_k a_k x(n-k)>_M after every frame, so the
// delay line through the TAPs, the coefficient addressing and the adder tree
// are all covered.
module tb_rns_fir_channel;
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

    logic         rst_n, coef_we, smp_load, mac_en, first, last, tree_en;
    logic [6:0]   coef_addr;
    logic [2:0]   j;
    logic [W-1:0] coef_res, x_res, y_res;

    rns_fir_channel #(.M(M), .N_TAPS(128), .N_SEG(16)) dut (.*);

    int a_m [128];
    int h_m [128];

    initial begin
      int  expv, q[$];
      bit  busy, last_d;
      int  jj, sent, gap;
      rst_n = 0; coef_we = 0; smp_load = 0; mac_en = 0; first = 0; last = 0;
      tree_en = 0; coef_addr = 0; j = 0; coef_res = 0; x_res = 0;
      for (int k = 0; k < 128; k++) h_m[k] = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int k = 0; k < 128; k++) begin
        a_m[k] = $urandom_range(0, M - 1);
        coef_we = 1; coef_addr = 7'(k); coef_res = W'(a_m[k]);
        @(posedge clk); #1;
      end
      coef_we = 0;
      busy = 0; last_d = 0; jj = 0; sent = 0; gap = 0;
      // cycle loop: the testbench sequences the channel like the controller
      while (sent < 300 || busy || last_d || q.size() > 0) begin
        mac_en   = busy;
        j        = 3'(jj);
        first    = busy && jj == 0;
        last     = busy && jj == 7;
        tree_en  = last_d;
        smp_load = (sent < 300) && (gap == 0) && (!busy || last);
        if (smp_load) begin
          x_res = W'(($urandom_range(0, 4) == 0) ? 0 : $urandom_range(0, M - 1));
          for (int k = 127; k > 0; k--) h_m[k] = h_m[k-1];
          h_m[0] = int'(x_res);
          expv = 0;
          for (int k = 0; k < 128; k++) expv = (expv + a_m[k] * h_m[k]) % M;
          q.push_back(expv);
          sent++;
          if ($urandom_range(0, 3) == 0) gap = $urandom_range(9, 14);
        end
        @(posedge clk); #1;
        if (tree_en) begin
          expv = q.pop_front();
          checks++;
          if (int'(y_res) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d y=%0d expected %0d", M, y_res, expv);
          end
        end
        if (gap > 0) gap--;
        last_d = last;
        if (smp_load) begin
          busy = 1; jj = 0;
        end else if (last) begin
          busy = 0; jj = 0;
        end else if (busy) jj++;
      end
      done++;
    end
  end

  initial begin
    wait (done == 2);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
