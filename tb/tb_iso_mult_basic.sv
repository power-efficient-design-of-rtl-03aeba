// tb_iso_mult_basic -- exhaustive self-checking test of iso_mult_basic.
//
// For every prime modulus of the base, every operand pair (a, b) with 0 <= a, b < m is applied and the
// product is compared with (a * b) mod m computed by the testbench. Zero
// operands are part of the sweep, so the zero detector is exercised. The
// multiplier is combinational: each pair is checked one time unit after it
// is applied. For m = 11 the index table is also compared with the classic
// isomorphism table of root r = 2 (index of 1..10: 0 1 8 2 4 9 7 3 6 5).
module tb_iso_mult_basic;
  localparam int NM = 9;
  typedef int unsigned mlist_t [NM];
  localparam mlist_t ML = '{3, 5, 7, 11, 13, 17, 19, 23, 31};

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  for (genvar g = 0; g < NM; g++) begin : g_m
    localparam int unsigned M = ML[g];
    localparam int W = rns_pkg::cw(M);
    logic [W-1:0] a, b, p;
    iso_mult_basic #(.M(M)) dut (.a(a), .b(b), .p(p));
    initial begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) begin
          a = W'(i);
          b = W'(j);
          #1;
          checks++;
          if (int'(p) != (i * j) % M) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d %0d*%0d -> %0d", M, i, j, p);
          end
        end
      end
      done++;
    end
  end

  // DIT table of m = 11 against the isomorphism table for r = 2
  initial begin
    int tab [11] = '{0, 0, 1, 8, 2, 4, 9, 7, 3, 6, 5};
    #1;
    for (int v = 1; v < 11; v++) begin
      checks++;
      if (int'(g_m[3].dut.dit_rom[v]) != tab[v]) begin
        failures++;
        $display("FAIL index of %0d is %0d, table says %0d", v, g_m[3].dut.dit_rom[v], tab[v]);
      end
    end
  end

  initial begin
    wait (done == NM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
