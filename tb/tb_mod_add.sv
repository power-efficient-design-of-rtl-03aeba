// tb_mod_add -- exhaustive self-checking test of the modular adder for every
// modulus of the base and for 10 (a modulo m-1 index adder), plus random
// operands at the 37-bit modulus of the whole base used by the output
// converter. Combinational: each case is checked one time unit after it is
// applied.
module tb_mod_add;
  int checks   = 0;
  int failures = 0;
  int done     = 0;

  localparam int NM = 11;
  typedef int unsigned ml_t [NM];
  localparam ml_t ML = '{3, 5, 7, 10, 11, 13, 17, 19, 23, 31, 32};

  for (genvar g = 0; g < NM; g++) begin : g_m
    localparam int unsigned M = ML[g];
    localparam int W = rns_pkg::cw(M);
    logic [W-1:0] a, b, s;
    mod_add #(.M(M)) dut (.a(a), .b(b), .sum(s));
    initial begin
      for (int i = 0; i < M; i++) begin
        for (int k = 0; k < M; k++) begin
          a = W'(i); b = W'(k);
          #1;
          checks++;
          if (int'(s) != (i + k) % M) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d %0d+%0d -> %0d", M, i, k, s);
          end
        end
      end
      done++;
    end
  end

  localparam longint unsigned MT = rns_pkg::dyn_range();
  logic [36:0] ba, bb, bs;
  mod_add #(.M(MT)) dut_big (.a(ba), .b(bb), .sum(bs));
  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint unsigned x, y;
      x = {$urandom(), $urandom()} % MT;
      y = (n % 10 == 0) ? MT - 1 - x : {$urandom(), $urandom()} % MT;
      ba = 37'(x); bb = 37'(y);
      #1;
      checks++;
      if (longint'(bs) != longint'((x + y) % MT)) begin
        failures++;
        if (failures < 10) $display("FAIL big %0d+%0d -> %0d", x, y, bs);
      end
    end
    done++;
  end

  initial begin
    wait (done == NM + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
