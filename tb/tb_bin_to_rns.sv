// tb_bin_to_rns -- self-checking test of the 18-bit input converter.
//
// Random signed inputs, plus the corner values 0, +-1, the largest and the
// most negative 18-bit numbers, are applied; each of the ten residues is
// compared with the mathematical residue ((v mod m) + m) mod m computed by
// the testbench. The converter is combinational.
module tb_bin_to_rns;
  int checks   = 0;
  int failures = 0;

  logic signed [17:0] v;
  rns_pkg::rns_t      res;

  bin_to_rns #(.W(18)) dut (.v(v), .res(res));

  task automatic check(int val);
    v = 18'(val);
    #1;
    for (int i = 0; i < rns_pkg::P; i++) begin
      int m = int'(rns_pkg::MODULI[i]);
      int e = ((val % m) + m) % m;
      checks++;
      if (int'(res[i]) != e) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d m=%0d res=%0d expected %0d", val, m, res[i], e);
      end
    end
  endtask

  initial begin
    check(0); check(1); check(-1); check(131071); check(-131072); check(-131071);
    for (int n = 0; n < 2000; n++) check($urandom_range(0, 262143) - 131072);
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
