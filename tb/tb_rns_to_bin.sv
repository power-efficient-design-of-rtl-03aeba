// tb_rns_to_bin -- self-checking test of the output converter (Chinese
// remainder theorem, 36-bit signed result).
//
// Random signed values in the 36-bit range, and the corners 0, +-1,
// 2^35-1 and -2^35, are encoded into residues by the testbench and applied
// with en high; one clock later y must equal the value. A further set of
// cycles with en low checks that y holds.
module tb_rns_to_bin;
  int checks   = 0;
  int failures = 0;

  logic               clk = 1'b0;
  logic               rst_n, en;
  rns_pkg::rns_t      res;
  logic signed [35:0] y;

  always #5 clk = ~clk;

  rns_to_bin #(.YW(36)) dut (.*);

  task automatic check(longint val);
    for (int i = 0; i < rns_pkg::P; i++) begin
      longint m = longint'(rns_pkg::MODULI[i]);
      res[i] = rns_pkg::RW'(((val % m) + m) % m);
    end
    en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    checks++;
    if (longint'(y) != val) begin
      failures++;
      if (failures < 10) $display("FAIL value %0d gave %0d", val, y);
    end
  endtask

  initial begin
    longint r;
    rst_n = 1'b0; en = 1'b0; res = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    check(0); check(1); check(-1); check((longint'(1) <<< 35) - 1); check(-(longint'(1) <<< 35));
    for (int n = 0; n < 2000; n++) begin
      r = {$urandom(), $urandom()};
      r = r >>> 28;                      // signed, |r| < 2^35
      check(r);
    end
    r = 12345;
    check(r);
    res = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (longint'(y) != r) begin failures++; $display("FAIL y did not hold"); end
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
