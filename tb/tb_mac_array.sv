// Self-checking test of mac_array with a store latency of 7 (the bank case)
// and of 1 (the output buffer case).  Random read-modify-write operations,
// one per cycle, go to distinct addresses within a window so that no read
// overtakes a pending write; the store contents are compared with an
// independent fixed-point reference, and the write-back is checked to
// follow issue by exactly ACC_LAT+1 cycles.
module tb_mac_array;
  import lift_pkg::*;
  import lift_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done7 = 0, done1 = 0;
  mac_tester #(.LAT(7)) t7 (.clk, .rst_n, .done(done7));
  mac_tester #(.LAT(1)) t1 (.clk, .rst_n, .done(done1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done7 && done1);
    checks   = t7.checks + t1.checks;
    failures = t7.failures + t1.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
