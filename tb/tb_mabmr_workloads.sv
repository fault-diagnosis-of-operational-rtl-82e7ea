// tb_mabmr_workloads: runs the fault sweep on the two sizes of system the design is
// held against: four levels (the worked example: 8 single and 24 double fault
// conditions) and six levels (the level count of the six-module timer application,
// with the example module logic). Every single-module fault must be isolated exactly;
// random double faults must end up isolated too, and at least one double fault per
// size must be located by a single diagnosis.
module tb_mabmr_workloads;
  logic clk = 0;
  int c4, f4, s4, d4, c6, f6, s6, d6;
  logic done4, done6;
  int checks, failures;

  always #5 clk = ~clk;

  mabmr_fault_sweep #(.NL(4), .NDOUBLE(24)) u_n4 (
    .clk, .n_checks(c4), .n_failures(f4), .n_singles(s4), .n_doubles(d4), .finished(done4));
  mabmr_fault_sweep #(.NL(6), .NDOUBLE(12)) u_n6 (
    .clk, .n_checks(c6), .n_failures(f6), .n_singles(s6), .n_doubles(d6), .finished(done6));

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c6, f4 + f6 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done4 && done6);
    checks = c4 + c6 + 4;
    failures = f4 + f6;
    $display("N=4: %0d of 8 single, %0d double in one diagnosis", s4, d4);
    $display("N=6: %0d of 12 single, %0d double in one diagnosis", s6, d6);
    if (s4 != 8) failures++;
    if (s6 != 12) failures++;
    if (d4 == 0) failures++;
    if (d6 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
