// tb_fault_locator: self-checking testbench of fault_locator.
// Uses the four-level example test sequence T0 = 0000, T1 = 0011, T3 = 0101,
// T4 = 0110 (written t0 t1 t2 t3; in the vectors below bit k is t_k). For every one of
// the 8 single and 24 correctable double fault conditions it forms the outcome row with
// its own module-by-module model and checks that the locator names exactly that
// condition. It also checks rows of the example data matrices, an ambiguous case,
// an unmatched case and location with a level taken out of service.
module tb_fault_locator;
  import mabmr_pkg::*;
  localparam int N = 4, MAXT = 8;
  logic [N-1:0] tests [MAXT];
  result_e      results [MAXT];
  logic [3:0]   ntests;
  logic [N-1:0] active, fault_a, fault_b;
  logic         found, ambiguous;
  logic [1:0]   order;
  int checks = 0, failures = 0;

  fault_locator #(.N(N), .MAXT(MAXT), .MAX_ORD(2)) dut (.*);

  // independent reference: walk the modules one by one
  function automatic result_e ref_outcome(input logic [N-1:0] fa, input logic [N-1:0] fb,
                                          input logic [N-1:0] t);
    bit in_a, in_b;
    in_a = 0; in_b = 0;
    for (int k = 0; k < N; k++) begin
      if (fa[k]) begin if (t[k]) in_b = 1; else in_a = 1; end
      if (fb[k]) begin if (t[k]) in_a = 1; else in_b = 1; end
    end
    if (in_a && in_b) return RES_BOTH;
    if (in_a) return RES_A;
    if (in_b) return RES_B;
    return RES_NONE;
  endfunction

  task automatic apply(input logic [N-1:0] fa, input logic [N-1:0] fb);
    for (int j = 0; j < MAXT; j++)
      results[j] = (j < ntests) ? ref_outcome(fa, fb, tests[j]) : RES_NONE;
    #1;
  endtask

  task automatic expect_fault(input logic [N-1:0] fa, input logic [N-1:0] fb, input int ord);
    checks++;
    if (!(found && !ambiguous && fault_a == fa && fault_b == fb && order == 2'(ord))) begin
      failures++;
      $display("fault A=%b B=%b: found=%b amb=%b A=%b B=%b order=%0d", fa, fb, found,
               ambiguous, fault_a, fault_b, order);
    end
  endtask

  // a row of the example data matrix: outcome digits under T0, T1, T3, T4
  task automatic row(input logic [N-1:0] fa, input logic [N-1:0] fb, input int d0, input int d1,
                     input int d2, input int d3);
    int d [4];
    d = '{d0, d1, d2, d3};
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (int'(ref_outcome(fa, fb, tests[j])) != d[j]) begin
        failures++;
        $display("data matrix row A=%b B=%b test %0d: %0d", fa, fb, j, d[j]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < MAXT; j++) begin tests[j] = '0; results[j] = RES_NONE; end
    tests[0] = 4'b0000;   // T0
    tests[1] = 4'b1100;   // T1 = [0 0 1 1]
    tests[2] = 4'b1010;   // T3 = [0 1 0 1]
    tests[3] = 4'b0110;   // T4 = [0 1 1 0]
    ntests = 4;
    active = 4'b1111;
    // rows of the example matrices (single faults; double faults of A)
    row(4'b0001, 4'b0000, 0, 0, 0, 0);
    row(4'b1000, 4'b0000, 0, 1, 1, 0);
    row(4'b0000, 4'b0001, 1, 1, 1, 1);
    row(4'b0011, 4'b0000, 0, 0, 2, 2);
    row(4'b1100, 4'b0000, 0, 1, 2, 2);
    row(4'b0101, 4'b0000, 0, 2, 0, 2);
    // every single and correctable double fault condition
    for (int p = 0; p < 2*N; p++) begin
      logic [2*N-1:0] c;
      c = 8'(1) << p;
      apply(c[3:0], c[7:4]);
      expect_fault(c[3:0], c[7:4], 1);
      for (int q = p + 1; q < 2*N; q++) begin
        c = (8'(1) << p) | (8'(1) << q);
        if ((c[3:0] & c[7:4]) == 0) begin
          apply(c[3:0], c[7:4]);
          expect_fault(c[3:0], c[7:4], 2);
        end
      end
    end
    // with T0 alone four single faults of A look alike
    ntests = 1;
    apply(4'b0100, 4'b0000);
    checks++;
    if (found || !ambiguous || order != 1) begin failures++; $display("ambiguity not flagged"); end
    // an outcome row no correctable condition of order 1 or 2 gives
    ntests = 4;
    results[0] = RES_A; results[1] = RES_A; results[2] = RES_B; results[3] = RES_BOTH;
    #1;
    checks++;
    if (found || ambiguous) begin failures++; $display("impossible row accepted"); end
    // level 2 out of service: tests T0, [0 1 0 0], [0 0 0 1] separate the six others
    active = 4'b1011;
    tests[0] = 4'b0000; tests[1] = 4'b0010; tests[2] = 4'b1000; ntests = 3;
    for (int p = 0; p < 2*N; p++) begin
      logic [2*N-1:0] c;
      c = 8'(1) << p;
      if ((c[2] | c[6]) == 0) begin
        apply(c[3:0], c[7:4]);
        expect_fault(c[3:0], c[7:4], 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
