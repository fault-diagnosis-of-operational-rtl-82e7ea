// tb_test_generator: self-checking testbench of test_generator.
// For the four-level system it checks the generated sequence, the weights and that
// the sequence separates all 8 single and 24 correctable double fault conditions with
// three reconfigurations beyond T0. Expected sequences were worked out separately by
// exhaustive weighting with ties going to the lowest vector. It then regenerates with
// levels out of service, and checks the run time.
module tb_test_generator;
  import mabmr_pkg::*;
  localparam int N = 4, MAXT = 8;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic [N-1:0] active;
  logic [N-1:0] tests [MAXT];
  logic [15:0]  weights [MAXT];
  logic [3:0]   ntests;
  int checks = 0, failures = 0;

  test_generator #(.N(N), .MAXT(MAXT), .MAX_ORD(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int outcome(input logic [N-1:0] fa, input logic [N-1:0] fb,
                                 input logic [N-1:0] t);
    bit in_a, in_b;
    in_a = 0; in_b = 0;
    for (int k = 0; k < N; k++) begin
      if (fa[k]) begin if (t[k]) in_b = 1; else in_a = 1; end
      if (fb[k]) begin if (t[k]) in_a = 1; else in_b = 1; end
    end
    return (in_a && in_b) ? 2 : in_a ? 0 : 1;
  endfunction

  task automatic run(input logic [N-1:0] act, input int exp_n, input logic [N-1:0] exp_t [4],
                     input int exp_w [4]);
    int cycles;
    @(negedge clk);
    active = act;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); cycles++; #1; end
    $display("active=%b: %0d tests in %0d cycles", act, ntests, cycles);
    checks++;
    if (ntests != 4'(exp_n)) begin failures++; $display("ntests %0d want %0d", ntests, exp_n); end
    for (int j = 0; j < exp_n; j++) begin
      checks += 2;
      if (tests[j] != exp_t[j]) begin failures++; $display("test %0d = %b want %b", j, tests[j], exp_t[j]); end
      if (int'(weights[j]) != exp_w[j]) begin failures++; $display("weight %0d = %0d want %0d", j, weights[j], exp_w[j]); end
    end
    checks++;
    if (cycles > 10000) begin failures++; $display("too slow"); end
  endtask

  initial begin
    logic [N-1:0] et [4];
    int ew [4];
    start = 0; active = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all four levels redundant
    et = '{4'b0000, 4'b0110, 4'b1010, 4'b0010};
    ew = '{0, 8, 4, 6};
    run(4'b1111, 4, et, ew);
    // the sequence separates every single and correctable double fault condition
    begin
      int pat [$];
      int dup;
      dup = 0;
      for (int c = 1; c < 256; c++) begin
        int p;
        if ($countones(c) > 2 || (c[3:0] & c[7:4]) != 0) continue;
        p = 0;
        for (int j = 0; j < 4; j++) p = p * 3 + outcome(c[3:0], c[7:4], tests[j]);
        foreach (pat[i]) if (pat[i] == p) dup++;
        pat.push_back(p);
      end
      checks++;
      if (dup != 0 || pat.size() != 32) begin failures++; $display("%0d patterns, %0d repeated", pat.size(), dup); end
    end
    // level 2 out of service
    et = '{4'b0000, 4'b0010, 4'b1000, 4'b0000};
    ew = '{0, 4, 2, 0};
    run(4'b1011, 3, et, ew);
    // level 0 out of service: level 1 becomes the fixed one
    et = '{4'b0000, 4'b0100, 4'b1000, 4'b0000};
    ew = '{0, 4, 2, 0};
    run(4'b1110, 3, et, ew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
