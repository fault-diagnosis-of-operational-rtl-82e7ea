// mabmr_fault_sweep: reusable harness that sweeps fault conditions through one
// mabmr_system of NL levels.
//
// For every one of the 2*NL modules it resets the system, lets it run, inserts a
// stuck-at fault on that module's output and checks that the diagnosis isolates
// exactly that module. It then does the same for NDOUBLE random correctable double
// faults (two modules on different levels, inserted in the same cycle); if only one
// of the two shows at first, a second diagnosis must find the other. A golden model
// checks the system output on every freely running cycle, and a behavioural
// diagnostic computer answers the interrupts. n_checks/n_failures accumulate;
// finished rises at the end.
module mabmr_fault_sweep #(
  parameter int unsigned NL      = 4,
  parameter int unsigned NDOUBLE = 10
) (
  input  logic clk,
  output int   n_checks,
  output int   n_failures,
  output int   n_singles,
  output int   n_doubles,
  output logic finished
);
  int   checks, failures, singles_found, doubles_found;
  logic done;
  assign n_checks   = checks;
  assign n_failures = failures;
  assign n_singles  = singles_found;
  assign n_doubles  = doubles_found;
  assign finished   = done;
  localparam int unsigned W = 4;
  logic rst_n;
  logic [W-1:0] sys_in, sys_out, buf_input, err_input;
  logic [W-1:0] flt_mask_a [NL], flt_val_a [NL], flt_mask_b [NL], flt_val_b [NL];
  logic [NL*W-1:0] buf_state, model_state, model_out;
  logic irq, model_we, err, halted, diagnosing, tests_busy;
  logic [NL-1:0] iso_a, iso_b, swap;
  logic [15:0] n_errors, n_detector, n_isolations, n_tests;
  int n_requests;

  mabmr_system #(.N(NL), .W(W), .MAX_ORD(2)) dut (.*);

  diag_computer_model #(.N(NL), .W(W)) u_host (
    .clk, .irq, .buf_state, .buf_input, .err_input, .model_state, .model_out, .model_we,
    .n_requests);

  logic [W-1:0] g_s [NL];
  always @(negedge clk) begin
    sys_in <= W'($urandom);
    if (rst_n && !irq && !err) begin
      logic [W-1:0] x;
      x = sys_in;
      for (int k = 0; k < NL; k++) x = g_s[k] ^ x;
      if (sys_out !== x) begin
        failures++;
        $display("N=%0d output %h want %h at %0t", NL, sys_out, x, $time);
      end
    end
  end
  always @(posedge clk) if (rst_n && !irq && !err) begin
    logic [W-1:0] x;
    x = sys_in;
    for (int k = 0; k < NL; k++) begin
      logic [W-1:0] s;
      s = g_s[k];
      g_s[k] <= s + x;
      x = s ^ x;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("N=%0d FAIL %s at %0t", NL, what, $time); end
  endtask

  task automatic restart();
    rst_n = 0;
    for (int k = 0; k < NL; k++) begin
      flt_mask_a[k] = '0; flt_val_a[k] = '0; flt_mask_b[k] = '0; flt_val_b[k] = '0;
    end
    g_s = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    while (tests_busy) @(negedge clk);
  endtask

  // insert a stuck-at fault on module m (m < NL: level m of A, else level m-NL of B)
  task automatic insert(input int m);
    if (m < NL) begin flt_mask_a[m] = '1; flt_val_a[m] = W'($urandom); end
    else begin flt_mask_b[m-NL] = '1; flt_val_b[m-NL] = W'($urandom); end
  endtask

  task automatic await_diagnosis();
    int guard;
    guard = 0;
    while (!irq && guard < 2000) begin @(negedge clk); guard++; end
    while (irq && !halted) @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; singles_found = 0; doubles_found = 0; done = 0;
    rst_n = 0;
    // every single-module fault
    for (int m = 0; m < 2 * NL; m++) begin
      logic [2*NL-1:0] want;
      restart();
      want = (2*NL)'(1) << m;
      insert(m);
      await_diagnosis();
      chk({iso_b, iso_a} == want && !halted,
          $sformatf("single fault %0d isolated (A=%b B=%b)", m, iso_a, iso_b));
      if ({iso_b, iso_a} == want) singles_found++;
    end
    // random correctable double faults
    for (int d = 0; d < NDOUBLE; d++) begin
      int p, q, i0;
      logic [2*NL-1:0] want;
      p = $urandom % (2 * NL);
      do q = $urandom % (2 * NL); while (q == p || (q % NL) == (p % NL));
      restart();
      want = ((2*NL)'(1) << p) | ((2*NL)'(1) << q);
      i0 = int'(n_isolations);
      insert(p);
      insert(q);
      await_diagnosis();
      if ({iso_b, iso_a} == want) doubles_found++;
      else if (!halted) begin
        while (tests_busy || !rst_n) @(negedge clk);
        repeat (5) @(negedge clk);
        while (tests_busy) @(negedge clk);
        await_diagnosis();
      end
      chk({iso_b, iso_a} == want && !halted,
          $sformatf("double fault %0d,%0d isolated (A=%b B=%b halted=%b)", p, q, iso_a, iso_b, halted));
    end
    done = 1;
  end
endmodule
