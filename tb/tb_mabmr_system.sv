// tb_mabmr_system: end-to-end testbench of the MABMR system at its default size
// (four levels, 4-bit data, fault orders 1 and 2).
//
// A behavioural diagnostic computer answers the interrupts. A golden model of the
// fault-free chain, advanced whenever the system runs without disagreement, checks
// the system output every such cycle. The scenario inserts stuck-at faults on module
// outputs: a single fault in A, a single fault in B, a transient fault (diagnosed as
// a detector error, condition I), a double fault in one module of each subsystem, and
// finally faults in both modules of one level, which cannot be corrected and halt the
// system. It checks the isolated modules after each diagnosis, the diagnosis time of
// 3 cycles per test plus one, and counts every mechanism: detection, freeze and
// interrupt, interchange, single and double location, isolation, test regeneration,
// detector-error resumption and halt.
module tb_mabmr_system;
  import mabmr_pkg::*;
  localparam int N = N_LEVELS, W = DATA_W;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] sys_in, sys_out, buf_input, err_input;
  logic [N*W-1:0] model_out;
  logic [W-1:0] flt_mask_a [N], flt_val_a [N], flt_mask_b [N], flt_val_b [N];
  logic [N*W-1:0] buf_state, model_state;
  logic irq, model_we, err, halted, diagnosing, tests_busy;
  logic [N-1:0] iso_a, iso_b, swap;
  logic [15:0] n_errors, n_detector, n_isolations, n_tests;
  int n_requests;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_freeze = 0, m_swap = 0, m_single = 0, m_double = 0, m_regen = 0, m_halt = 0;
  int m_detector = 0, m_out_checked = 0;

  mabmr_system dut (.*);

  diag_computer_model #(.N(N), .W(W)) u_host (
    .clk, .irq, .buf_state, .buf_input, .err_input, .model_state, .model_out, .model_we,
    .n_requests);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // golden fault-free chain
  logic [W-1:0] g_s [N];
  function automatic logic [W-1:0] g_out(input logic [W-1:0] in);
    logic [W-1:0] x;
    x = in;
    for (int k = 0; k < N; k++) x = g_s[k] ^ x;
    return x;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (!irq && !err) begin
      m_out_checked++;
      if (sys_out !== g_out(sys_in)) begin
        failures++;
        $display("output %h want %h at %0t", sys_out, g_out(sys_in), $time);
      end
    end
    if (swap != 0) m_swap++;
  end
  always @(posedge clk) if (rst_n && !irq && !err) begin
    logic [W-1:0] x;
    x = sys_in;
    for (int k = 0; k < N; k++) begin
      logic [W-1:0] s;
      s = g_s[k];
      g_s[k] <= s + x;
      x = s ^ x;
    end
  end
  logic busy_q = 0, irq_q = 0;
  always @(posedge clk) begin
    busy_q <= tests_busy;
    irq_q  <= irq;
    if (tests_busy && !busy_q) m_regen++;
    if (irq && !irq_q) m_freeze++;
  end

  // change the input every cycle
  always @(negedge clk) sys_in <= W'($urandom);

  task automatic clear_faults();
    for (int k = 0; k < N; k++) begin
      flt_mask_a[k] = '0; flt_val_a[k] = '0; flt_mask_b[k] = '0; flt_val_b[k] = '0;
    end
  endtask

  // run until a diagnosis finishes (or the system halts); returns its duration in
  // cycles after the model response and the number of tests it ran
  task automatic await_diagnosis(output int cycles, output int tests_run);
    int t0, guard;
    guard = 0;
    while (!irq && guard < 5000) begin @(negedge clk); guard++; end
    chk(irq, "error detected and interrupt raised");
    t0 = int'(n_tests);
    while (!model_we) @(negedge clk);
    cycles = 0;
    while (irq && !halted) begin @(negedge clk); cycles++; end
    tests_run = int'(n_tests) - t0;
    $display("diag at %0t: %0d cycles, %0d tests, iso A=%b B=%b halted=%b", $time, cycles, tests_run, iso_a, iso_b, halted);
  endtask

  task automatic wait_tests();
    repeat (3) @(negedge clk);
    while (tests_busy) @(negedge clk);
  endtask

  task automatic run_clean(input int n);
    int e0;
    e0 = int'(n_errors);
    repeat (n) @(negedge clk);
    chk(int'(n_errors) == e0 && !irq, "no error while running clean");
  endtask

  initial begin
    int cyc, nt, iso0;
    g_s = '{default: '0};
    clear_faults();
    sys_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_clean(200);
    // the first test sequence is ready long before the first fault is needed
    wait_tests();

    // 1: stuck-at fault on the output of module 1 of A
    flt_mask_a[1] = '1; flt_val_a[1] = 4'h5;
    await_diagnosis(cyc, nt);
    chk(iso_a == 4'b0010 && iso_b == 0, $sformatf("single A fault isolated (A=%b B=%b)", iso_a, iso_b));
    chk(nt == 4 && cyc == 3 * nt + 1, $sformatf("diagnosis time %0d cycles for %0d tests", cyc, nt));
    if (iso_a == 4'b0010) m_single++;
    wait_tests();
    run_clean(300);

    // 2: stuck-at fault on module 3 of B; module 1 of A stays faulty but isolated
    flt_mask_b[3] = 4'b0110; flt_val_b[3] = 4'b0000;
    await_diagnosis(cyc, nt);
    chk(iso_a == 4'b0010 && iso_b == 4'b1000, $sformatf("single B fault isolated (A=%b B=%b)", iso_a, iso_b));
    chk(cyc == 3 * nt + 1, $sformatf("diagnosis time with fewer levels: %0d cycles, %0d tests", cyc, nt));
    if (iso_b == 4'b1000) m_single++;
    wait_tests();
    run_clean(300);

    // 3: transient fault on module 2 of A, gone before the diagnosis replays it
    iso0 = int'(n_isolations);
    while (!irq) begin
      @(negedge clk);
      flt_mask_a[2] = '1; flt_val_a[2] = W'($urandom);
      @(negedge clk);
      flt_mask_a[2] = '0;
    end
    await_diagnosis(cyc, nt);
    chk(int'(n_detector) == 1 && int'(n_isolations) == iso0 && nt == 1,
        "transient error attributed to the detecting logic");
    if (n_detector == 1) m_detector++;
    run_clean(300);

    // 4: double fault, module 0 of A and module 2 of B at once
    flt_mask_a[0] = '1; flt_val_a[0] = 4'hA;
    flt_mask_b[2] = '1; flt_val_b[2] = 4'h3;
    iso0 = int'(n_isolations);
    await_diagnosis(cyc, nt);
    if (iso_a == 4'b0011 && iso_b == 4'b1100 && int'(n_isolations) == iso0 + 1) m_double++;
    else begin
      // one of the two showed first: the second is located by the next diagnosis
      wait_tests();
      await_diagnosis(cyc, nt);
    end
    chk(iso_a == 4'b0011 && iso_b == 4'b1100, $sformatf("double fault isolated (A=%b B=%b)", iso_a, iso_b));
    wait_tests();
    run_clean(300);

    // 5: from here on no level is redundant: the system keeps running unchecked
    chk((iso_a | iso_b) == 4'b1111, "all levels reduced to one module");
    run_clean(100);

    // 6: after a reset, faults in both modules of level 0 cannot be corrected
    rst_n = 0;
    clear_faults();
    g_s = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(iso_a == 0 && iso_b == 0 && !irq, "reset returns to full redundancy");
    run_clean(50);
    wait_tests();
    flt_mask_a[0] = '1; flt_val_a[0] = 4'h1;
    flt_mask_b[0] = '1; flt_val_b[0] = 4'h2;
    await_diagnosis(cyc, nt);
    repeat (5) @(negedge clk);
    chk(halted && irq && iso_a == 0 && iso_b == 0, "uncorrectable fault halts the system");
    if (halted) m_halt++;
    $display("mechanisms: freeze=%0d swap-cycles=%0d single=%0d double=%0d detector=%0d regen=%0d halt=%0d outputs=%0d",
             m_freeze, m_swap, m_single, m_double, m_detector, m_regen, m_halt, m_out_checked);
    chk(m_freeze >= 4, "freeze and interrupt");
    chk(m_swap > 0, "module interchange");
    chk(m_single == 2, "single fault location");
    chk(m_double == 1, "double fault located in one diagnosis");
    chk(m_detector == 1, "detector error resumption");
    chk(m_regen >= 4, "test sequence regeneration");
    chk(m_halt == 1, "halt");
    chk(n_requests == m_freeze, "one model evaluation per interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
