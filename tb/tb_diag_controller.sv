// tb_diag_controller: self-checking testbench of diag_controller.
// Stands in for the datapath, the test generator and the fault locator. It checks the
// control outputs in normal operation, the freeze and interrupt on a disagreement, the
// LOAD/STEP/CMP pattern of each test with its interchange vector, the ternary outcomes
// recorded, isolation and restart (3 cycles per test), the detector-fault path
// (condition I), regeneration of the tests and the halt on an unresolved fault.
module tb_diag_controller;
  import mabmr_pkg::*;
  localparam int N = 4, MAXT = 8;
  logic clk = 0, rst_n = 0;
  logic err, model_we, a_bad, b_bad, gen_start, gen_busy;
  logic [N-1:0] tests [MAXT];
  logic [3:0] ntests;
  result_e results [MAXT];
  logic loc_found;
  logic [N-1:0] loc_fault_a, loc_fault_b;
  logic mod_en, mod_load, load_model, buf_advance, buf_capture;
  logic [1:0] in_sel;
  logic [N-1:0] swap, iso_a, iso_b, active;
  logic irq, halted, diagnosing;
  logic [15:0] n_errors, n_detector, n_isolations, n_tests;
  int checks = 0, failures = 0, gen_starts = 0;
  // a faulty module for the stand-in datapath: A-side (0) or B-side (1), level
  int flt_side, flt_level;

  diag_controller #(.N(N), .MAXT(MAXT)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // stand-in datapath: which logical subsystem holds the faulty module under swap
  always_comb begin
    a_bad = 0; b_bad = 0;
    if (flt_side >= 0) begin
      if ((flt_side == 0) ^ swap[flt_level]) a_bad = 1; else b_bad = 1;
    end
  end
  // stand-in locator: single faults under T0, T1, T3 of the example
  always_comb begin
    logic [2:0] code;
    code = {results[0] == RES_B, results[1] == RES_B, results[2] == RES_B};
    loc_found = 1; loc_fault_a = 0; loc_fault_b = 0;
    case (code)
      3'b000: loc_fault_a = 4'b0001;
      3'b001: loc_fault_a = 4'b0010;
      3'b010: loc_fault_a = 4'b0100;
      3'b011: loc_fault_a = 4'b1000;
      3'b100: loc_fault_b = 4'b1000;
      3'b101: loc_fault_b = 4'b0100;
      3'b110: loc_fault_b = 4'b0010;
      default: loc_fault_b = 4'b0001;
    endcase
  end
  // stand-in generator: busy for a few cycles after each start
  int busy_cnt = 0;
  always_ff @(posedge clk) begin
    if (gen_start) begin busy_cnt <= 5; gen_starts++; end
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign gen_busy = busy_cnt > 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one diagnosis: returns the cycles from model_we to running again
  task automatic diagnose(output int cycles);
    @(negedge clk);
    err = 1;
    #1;
    chk(!mod_en && buf_capture && !buf_advance, "freeze on disagreement");
    @(negedge clk);
    err = 0;
    chk(irq && !mod_en, "interrupt raised, clock inhibited");
    repeat (3) @(negedge clk);
    chk(irq && !mod_en && !mod_load, "waits for the model");
    model_we = 1;
    @(negedge clk);
    model_we = 0;
    cycles = 0;
    while (irq && !halted && cycles < 100) begin
      // check the LOAD / STEP / CMP pattern
      if (mod_load && !load_model) chk(in_sel == 2'd1 && !mod_en, "LOAD applies the buffered input");
      if (mod_en) chk(in_sel == 2'd1, "STEP applies the buffered input");
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    err = 0; model_we = 0; flt_side = -1; flt_level = 0;
    for (int j = 0; j < MAXT; j++) tests[j] = '0;
    tests[1] = 4'b1100; tests[2] = 4'b1010;
    ntests = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    chk(gen_starts == 1, "tests generated after reset");
    chk(mod_en && buf_advance && !irq && in_sel == 0, "normal operation");
    // fault in module 2 of B
    flt_side = 1; flt_level = 2;
    diagnose(cyc);
    chk(cyc == 3 * 3 + 1, $sformatf("diagnosis time %0d cycles", cyc));
    chk(results[0] == RES_B && results[1] == RES_A && results[2] == RES_B, "ternary outcomes");
    chk(iso_b == 4'b0100 && iso_a == 0 && active == 4'b1011, "module 2 of B isolated");
    chk(n_isolations == 1 && n_tests == 3 && n_errors == 1, "counters");
    repeat (10) @(negedge clk);
    chk(gen_starts == 2, "tests regenerated after isolation");
    chk(mod_en && !irq, "running again");
    // condition I: subsystems agree with the model
    flt_side = -1;
    diagnose(cyc);
    chk(cyc == 3 && n_detector == 1 && n_tests == 4, "detector fault resumes after T0");
    // interchange vectors must skip the isolated level
    flt_side = 0; flt_level = 3;
    tests[1] = 4'b1110;
    diagnose(cyc);
    chk(iso_a == 4'b1000 && iso_b == 4'b0100, "module 3 of A isolated");
    // an unresolved fault halts
    repeat (10) @(negedge clk);
    flt_side = 0; flt_level = 1;
    force loc_found = 0;
    diagnose(cyc);
    chk(halted && irq && !mod_en, "unresolved fault halts");
    release loc_found;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // swap never touches an isolated level
  always @(negedge clk) if (rst_n && (swap & ~active) != 0) begin
    failures++;
    $display("swap on isolated level");
  end
endmodule
