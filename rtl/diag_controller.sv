// diag_controller: error response, diagnosis and self-repair sequencer of the MABMR
// system.
//
// In normal operation it enables the module clocks and the buffer register every
// cycle in which the disagreement detectors are quiet. On a disagreement it inhibits
// the clock, freezing the system in the erroneous state, captures the input of that
// period and raises the interrupt to the diagnostic computer. Once the computer has
// written the model's state and output (model_we) and a test sequence is ready, it
// runs the diagnosis loop of the document for every test vector T0..Tr-1:
//   LOAD  interchange the levels marked in the test vector, restore the memory
//         elements from the buffer and apply the buffered input;
//   STEP  single-cycle the clock;
//   CMP   apply the input of the error period and record in ternary which
//         subsystem(s) now disagree with the model.
// If T0 finds both subsystems equal to the model, the error is put down to the
// detecting logic and operation resumes. Otherwise the fault locator names the
// defective modules, which are isolated (their counterparts serve both subsystems),
// all memory elements are loaded with the model's state and the clock is released.
// A fault condition the locator cannot resolve, or that leaves no working module at
// some level, halts the system with the interrupt held. After every isolation the
// test sequence is regenerated for the levels that remain redundant.
// The steps follow the document, where a general purpose computer carries them out;
// running them from this hardware sequencer, with the computer supplying only the
// model response, is this design's choice, as are the clock enable (instead of a
// gated clock) and the status counters.
//
// Interface: err is the combined detector output; a_bad/b_bad say whether logical
// subsystem A/B differs from the model response; tests/ntests/gen_* connect to the
// test generator and the loc_* ports to the fault locator. Outputs are registered
// state decoded combinationally. Timing: 3 cycles per test, plus 1 to resume.
module diag_controller
  import mabmr_pkg::*;
#(
  parameter int unsigned N    = mabmr_pkg::N_LEVELS,
  parameter int unsigned MAXT = 2 ** (N - 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      err,
  input  logic                      model_we,
  input  logic                      a_bad,
  input  logic                      b_bad,
  // test generator
  output logic                      gen_start,
  input  logic                      gen_busy,
  input  logic [N-1:0]              tests   [MAXT],
  input  logic [$clog2(MAXT+1)-1:0] ntests,
  // fault locator
  output result_e                   results [MAXT],
  input  logic                      loc_found,
  input  logic [N-1:0]              loc_fault_a,
  input  logic [N-1:0]              loc_fault_b,
  // datapath control
  output logic                      mod_en,       // module clock enable
  output logic                      mod_load,     // restore memory elements
  output logic                      load_model,   // 1: model state, 0: buffered state
  output logic [1:0]                in_sel,       // 0 live, 1 buffered, 2 error period
  output logic                      buf_advance,
  output logic                      buf_capture,
  output logic [N-1:0]              swap,
  output logic [N-1:0]              iso_a,
  output logic [N-1:0]              iso_b,
  output logic [N-1:0]              active,
  // status
  output logic                      irq,
  output logic                      halted,
  output logic                      diagnosing,
  output logic [15:0]               n_errors,     // disagreements detected
  output logic [15:0]               n_detector,   // condition I outcomes
  output logic [15:0]               n_isolations, // diagnoses ending in isolation
  output logic [15:0]               n_tests       // single-cycle tests run
);

  localparam int unsigned IW = (MAXT > 1) ? $clog2(MAXT) : 1;

  typedef enum logic [2:0] {C_RUN, C_WAIT, C_LOAD, C_STEP, C_CMP, C_LOCATE, C_HALT}
    cstate_e;
  typedef enum logic [1:0] {IN_LIVE = 2'd0, IN_PREV = 2'd1, IN_ERR = 2'd2} insel_e;

  cstate_e st;
  logic [IW:0] j_q;
  logic model_seen, tests_ready, regen;
  result_e res_now;

  assign active = ~(iso_a | iso_b);

  always_comb begin
    if (a_bad && b_bad) res_now = RES_BOTH;
    else if (a_bad)     res_now = RES_A;
    else if (b_bad)     res_now = RES_B;
    else                res_now = RES_NONE;
  end

  // resuming: restore from the model, the clock then runs again
  logic resume;
  assign resume = (st == C_LOCATE) || (st == C_CMP && j_q == '0 && res_now == RES_NONE);

  always_comb begin
    mod_en      = 1'b0;
    mod_load    = 1'b0;
    load_model  = 1'b0;
    in_sel      = IN_LIVE;
    buf_advance = 1'b0;
    buf_capture = 1'b0;
    swap        = '0;
    unique case (st)
      C_RUN: begin
        mod_en      = !err;
        buf_advance = !err;
        buf_capture = err;
      end
      C_LOAD: begin
        swap     = tests[j_q[IW-1:0]] & active;
        mod_load = 1'b1;
        in_sel   = IN_PREV;
      end
      C_STEP: begin
        swap   = tests[j_q[IW-1:0]] & active;
        mod_en = 1'b1;
        in_sel = IN_PREV;
      end
      C_CMP: begin
        swap   = tests[j_q[IW-1:0]] & active;
        in_sel = IN_ERR;
      end
      default: ;
    endcase
    if (resume) begin
      mod_load   = 1'b1;
      load_model = 1'b1;
    end
  end

  assign irq        = (st == C_WAIT) || (st == C_LOAD) || (st == C_STEP) || (st == C_CMP) ||
                      (st == C_LOCATE) || (st == C_HALT);
  assign halted     = (st == C_HALT);
  assign diagnosing = (st == C_LOAD) || (st == C_STEP) || (st == C_CMP) || (st == C_LOCATE);
  assign tests_ready = !gen_busy && !gen_start && !regen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= C_RUN;
      j_q          <= '0;
      model_seen   <= 1'b0;
      regen        <= 1'b1;   // generate the first test sequence after reset
      gen_start    <= 1'b0;
      iso_a        <= '0;
      iso_b        <= '0;
      n_errors     <= '0;
      n_detector   <= '0;
      n_isolations <= '0;
      n_tests      <= '0;
      for (int unsigned s = 0; s < MAXT; s++) results[s] <= RES_NONE;
    end else begin
      gen_start <= 1'b0;
      // (re)generate the test sequence whenever the set of redundant levels changes
      if (regen && !gen_busy) begin
        gen_start <= 1'b1;
        regen     <= 1'b0;
      end
      if (model_we) model_seen <= 1'b1;
      unique case (st)
        C_RUN: if (err) begin
          n_errors   <= n_errors + 1'b1;
          model_seen <= model_we;
          st         <= C_WAIT;
        end
        C_WAIT: if ((model_seen || model_we) && tests_ready) begin
          j_q <= '0;
          for (int unsigned s = 0; s < MAXT; s++) results[s] <= RES_NONE;
          st  <= C_LOAD;
        end
        C_LOAD: st <= C_STEP;
        C_STEP: begin
          n_tests <= n_tests + 1'b1;
          st      <= C_CMP;
        end
        C_CMP: begin
          results[j_q[IW-1:0]] <= res_now;
          if (j_q == '0 && res_now == RES_NONE) begin
            // condition I: subsystems agree with the model, the detector erred
            n_detector <= n_detector + 1'b1;
            model_seen <= 1'b0;
            st         <= C_RUN;
          end else if (32'(j_q) + 1 >= 32'(ntests)) begin
            st <= C_LOCATE;
          end else begin
            j_q <= j_q + 1'b1;
            st  <= C_LOAD;
          end
        end
        C_LOCATE: begin
          model_seen <= 1'b0;
          if (loc_found) begin
            iso_a        <= iso_a | loc_fault_a;
            iso_b        <= iso_b | loc_fault_b;
            n_isolations <= n_isolations + 1'b1;
            regen        <= 1'b1;
            st           <= C_RUN;
          end else begin
            st <= C_HALT;
          end
        end
        C_HALT: ;
        default: st <= C_RUN;
      endcase
    end
  end

  // A level never loses both of its modules, and interchange only touches redundant levels.
  a_iso_exclusive: assert property (@(posedge clk) disable iff (!rst_n) (iso_a & iso_b) == '0);
  a_swap_active:   assert property (@(posedge clk) disable iff (!rst_n) (swap & ~active) == '0);

endmodule
