// mabmr_pkg: shared constants, types and helper functions of the model assisted
// bi-modular redundant (MABMR) system.
//
// The system is two identical subsystems, A and B, each a chain of N_LEVELS modules.
// A test vector has one bit per module level: bit k set means modules k (of A) and
// k-bar (of B) are interchanged for that test. Test outcomes are recorded in the
// ternary code of the diagnosis procedure, plus a fourth code for "no error".
// Level count 4 follows the example system of the diagnosis procedure; the data
// width of a module is this design's own choice.
package mabmr_pkg;

  // Module levels per subsystem (N). The worked example of the procedure has four.
  parameter int unsigned N_LEVELS = 4;
  // Width of the data path between modules and of each module's state register.
  parameter int unsigned DATA_W   = 4;
  // Highest fault order the test generator and the fault locator consider.
  parameter int unsigned MAX_ORDER = 2;
  // Widest level count the helper functions handle.
  parameter int unsigned MAXN = 8;

  // Outcome of one test: which subsystem(s) disagree with the model.
  typedef enum logic [1:0] {
    RES_A    = 2'd0,   // error stems from subsystem A alone (condition III)
    RES_B    = 2'd1,   // error stems from subsystem B alone (condition II)
    RES_BOTH = 2'd2,   // both subsystems faulty (condition IV)
    RES_NONE = 2'd3    // A = M = B (condition I)
  } result_e;

  // Binary model of the BMR system: fault_a/fault_b mark defective modules of A and B,
  // test marks interchanged levels. Interchange the marked bits between the two words
  // and test each word against zero.
  function automatic result_e binary_model(input logic [MAXN-1:0] fault_a,
                                           input logic [MAXN-1:0] fault_b,
                                           input logic [MAXN-1:0] test);
    logic [MAXN-1:0] word_a, word_b;
    word_a = (fault_a & ~test) | (fault_b & test);
    word_b = (fault_b & ~test) | (fault_a & test);
    if (word_a != '0 && word_b != '0) return RES_BOTH;
    else if (word_a != '0)            return RES_A;
    else if (word_b != '0)            return RES_B;
    else                              return RES_NONE;
  endfunction

  // Number of set bits.
  function automatic int unsigned ones(input logic [2*MAXN-1:0] v);
    int unsigned c;
    c = 0;
    for (int i = 0; i < 2*MAXN; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
