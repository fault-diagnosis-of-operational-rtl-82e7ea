// fault_locator: locates the defective modules from the outcomes of the diagnostic
// tests, using the binary model of the BMR system.
//
// A fault condition is a set of defective modules, written as two N-bit words
// (fault_a for subsystem A, fault_b for B). Its fault pattern is the row of ternary
// outcomes the binary model predicts for the applied test vectors: interchange the
// bits the test marks, then test each word against zero. The locator compares the
// observed outcome row with the pattern of every correctable fault condition (never
// both modules of one level) on the levels still in service, lowest fault order
// first, since a lower order is the more probable (orders 1 and 2 are supported). It
// reports the unique match of the lowest order that has any match, or that the
// result is ambiguous or unmatched.
// The binary model and the lower-order-first rule follow the document; searching all
// conditions of orders 1 and 2 in parallel in combinational logic is this design's
// choice.
//
// Interface: tests[0..ntests-1] and results[0..ntests-1] are the applied vectors and
// their outcomes; active marks levels still bi-modularly redundant. Outputs are
// combinational.
module fault_locator
  import mabmr_pkg::*;
#(
  parameter int unsigned N         = mabmr_pkg::N_LEVELS,
  parameter int unsigned MAXT      = 2 ** (N - 1),
  parameter int unsigned MAX_ORD   = mabmr_pkg::MAX_ORDER
) (
  input  logic [N-1:0]            tests   [MAXT],
  input  result_e                 results [MAXT],
  input  logic [$clog2(MAXT+1)-1:0] ntests,
  input  logic [N-1:0]            active,
  output logic                    found,
  output logic                    ambiguous,
  output logic [N-1:0]            fault_a,
  output logic [N-1:0]            fault_b,
  output logic [$clog2(MAX_ORD+1)-1:0] order
);

  // a single defective module p: module p of A for p < N, module (p - N) of B otherwise
  function automatic logic [2*N-1:0] one_hot(input int unsigned p);
    return (2*N)'(1) << p;
  endfunction

  // does fault condition c (A word in the low half) reproduce every observed outcome?
  function automatic logic matches_all(input logic [2*N-1:0] c, input logic [N-1:0] t [MAXT],
                                       input result_e r [MAXT], input int unsigned nt);
    logic ok;
    ok = 1'b1;
    for (int unsigned j = 0; j < MAXT; j++)
      if (j < nt && binary_model(MAXN'(c[N-1:0]), MAXN'(c[2*N-1:N]), MAXN'(t[j])) != r[j])
        ok = 1'b0;
    return ok;
  endfunction

  logic [2*N-1:0] c1, c2;
  int unsigned    n1, n2;

  always_comb begin
    logic [2*N-1:0] c;
    logic           usable;
    // first order: one defective module
    n1 = 0;
    c1 = '0;
    for (int unsigned p = 0; p < 2*N; p++) begin
      c = one_hot(p);
      usable = ((c[N-1:0] | c[2*N-1:N]) & ~active) == '0;
      if (usable && matches_all(c, tests, results, 32'(ntests))) begin
        n1++;
        c1 = c;
      end
    end
    // second order: two defective modules on different levels (correctable)
    n2 = 0;
    c2 = '0;
    if (MAX_ORD >= 2) begin
      for (int unsigned p = 0; p < 2*N; p++) begin
        for (int unsigned q = p + 1; q < 2*N; q++) begin
          c = one_hot(p) | one_hot(q);
          usable = ((c[N-1:0] & c[2*N-1:N]) == '0) && (((c[N-1:0] | c[2*N-1:N]) & ~active) == '0);
          if (usable && matches_all(c, tests, results, 32'(ntests))) begin
            n2++;
            c2 = c;
          end
        end
      end
    end
    // the lowest order with any match decides
    found     = 1'b0;
    ambiguous = 1'b0;
    fault_a   = '0;
    fault_b   = '0;
    order     = '0;
    if (n1 != 0) begin
      order     = 1;
      found     = (n1 == 1);
      ambiguous = (n1 > 1);
      if (n1 == 1) {fault_b, fault_a} = c1;
    end else if (n2 != 0) begin
      order     = 2;
      found     = (n2 == 1);
      ambiguous = (n2 > 1);
      if (n2 == 1) {fault_b, fault_a} = c2;
    end
  end

  if (MAX_ORD < 1 || MAX_ORD > 2) begin : g_bad_order
    $error("fault_locator handles fault orders 1 and 2 only");
  end

endmodule
