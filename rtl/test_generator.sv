// test_generator: selects the sequence of diagnostic test vectors by test weighting.
//
// Bit k of a test vector is set when modules k and k-bar are interchanged. The first
// test is always T0 (no interchange). Then, for fault order 1, 2, ... MAX_ORD in turn,
// the generator repeatedly weights every unselected candidate vector and selects the
// heaviest, until no candidate has a weight above zero. The weight of a candidate is
// the number of pairs of fault conditions of the current order that the tests
// selected so far leave in the same branch (identical outcomes on every selected
// test) and that the candidate tells apart. Summed over the branches this equals
// N0*N1 + N1*N2 + N0*N2 per branch, the weight the document defines, so the pair count
// is the same quantity computed without forming the branch matrices. Outcomes come
// from the binary model (mabmr_pkg::binary_model).
// The lowest active level is never interchanged, because a complemented test adds
// nothing. Only levels marked in active take part, so the sequence can be regenerated
// after modules are isolated. Ties go to the lowest vector value: this is this
// design's choice, as the document does not say how ties are broken.
//
// Interface: pulse start with active stable; busy is high while searching; done
// pulses for one cycle when tests[0..ntests-1] and their weights are valid.
// Fault conditions are walked as one module (order 1) or a pair of modules (order 2);
// orders 1 and 2 are supported.
// Timing: one fault-condition pair per clock cycle; about 4,000 cycles for N = 4 and
// fault orders 1 and 2.
module test_generator
  import mabmr_pkg::*;
#(
  parameter int unsigned N       = mabmr_pkg::N_LEVELS,
  parameter int unsigned MAXT    = 2 ** (N - 1),
  parameter int unsigned MAX_ORD = mabmr_pkg::MAX_ORDER
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [N-1:0]              active,
  output logic                      busy,
  output logic                      done,
  output logic [N-1:0]              tests   [MAXT],
  output logic [15:0]               weights [MAXT],
  output logic [$clog2(MAXT+1)-1:0] ntests
);

  localparam int unsigned IW    = $clog2(MAXT);
  localparam int unsigned PW    = $clog2(2 * N) + 1;   // module index, one spare bit

  typedef enum logic [2:0] {G_IDLE, G_ROUND, G_CAND, G_PAIR, G_END} gstate_e;

  // A fault condition of order 1 is one module p; of order 2, modules p < q. Modules
  // 0..N-1 are those of A, N..2N-1 those of B (module p-N of level p-N).
  typedef struct packed {
    logic [PW-1:0] p;
    logic [PW-1:0] q;
    logic          last;   // walked past the final condition
  } cond_t;

  gstate_e      st;
  cond_t        ci_q, cj_q;
  logic [N:0]   cand_q;
  logic [N-1:0] best_q;
  logic [15:0]  w_q, best_w_q;
  logic [$clog2(MAX_ORD+1)-1:0] ord_q;

  // lowest level still in service: never interchanged
  logic [N-1:0] fixed;
  always_comb begin
    fixed = '0;
    for (int k = N - 1; k >= 0; k--) if (active[k]) fixed = N'(1) << k;
  end

  function automatic cond_t first_cond(input int unsigned o);
    cond_t c;
    c.p    = '0;
    c.q    = (o >= 2) ? PW'(1) : '0;
    c.last = 1'b0;
    return c;
  endfunction

  function automatic cond_t next_cond(input cond_t c, input int unsigned o);
    cond_t n;
    n = c;
    if (o < 2) begin
      n.p    = c.p + 1'b1;
      n.last = (32'(c.p) + 1 >= 2 * N);
    end else if (32'(c.q) + 1 < 2 * N) begin
      n.q = c.q + 1'b1;
    end else begin
      n.p    = c.p + 1'b1;
      n.q    = c.p + PW'(2);
      n.last = (32'(c.p) + 2 >= 2 * N);
    end
    return n;
  endfunction

  // defective-module words {B, A} of a condition
  function automatic logic [2*N-1:0] cond_mask(input cond_t c, input int unsigned o);
    logic [2*N-1:0] m;
    m = (2*N)'(1) << c.p;
    if (o >= 2) m = m | ((2*N)'(1) << c.q);
    return m;
  endfunction

  // correctable (never both modules of a level) and on levels still in service
  function automatic logic usable(input logic [2*N-1:0] m, input logic [N-1:0] act);
    return ((m[N-1:0] & m[2*N-1:N]) == '0) && (((m[N-1:0] | m[2*N-1:N]) & ~act) == '0);
  endfunction

  logic [N-1:0]   cand_vec;
  logic           cand_ok;
  logic           i_ok, j_ok, same_branch, splits;
  logic [2*N-1:0] mi, mj;
  cond_t          ci_next, ci_next2, cj_next;

  always_comb begin
    cand_vec = cand_q[N-1:0];
    cand_ok  = ((cand_vec & fixed) == '0) && ((cand_vec & ~active) == '0);
    for (int unsigned s = 0; s < MAXT; s++)
      if (s < ntests && tests[s] == cand_vec) cand_ok = 1'b0;
    mi       = cond_mask(ci_q, 32'(ord_q));
    mj       = cond_mask(cj_q, 32'(ord_q));
    i_ok     = usable(mi, active);
    j_ok     = usable(mj, active);
    ci_next  = next_cond(ci_q, 32'(ord_q));
    ci_next2 = next_cond(ci_next, 32'(ord_q));
    cj_next  = next_cond(cj_q, 32'(ord_q));
    same_branch = 1'b1;
    for (int unsigned s = 0; s < MAXT; s++)
      if (s < ntests &&
          binary_model(MAXN'(mi[N-1:0]), MAXN'(mi[2*N-1:N]), MAXN'(tests[s])) !=
          binary_model(MAXN'(mj[N-1:0]), MAXN'(mj[2*N-1:N]), MAXN'(tests[s])))
        same_branch = 1'b0;
    splits = binary_model(MAXN'(mi[N-1:0]), MAXN'(mi[2*N-1:N]), MAXN'(cand_vec)) !=
             binary_model(MAXN'(mj[N-1:0]), MAXN'(mj[2*N-1:N]), MAXN'(cand_vec));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= G_IDLE;
      ci_q     <= '0;
      cj_q     <= '0;
      cand_q   <= '0;
      best_q   <= '0;
      w_q      <= '0;
      best_w_q <= '0;
      ord_q    <= '0;
      ntests   <= '0;
      done     <= 1'b0;
      for (int unsigned s = 0; s < MAXT; s++) begin
        tests[s]   <= '0;
        weights[s] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        G_IDLE: if (start) begin
          for (int unsigned s = 0; s < MAXT; s++) begin
            tests[s]   <= '0;
            weights[s] <= '0;
          end
          ntests <= 1;   // T0: the initial comparison, no interchange
          ord_q  <= 1;
          st     <= G_ROUND;
        end
        G_ROUND: begin
          cand_q   <= '0;
          best_q   <= '0;
          best_w_q <= '0;
          st       <= G_CAND;
        end
        G_CAND: begin
          if (cand_q[N]) st <= G_END;
          else if (!cand_ok) cand_q <= cand_q + 1'b1;
          else begin
            w_q  <= '0;
            ci_q <= first_cond(32'(ord_q));
            cj_q <= next_cond(first_cond(32'(ord_q)), 32'(ord_q));
            st   <= G_PAIR;
          end
        end
        G_PAIR: begin
          if (ci_q.last) begin
            // all pairs weighted: keep the heaviest candidate
            if (w_q > best_w_q) begin
              best_w_q <= w_q;
              best_q   <= cand_vec;
            end
            cand_q <= cand_q + 1'b1;
            st     <= G_CAND;
          end else if (!i_ok || cj_q.last) begin
            ci_q <= ci_next;
            cj_q <= ci_next2;
          end else begin
            if (j_ok && same_branch && splits) w_q <= w_q + 1'b1;
            cj_q <= cj_next;
          end
        end
        G_END: begin
          if (best_w_q != '0 && 32'(ntests) < MAXT) begin
            tests[IW'(ntests)]   <= best_q;
            weights[IW'(ntests)] <= best_w_q;
            ntests               <= ntests + 1'b1;
            st                   <= G_ROUND;
          end else if (32'(ord_q) < MAX_ORD) begin
            ord_q <= ord_q + 1'b1;
            st    <= G_ROUND;
          end else begin
            done <= 1'b1;
            st   <= G_IDLE;
          end
        end
        default: st <= G_IDLE;
      endcase
    end
  end

  if (MAX_ORD < 1 || MAX_ORD > 2) begin : g_bad_order
    $error("test_generator handles fault orders 1 and 2 only");
  end

  assign busy = (st != G_IDLE);

endmodule
