// mabmr_system: model assisted bi-modular redundant (MABMR) synchronous system.
//
// Two identical subsystems, A and B, each a chain of N modules, run side by side on
// the same input. Every connection between levels passes a steering switch, so the
// two modules of any level can be interchanged between the subsystems, or a defective
// module can be isolated and its counterpart made to serve both. Exclusive-or
// detectors compare the two subsystems' signals between the levels, at the output and
// across the state vectors every cycle. While they agree, the buffer register keeps
// the previous state and input. On a disagreement the clock is inhibited and an
// interrupt asks the diagnostic computer for the fault-free response: the state
// S_m(t) = F(S(t-T), I(t-T)) and the outputs O_m(t) = G(S_m(t), I(t)), evaluated
// from a Boolean model of the system. Because the detectors watch the signal between
// every pair of levels, the response holds the output of every level, not only the
// last one: a fault whose effect an isolated level hides is still seen. The
// controller then replays the error period once per test vector, each time with a
// different interchange of modules, and compares both subsystems with the model.
// The ternary outcomes identify the defective modules through the binary model of the
// system, the modules are isolated, the state is restored and the system runs again,
// still checking the levels that remain redundant. Test vectors come from the test
// generator, which applies the test weighting algorithm after reset and after every
// isolation.
//
// Interface: sys_in/sys_out are the system's data input and output (subsystem A, the
// primary). flt_mask_*/flt_val_* force stuck-at values on module outputs, for fault
// insertion in demonstrations (tie to zero otherwise). The computer reads buf_state,
// buf_input and err_input on irq and answers with model_state and model_out (level k
// at bits k*W +: W, the last level being the system output) and a one-cycle model_we. Status outputs report isolated modules, halting, and counts of
// the mechanisms. The document fixes the structure; the module function, widths and
// handshakes are this design's choices.
module mabmr_system
  import mabmr_pkg::*;
#(
  parameter int unsigned N       = mabmr_pkg::N_LEVELS,
  parameter int unsigned W       = mabmr_pkg::DATA_W,
  parameter int unsigned MAX_ORD = mabmr_pkg::MAX_ORDER
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        sys_in,
  output logic [W-1:0]        sys_out,
  // fault insertion, per module
  input  logic [W-1:0]        flt_mask_a [N],
  input  logic [W-1:0]        flt_val_a  [N],
  input  logic [W-1:0]        flt_mask_b [N],
  input  logic [W-1:0]        flt_val_b  [N],
  // diagnostic computer
  output logic                irq,
  output logic [N*W-1:0]      buf_state,
  output logic [W-1:0]        buf_input,
  output logic [W-1:0]        err_input,
  input  logic [N*W-1:0]      model_state,
  input  logic [N*W-1:0]      model_out,
  input  logic                model_we,
  // status
  output logic                err,
  output logic                halted,
  output logic                diagnosing,
  output logic [N-1:0]        iso_a,
  output logic [N-1:0]        iso_b,
  output logic [N-1:0]        swap,
  output logic                tests_busy,
  output logic [15:0]         n_errors,
  output logic [15:0]         n_detector,
  output logic [15:0]         n_isolations,
  output logic [15:0]         n_tests
);

  localparam int unsigned MAXT = 2 ** (N - 1);
  localparam int unsigned TW   = $clog2(MAXT + 1);

  // control
  logic         mod_en, mod_load, load_model, buf_advance, buf_capture;
  logic [1:0]   in_sel;
  logic [N-1:0] active;

  // chain signals: logical (per subsystem) and physical (per module)
  logic [W-1:0] x_a [N+1];
  logic [W-1:0] x_b [N+1];
  logic [W-1:0] s_a [N];
  logic [W-1:0] s_b [N];
  logic [W-1:0] xp_a [N], xp_b [N], yp_a [N], yp_b [N], sp_a [N], sp_b [N];
  logic [W-1:0] x_in;
  logic [N*W-1:0] svec_a, svec_b, yvec_a, yvec_b;
  logic [N*W-1:0] model_state_q;
  logic [N*W-1:0] model_out_q;

  // input selection: live, buffered previous period, error period
  always_comb begin
    unique case (in_sel)
      2'd1:    x_in = buf_input;
      2'd2:    x_in = err_input;
      default: x_in = sys_in;
    endcase
  end
  assign x_a[0] = x_in;
  assign x_b[0] = x_in;

  for (genvar k = 0; k < N; k++) begin : g_level
    logic [W-1:0] restore;
    assign restore = load_model ? model_state_q[k*W +: W] : buf_state[k*W +: W];

    bmr_module #(.W(W)) u_mod_a (
      .clk, .rst_n, .en(mod_en), .load(mod_load), .load_state(restore),
      .x(xp_a[k]), .flt_mask(flt_mask_a[k]), .flt_val(flt_val_a[k]), .y(yp_a[k]), .s(sp_a[k]));
    bmr_module #(.W(W)) u_mod_b (
      .clk, .rst_n, .en(mod_en), .load(mod_load), .load_state(restore),
      .x(xp_b[k]), .flt_mask(flt_mask_b[k]), .flt_val(flt_val_b[k]), .y(yp_b[k]), .s(sp_b[k]));

    steering_switch #(.W(W)) u_sw (
      .swap(swap[k]), .iso_a(iso_a[k]), .iso_b(iso_b[k]),
      .x_a(x_a[k]), .x_b(x_b[k]), .xp_a(xp_a[k]), .xp_b(xp_b[k]),
      .yp_a(yp_a[k]), .yp_b(yp_b[k]), .sp_a(sp_a[k]), .sp_b(sp_b[k]),
      .y_a(x_a[k+1]), .y_b(x_b[k+1]), .s_a(s_a[k]), .s_b(s_b[k]));

    assign svec_a[k*W +: W] = s_a[k];
    assign svec_b[k*W +: W] = s_b[k];
    assign yvec_a[k*W +: W] = x_a[k+1];
    assign yvec_b[k*W +: W] = x_b[k+1];
  end

  assign sys_out = x_a[N];

  // disagreement detection: the signal entering each following level (and the system
  // output), and the state vectors
  logic [N-1:0] lvl_err;
  logic         st_err;
  for (genvar k = 0; k < N; k++) begin : g_det
    logic [W-1:0] unused_diff;
    disagree_detector #(.W(W)) u_det (.a(x_a[k+1]), .b(x_b[k+1]), .diff(unused_diff), .err(lvl_err[k]));
  end
  logic [N*W-1:0] st_diff;
  disagree_detector #(.W(N*W)) u_det_state (.a(svec_a), .b(svec_b), .diff(st_diff), .err(st_err));
  assign err = st_err || (|lvl_err);

  // comparison of each subsystem with the model response, over the levels that are
  // still redundant: a level reduced to one module serves both subsystems, so what it
  // holds says nothing about which subsystem is at fault
  logic [N*W-1:0] lvl_mask;
  for (genvar k = 0; k < N; k++) begin : g_mask
    assign lvl_mask[k*W +: W] = {W{active[k]}};
  end
  logic a_st_bad, a_out_bad, b_st_bad, b_out_bad;
  logic [N*W-1:0] ma_sd, mb_sd, ma_od, mb_od;
  disagree_detector #(.W(N*W)) u_cmp_a_st  (.a(svec_a & lvl_mask), .b(model_state_q & lvl_mask),
                                            .diff(ma_sd), .err(a_st_bad));
  disagree_detector #(.W(N*W)) u_cmp_a_out (.a(yvec_a & lvl_mask), .b(model_out_q & lvl_mask),
                                            .diff(ma_od), .err(a_out_bad));
  disagree_detector #(.W(N*W)) u_cmp_b_st  (.a(svec_b & lvl_mask), .b(model_state_q & lvl_mask),
                                            .diff(mb_sd), .err(b_st_bad));
  disagree_detector #(.W(N*W)) u_cmp_b_out (.a(yvec_b & lvl_mask), .b(model_out_q & lvl_mask),
                                            .diff(mb_od), .err(b_out_bad));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      model_state_q <= '0;
      model_out_q   <= '0;
    end else if (model_we) begin
      model_state_q <= model_state;
      model_out_q   <= model_out;
    end
  end

  bmr_buffer #(.M(W), .N(N*W)) u_buf (
    .clk, .rst_n, .advance(buf_advance), .capture(buf_capture),
    .state_in(svec_a), .input_in(sys_in),
    .prev_state(buf_state), .prev_input(buf_input), .err_input(err_input));

  // test sequence and fault location
  logic          gen_start, gen_done;
  logic [N-1:0]  tests [MAXT];
  logic [15:0]   weights [MAXT];
  logic [TW-1:0] ntests;
  result_e       results [MAXT];
  logic          loc_found, loc_amb;
  logic [N-1:0]  loc_fa, loc_fb;
  logic [$clog2(MAX_ORD+1)-1:0] loc_order;

  test_generator #(.N(N), .MAXT(MAXT), .MAX_ORD(MAX_ORD)) u_gen (
    .clk, .rst_n, .start(gen_start), .active, .busy(tests_busy), .done(gen_done),
    .tests, .weights, .ntests);

  fault_locator #(.N(N), .MAXT(MAXT), .MAX_ORD(MAX_ORD)) u_loc (
    .tests, .results, .ntests, .active, .found(loc_found), .ambiguous(loc_amb),
    .fault_a(loc_fa), .fault_b(loc_fb), .order(loc_order));

  diag_controller #(.N(N), .MAXT(MAXT)) u_ctl (
    .clk, .rst_n, .err, .model_we,
    .a_bad(a_st_bad || a_out_bad), .b_bad(b_st_bad || b_out_bad),
    .gen_start, .gen_busy(tests_busy), .tests, .ntests,
    .results, .loc_found, .loc_fault_a(loc_fa), .loc_fault_b(loc_fb),
    .mod_en, .mod_load, .load_model, .in_sel, .buf_advance, .buf_capture,
    .swap, .iso_a, .iso_b, .active,
    .irq, .halted, .diagnosing, .n_errors, .n_detector, .n_isolations, .n_tests);

endmodule
