// diag_computer_model: behavioural model of the diagnostic computer, for simulation
// only.
//
// On each rising edge of irq it waits a few cycles, as a time-shared computer would,
// reads the buffered previous state and input and the input of the error period, and
// evaluates the Boolean model of the module chain: for every level k,
//   x_0 = input, y_k = s_k XOR x_k, x_(k+1) = y_k, s_k(next) = s_k + x_k.
// It returns the fault-free state S_m(t) = F(S(t-T), I(t-T)) and the outputs of
// every level O_m(t) = G(S_m(t), I(t)) with a one-cycle model_we.
module diag_computer_model #(
  parameter int unsigned N       = 4,
  parameter int unsigned W       = 4,
  parameter int unsigned LATENCY = 4
) (
  input  logic           clk,
  input  logic           irq,
  input  logic [N*W-1:0] buf_state,
  input  logic [W-1:0]   buf_input,
  input  logic [W-1:0]   err_input,
  output logic [N*W-1:0] model_state,
  output logic [N*W-1:0] model_out,
  output logic           model_we,
  output int             n_requests
);

  logic irq_q = 1'b0;

  initial begin
    model_state = '0;
    model_out   = '0;
    model_we    = 1'b0;
    n_requests  = 0;
  end

  always @(posedge clk) begin
    irq_q <= irq;
    if (irq && !irq_q) begin
      logic [W-1:0] x;
      repeat (LATENCY) @(posedge clk);
      // F over the previous period
      x = buf_input;
      for (int k = 0; k < N; k++) begin
        logic [W-1:0] s;
        s = buf_state[k*W +: W];
        model_state[k*W +: W] = s + x;
        x = s ^ x;
      end
      // G over the error period
      x = err_input;
      for (int k = 0; k < N; k++) begin
        x = model_state[k*W +: W] ^ x;
        model_out[k*W +: W] = x;
      end
      model_we  = 1'b1;
      n_requests++;
      @(posedge clk);
      model_we = 1'b0;
    end
  end

endmodule
