// bmr_buffer: the M+N bit buffer register of the MABMR system.
//
// While the two subsystems agree, every enabled clock stores the current state vector
// (N bits) and input vector (M bits), so that after an error the buffer holds the
// status of the period before the error. When an error freezes the system, the input
// of the error period is captured in a second register so it can be applied again
// during every diagnostic test. The M+N bit buffer follows the document; the second
// register for the error-period input is this design's choice (the document only
// says the current input is retrieved).
// Interface: advance stores {state, input}; capture stores the error-period input.
// Both registers update on the rising edge of clk and reset to zero.
module bmr_buffer #(
  parameter int unsigned M = mabmr_pkg::DATA_W,
  parameter int unsigned N = mabmr_pkg::N_LEVELS * mabmr_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  input  logic         capture,
  input  logic [N-1:0] state_in,
  input  logic [M-1:0] input_in,
  output logic [N-1:0] prev_state,
  output logic [M-1:0] prev_input,
  output logic [M-1:0] err_input
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_state <= '0;
      prev_input <= '0;
      err_input  <= '0;
    end else begin
      if (advance) begin
        prev_state <= state_in;
        prev_input <= input_in;
      end
      if (capture) err_input <= input_in;
    end
  end

  // Storing a new status and freezing on an error are exclusive.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(advance && capture));

endmodule
