// bmr_module: one module of a bi-modular redundant subsystem.
//
// Each module is a small synchronous sequential machine in the form
//   s(t+T) = F(s(t), x(t)),   y(t) = G(s(t), x(t))
// with F(s,x) = s + x (mod 2^W) and G(s,x) = s XOR x. The general state/output form
// and the need to restore the memory elements during diagnosis follow the diagnosis
// procedure; the particular F and G are this design's example, chosen so that any
// difference at the input reaches both the next state and the output.
//
// Interface: en is the clock enable through which the system clock is inhibited or
// single-cycled. load (with priority over en) writes load_state into the state
// register, used to restore the memory elements. flt_mask/flt_val force output bits
// (stuck-at faults) and are the fault insertion points for demonstrations; tie
// flt_mask to zero in a fault-free build.
// Timing: y is combinational in s and x; s changes on the rising edge of clk.
module bmr_module #(
  parameter int unsigned W = mabmr_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] load_state,
  input  logic [W-1:0] x,
  input  logic [W-1:0] flt_mask,
  input  logic [W-1:0] flt_val,
  output logic [W-1:0] y,
  output logic [W-1:0] s
);

  logic [W-1:0] s_next;
  logic [W-1:0] y_good;

  always_comb begin
    s_next = s + x;
    y_good = s ^ x;
    y      = (y_good & ~flt_mask) | (flt_val & flt_mask);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= '0;
    else if (load) s <= load_state;
    else if (en)   s <= s_next;
  end

endmodule
