// tb_bmr_module: self-checking testbench of bmr_module.
// Drives random inputs, loads and enables, and checks the state register and output
// against s' = s + x, y = s ^ x computed here, including stuck-at output faults.
module tb_bmr_module;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, en, load;
  logic [W-1:0] load_state, x, flt_mask, flt_val, y, s;
  logic [W-1:0] s_ref;
  int checks = 0, failures = 0;

  bmr_module #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; load = 0; load_state = 0; x = 0; flt_mask = 0; flt_val = 0;
    s_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      load = ($urandom % 8) == 0;
      load_state = W'($urandom);
      x = W'($urandom);
      flt_mask = (($urandom % 4) == 0) ? W'($urandom) : '0;
      flt_val = W'($urandom);
      #1;
      checks++;
      if (y !== (((s_ref ^ x) & ~flt_mask) | (flt_val & flt_mask))) begin
        failures++;
        $display("y mismatch at %0d: got %h", i, y);
      end
      if (load) s_ref = load_state;
      else if (en) s_ref = s_ref + x;
      @(posedge clk);
      #1;
      checks++;
      if (s !== s_ref) begin
        failures++;
        $display("s mismatch at %0d: got %h want %h", i, s, s_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
