// tb_bmr_buffer: self-checking testbench of bmr_buffer.
// Random advance/capture cycles; checks that the buffer holds the last advanced state
// and input and that the error-period input is captured only on capture.
module tb_bmr_buffer;
  localparam int M = 4, N = 16;
  logic clk = 0, rst_n = 0, advance, capture;
  logic [N-1:0] state_in, prev_state, rs;
  logic [M-1:0] input_in, prev_input, err_input, ri, re;
  int checks = 0, failures = 0;

  bmr_buffer #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0; capture = 0; state_in = 0; input_in = 0;
    rs = 0; ri = 0; re = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      case ($urandom % 3)
        0: begin advance = 1; capture = 0; end
        1: begin advance = 0; capture = 1; end
        default: begin advance = 0; capture = 0; end
      endcase
      state_in = N'($urandom);
      input_in = M'($urandom);
      if (advance) begin rs = state_in; ri = input_in; end
      if (capture) re = input_in;
      @(posedge clk);
      #1;
      checks += 3;
      if (prev_state !== rs) begin failures++; $display("prev_state %h want %h", prev_state, rs); end
      if (prev_input !== ri) begin failures++; $display("prev_input %h want %h", prev_input, ri); end
      if (err_input !== re) begin failures++; $display("err_input %h want %h", err_input, re); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
