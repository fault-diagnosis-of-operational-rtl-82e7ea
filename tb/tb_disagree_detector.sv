// tb_disagree_detector: self-checking testbench of disagree_detector.
// Random equal and unequal vector pairs; checks the difference and the flag.
module tb_disagree_detector;
  localparam int W = 8;
  logic [W-1:0] a, b, diff;
  logic err;
  int checks = 0, failures = 0;

  disagree_detector #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = W'($urandom);
      case (i % 3)
        0: b = a;
        1: b = a ^ (W'(1) << ($urandom % W));
        default: b = W'($urandom);
      endcase
      #1;
      checks += 2;
      if (diff !== (a ^ b)) begin failures++; $display("diff wrong %h %h", a, b); end
      if (err !== (a != b)) begin failures++; $display("err wrong %h %h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
