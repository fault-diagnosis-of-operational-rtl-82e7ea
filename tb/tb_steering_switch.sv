// tb_steering_switch: self-checking testbench of steering_switch.
// Exhausts the control combinations with random data and checks routing of inputs,
// outputs and states for normal, interchanged and isolated operation.
module tb_steering_switch;
  localparam int W = 4;
  logic swap, iso_a, iso_b;
  logic [W-1:0] x_a, x_b, xp_a, xp_b, yp_a, yp_b, sp_a, sp_b, y_a, y_b, s_a, s_b;
  int checks = 0, failures = 0;

  steering_switch #(.W(W)) dut (.*);

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h (swap=%b iso_a=%b iso_b=%b)", what, got, want, swap, iso_a, iso_b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      {swap, iso_a, iso_b} = 3'(i % 6);   // iso_a and iso_b never both set
      x_a = W'($urandom); x_b = W'($urandom);
      yp_a = W'($urandom); yp_b = W'($urandom);
      sp_a = W'($urandom); sp_b = W'($urandom);
      #1;
      if (swap && !iso_a && !iso_b) begin
        chk(xp_a, x_b, "xp_a"); chk(xp_b, x_a, "xp_b");
        chk(y_a, yp_b, "y_a");  chk(y_b, yp_a, "y_b");
        chk(s_a, sp_b, "s_a");  chk(s_b, sp_a, "s_b");
      end else if (iso_a) begin
        chk(xp_b, x_b, "xp_b");
        chk(y_a, yp_b, "y_a");  chk(y_b, yp_b, "y_b");
        chk(s_a, sp_b, "s_a");  chk(s_b, sp_b, "s_b");
      end else if (iso_b) begin
        chk(xp_a, x_a, "xp_a");
        chk(y_a, yp_a, "y_a");  chk(y_b, yp_a, "y_b");
        chk(s_a, sp_a, "s_a");  chk(s_b, sp_a, "s_b");
      end else begin
        chk(xp_a, x_a, "xp_a"); chk(xp_b, x_b, "xp_b");
        chk(y_a, yp_a, "y_a");  chk(y_b, yp_b, "y_b");
        chk(s_a, sp_a, "s_a");  chk(s_b, sp_b, "s_b");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
