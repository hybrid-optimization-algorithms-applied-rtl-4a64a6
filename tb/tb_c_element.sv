// tb_c_element: self-checking test of the Muller C element: the output changes
// T_PS after both inputs agree on the new value and holds while they differ.
// Every input combination is visited from both output states, then a random
// sequence is compared with a reference state-holding model.
module tb_c_element;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 10;

  int checks = 0;
  int failures = 0;

  logic a = 1'b0, b = 1'b0;
  logic y;

  c_element #(.T_PS(T), .INIT(1'b0)) dut (.a, .b, .y);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ref_y;
  int mism;

  initial begin
    #100 chk(y == 1'b0, "initial value");
    a = 1'b1;
    #50 chk(y == 1'b0, "a=1 b=0 holds 0");
    b = 1'b1;
    #(T - 2) chk(y == 1'b0, "not before the delay");
    #4 chk(y == 1'b1, "both 1 -> 1");
    a = 1'b0;
    #50 chk(y == 1'b1, "a=0 b=1 holds 1");
    a = 1'b1; b = 1'b0;
    #50 chk(y == 1'b1, "a=1 b=0 holds 1");
    b = 1'b1;
    #50 chk(y == 1'b1, "both 1 stays 1");
    a = 1'b0; b = 1'b0;
    #(T + 2) chk(y == 1'b0, "both 0 -> 0");
    b = 1'b1;
    #50 chk(y == 1'b0, "a=0 b=1 holds 0");
    ref_y = 1'b0;
    mism = 0;
    for (int i = 0; i < 2000; i++) begin
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      if (a == b) ref_y = a;
      #(T + 5);
      if (y != ref_y) mism++;
    end
    chk(mism == 0, $sformatf("random sequence matches reference (%0d)", mism));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
