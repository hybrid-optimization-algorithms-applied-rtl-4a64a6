// tb_delay_line: self-checking test of the programmable delay line. For a set
// of control words it sends rising and falling edges and checks that each
// appears on the output exactly ctrl * STEP_PS later (one step for ctrl = 0),
// and that a pulse slightly longer than the delay keeps its width.
module tb_delay_line;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int STEP = 10;

  int checks = 0;
  int failures = 0;

  logic        din = 1'b0;
  logic [11:0] ctrl = 12'd0;
  logic        dout;

  delay_line #(.CTRL_W(12), .STEP_PS(STEP)) dut (.din, .ctrl, .dout);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic edge_test(input int c);
    longint t0, d;
    int exp_d;
    exp_d = (c == 0) ? STEP : c * STEP;
    ctrl = 12'(c);
    #1;
    for (int v = 1; v >= 0; v--) begin
      din = 1'(v);
      t0 = $time;
      wait (dout == 1'(v));
      d = $time - t0;
      chk(d == exp_d, $sformatf("ctrl %0d edge %0d delay %0d expected %0d", c, v, d, exp_d));
      #(exp_d + 5);
    end
  endtask

  initial begin
    #100;
    edge_test(0);
    edge_test(1);
    edge_test(7);
    edge_test(997);
    edge_test(1500);
    edge_test(4095);
    ctrl = 12'd100;
    #10 din = 1'b1;
    #1001 chk(dout == 1'b1, "pulse leading edge after 1000 ps");
    din = 1'b0;
    #998 chk(dout == 1'b1, "pulse still high");
    #3 chk(dout == 1'b0, "pulse width kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
