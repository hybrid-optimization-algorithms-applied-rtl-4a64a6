// tb_dport_out: self-checking test of the demand-type output port controller.
// The testbench stands in for the local clock generator (ai follows ri after
// a delay that is sometimes long, as when the clock is in its high phase) and for the receiving port (ack follows req after a random,
// sometimes long, delay). For rising and falling pen transitions it checks
// the order ri+ ai+ req+ ack+ req- ack- ri- ai- ta, that ta only changes at
// the end and then equals pen, that nothing starts without a pen transition,
// and that a reset in the middle of a handshake returns the outputs to idle.
module tb_dport_out;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic rst_n = 1'b1, pen = 1'b0, ai = 1'b0, ack = 1'b0;
  logic ta, ri, req;
  int   ack_delay = 100;

  dport_out #(.GD_PS(50)) dut (.rst_n, .pen, .ta, .ri, .ai, .req, .ack);

  int   ai_delay = 30;
  always @(ri) begin
    #(ai_delay);
    ai = ri;
  end
  always @(req) begin
    #(ack_delay);
    ack = req;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // event trace: 1 ri+, 2 ai+, 3 req+, 4 ack+, 5 req-, 6 ack-, 7 ri-, 8 ai-, 9 ta
  int trace [$];
  always @(posedge ri)  trace.push_back(1);
  always @(posedge ai)  trace.push_back(2);
  always @(posedge req) trace.push_back(3);
  always @(posedge ack) trace.push_back(4);
  always @(negedge req) trace.push_back(5);
  always @(negedge ack) trace.push_back(6);
  always @(negedge ri)  trace.push_back(7);
  always @(negedge ai)  trace.push_back(8);
  always @(ta)          trace.push_back(9);

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #1000;
    chk(ta == pen && !ri && !req, "idle after reset");
    trace.delete();
    #5000 chk(trace.size() == 0, "nothing happens without a pen transition");
    for (int i = 0; i < 40; i++) begin
      trace.delete();
      ack_delay = (i % 4 == 0) ? 5000 + 100 * i : $urandom_range(20, 400);
      ai_delay  = (i % 3 == 0) ? 2000 : $urandom_range(10, 200);
      pen = ~pen;
      #10 chk(ta != pen, $sformatf("transfer %0d: busy after pen", i));
      wait (ta == pen);
      #1;
      ok = (trace.size() == 9);
      for (int k = 0; k < 9 && ok; k++) if (trace[k] != k + 1) ok = 1'b0;
      chk(ok, $sformatf("transfer %0d: handshake order (%0d events)", i, trace.size()));
      chk(!ri && !req, $sformatf("transfer %0d: idle at the end", i));
      #($urandom_range(100, 2000));
    end
    // reset in the middle of a handshake
    ack_delay = 1_000_000;
    pen = ~pen;
    wait (req);
    #500 rst_n = 1'b0;
    #10 chk(!ri && !req && !ta, "reset aborts the handshake");
    pen = 1'b0;
    ack_delay = 100;
    #2_000_000;
    rst_n = 1'b1;
    #1000;
    trace.delete();
    pen = 1'b1;
    wait (ta == pen);
    #1 chk(trace.size() == 9, "handshake works after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
