// tb_pport_in: self-checking test of the poll-type input port controller.
// The testbench stands in for the local clock generator (ai follows ri after
// a varying delay) and for the sending port (a four-phase sender that drives
// data, raises req, waits for ack, changes the data bus to garbage, lowers req
// and waits for ack to fall). Checks: an unarmed port leaves a request
// waiting and answers it once armed; an armed port does not pause the clock before req arrives; the
// order req+ ri+ ai+ ack+ req- ack- ri- ai- ta; the latched word equals the
// word sent even though the bus changes right after ack; ta == pen at the
// end; reset aborts a transfer.
module tb_pport_in;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic        rst_n = 1'b1, pen = 1'b0, ai = 1'b0, req = 1'b0;
  logic        ta, ri, ack;
  logic [15:0] din = 16'h0, q;
  int          ai_delay = 30;

  pport_in #(.DATA_W(16), .GD_PS(50)) dut (.rst_n, .pen, .ta, .ri, .ai, .req, .ack,
                                           .data_in(din), .data_q(q));

  always @(ri) begin
    #(ai_delay);
    ai = ri;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // 1 req+, 2 ri+, 3 ai+, 4 ack+, 5 req-, 6 ack-, 7 ri-, 8 ai-, 9 ta
  int trace [$];
  always @(posedge req) trace.push_back(1);
  always @(posedge ri)  trace.push_back(2);
  always @(posedge ai)  trace.push_back(3);
  always @(posedge ack) trace.push_back(4);
  always @(negedge req) trace.push_back(5);
  always @(negedge ack) trace.push_back(6);
  always @(negedge ri)  trace.push_back(7);
  always @(negedge ai)  trace.push_back(8);
  always @(ta)          trace.push_back(9);

  task automatic send(input logic [15:0] w);
    din = w;
    #20 req = 1'b1;
    wait (ack);
    #5 din = ~w;
    #($urandom_range(10, 300)) req = 1'b0;
    wait (!ack);
  endtask

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    logic [15:0] w;
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #1000;
    // request to an unarmed port: no answer
    din = 16'h1234;
    req = 1'b1;
    #20_000 chk(!ack && !ri, "unarmed port leaves req waiting");
    pen = ~pen;
    wait (ack);
    chk(q == 16'h1234, "waiting word taken once the port is armed");
    #50 req = 1'b0;
    wait (ta == pen);
    #1000;
    for (int i = 0; i < 40; i++) begin
      trace.delete();
      ai_delay = (i % 3 == 0) ? 3000 : $urandom_range(10, 200);
      pen = ~pen;
      #($urandom_range(100, 5000));
      chk(!ri, $sformatf("word %0d: clock not paused before req", i));
      w = 16'($urandom);
      send(w);
      wait (ta == pen);
      #1;
      ok = (trace.size() == 9);
      for (int k = 0; k < 9 && ok; k++) if (trace[k] != k + 1) ok = 1'b0;
      chk(ok, $sformatf("word %0d: handshake order (%0d events)", i, trace.size()));
      chk(q == w, $sformatf("word %0d: latched %h expected %h", i, q, w));
    end
    // reset in the middle of a transfer
    pen = ~pen;
    din = 16'hBEEF;
    req = 1'b1;
    wait (ack);
    #100 rst_n = 1'b0;
    #10 chk(!ack && !ri && !ta, "reset aborts the transfer");
    req = 1'b0;
    pen = 1'b0;
    #5000 rst_n = 1'b1;
    #1000;
    pen = 1'b1;
    send(16'h00C3);
    wait (ta == pen);
    #1 chk(q == 16'h00C3, "transfer after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
