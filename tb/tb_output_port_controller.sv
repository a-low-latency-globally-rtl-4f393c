// tb_output_port_controller: checks the sender-side controller on its own.
// The testbench plays the receiver side: it answers REQ with an ACK pulse
// after a random wait. Checked: stretch rises T_FF after WR+, REQ rises T_AND
// after stretch, nothing happens without WR, REQ stays high until ACK, and
// ACK+ drops REQ after T_INV + T_AND and stretch after T_FF (in parallel,
// not one after the other). Reset clears stretch.
`timescale 1ps / 1ps
module tb_output_port_controller;
  import gals_pkg::*;
  logic rst, wr, ack, stretch, req;
  int checks = 0, failures = 0;

  output_port_controller dut (.rst(rst), .wr(wr), .ack(ack), .stretch(stretch), .req(req));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    realtime t0, t1;
    int wait_ps;
    rst = 1'b0; wr = 1'b0; ack = 1'b0;
    #10 rst = 1'b1;
    #1000;
    check(stretch == 1'b0 && req == 1'b0, "reset: stretch/req not low");
    rst = 1'b0;
    #1000;
    check(stretch == 1'b0 && req == 1'b0, "outputs moved without WR");
    for (int n = 0; n < 50; n++) begin
      wait_ps = 200 + ($urandom % 5000);
      t0 = $realtime;
      wr = 1'b1;
      @(posedge stretch) t1 = $realtime;
      check((t1 - t0) == real'(T_FF_PS), $sformatf("WR+ -> stretch+ took %0.0f", t1 - t0));
      @(posedge req) t0 = $realtime;
      check((t0 - t1) == real'(T_AND_PS), $sformatf("stretch+ -> REQ+ took %0.0f", t0 - t1));
      #(wait_ps);
      check(req == 1'b1 && stretch == 1'b1, "REQ or stretch dropped before ACK");
      // receiver side: ACK pulse, held until REQ falls (four-phase)
      t0 = $realtime;
      ack = 1'b1;
      @(negedge req) t1 = $realtime;
      check((t1 - t0) == real'(T_INV_PS + T_AND_PS), $sformatf("ACK+ -> REQ- took %0.0f", t1 - t0));
      if (stretch) @(negedge stretch);
      t1 = $realtime;
      check((t1 - t0) == real'(T_FF_PS), $sformatf("ACK+ -> stretch- took %0.0f", t1 - t0));
      ack = 1'b0;
      #100 wr = 1'b0;
      #(100 + $urandom % 1000);
      check(req == 1'b0 && stretch == 1'b0, "REQ rose again without a new WR");
    end
    // reset in the middle of a request
    wr = 1'b1;
    #1000;
    rst = 1'b1;
    #(T_FF_PS + T_AND_PS + 10);
    check(stretch == 1'b0 && req == 1'b0, "reset did not clear a pending request");
    rst = 1'b0; wr = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
