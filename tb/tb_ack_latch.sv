// tb_ack_latch: checks that the data element stores d on the rising edge of
// en (ACK), holds it while d changes with en high or low, and resets to 0.
`timescale 1ps / 1ps
module tb_ack_latch;
  localparam int W = 8;
  logic rst, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  ack_latch #(.W(W)) dut (.rst(rst), .en(en), .d(d), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b0; en = 1'b0; d = 8'h5A;
    #10 rst = 1'b1;
    #100;
    check(q == '0, "reset value");
    rst = 1'b0;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom);
      #50;
      check(q == model, "q changed without an ACK edge");
      en = 1'b1;
      model = d;
      #10;
      check(q == model, $sformatf("q=%h after ACK+, expected %h", q, model));
      d = 8'($urandom);     // word changes while ACK is still high
      #50;
      check(q == model, "q followed d while ACK high");
      en = 1'b0;
      #20;
      d = 8'($urandom);
      #20;
      check(q == model, "q followed d while ACK low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
