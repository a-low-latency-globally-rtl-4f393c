// tb_input_port_controller: checks the receiver-side controller on its own.
// The testbench plays the sender side (REQ) and the receiver (RD) in both
// orders: REQ first (receiver late) and RD first (sender late). Checked:
// stretch rises T_FF after RD+; ACK rises T_AND after the later of REQ and
// stretch; no ACK without RD or without REQ; ACK+ clears stretch after T_FF
// and ACK falls T_AND after that, giving a pulse of T_FF + T_AND.
`timescale 1ps / 1ps
module tb_input_port_controller;
  import gals_pkg::*;
  logic rst, rd, req, stretch, ack;
  int checks = 0, failures = 0;
  int n_acks = 0;

  input_port_controller dut (.rst(rst), .rd(rd), .req(req), .stretch(stretch), .ack(ack));

  always @(posedge ack) n_acks++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    realtime t0, t1, t2;
    int gap;
    rst = 1'b0; rd = 1'b0; req = 1'b0;
    #10 rst = 1'b1;
    #1000;
    check(stretch == 1'b0 && ack == 1'b0, "reset: stretch/ack not low");
    rst = 1'b0;
    // REQ alone gives no ACK
    req = 1'b1;
    #2000;
    check(ack == 1'b0 && n_acks == 0, "ACK without RD");
    req = 1'b0;
    #500;
    for (int n = 0; n < 60; n++) begin
      gap = 100 + $urandom % 3000;
      if (n % 2 == 0) begin
        // sender first, receiver late
        req = 1'b1;
        #(gap);
        t0 = $realtime;
        rd = 1'b1;
        @(posedge stretch) t1 = $realtime;
        check((t1 - t0) == real'(T_FF_PS), "RD+ -> stretch+ wrong");
      end else begin
        // receiver first, sender late
        t0 = $realtime;
        rd = 1'b1;
        @(posedge stretch) t1 = $realtime;
        check((t1 - t0) == real'(T_FF_PS), "RD+ -> stretch+ wrong");
        #(gap);
        check(ack == 1'b0, "ACK without REQ");
        t1 = $realtime;
        req = 1'b1;
      end
      @(posedge ack) t0 = $realtime;
      check((t0 - t1) == real'(T_AND_PS), $sformatf("-> ACK+ took %0.0f", t0 - t1));
      @(negedge stretch) t1 = $realtime;
      check((t1 - t0) == real'(T_FF_PS), "ACK+ -> stretch- wrong");
      @(negedge ack) t2 = $realtime;
      check((t2 - t0) == real'(T_FF_PS + T_AND_PS), $sformatf("ACK pulse %0.0f ps", t2 - t0));
      req = 1'b0;
      #200 rd = 1'b0;
      #(200 + $urandom % 500);
      check(n_acks == n + 1, "ACK count wrong");
    end
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
