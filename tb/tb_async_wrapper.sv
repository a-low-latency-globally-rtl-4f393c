// tb_async_wrapper: checks a wrapper with two output ports and one input
// port. After a rising edge of the LS clock the testbench raises the enables
// of a random non-empty subset of ports, then serves the pending ports one by
// one in random order (an ACK pulse for an output port, a REQ for the input
// port). Checked: the clock stops in the same cycle, stays stopped while any
// selected port is still pending, restarts T_FF + T_NOR + T_C after the last
// port is served, and each port's handshake signals behave as specified.
`timescale 1ps / 1ps
module tb_async_wrapper;
  import gals_pkg::*;
  logic       rst, clk, stretch;
  logic [1:0] wr, out_req, out_ack, out_stretch;
  logic [0:0] rd, in_req, in_ack, in_stretch;
  int checks = 0, failures = 0;
  int rises = 0;

  async_wrapper #(.N_OUT(2), .N_IN(1)) dut (.*);

  bit      armed = 1'b0;
  realtime first_rise;
  always @(posedge clk) begin
    rises++;
    if (armed) begin
      first_rise = $realtime;
      armed      = 1'b0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int per, n, order [3], tmp, j;
    logic [2:0] sel, pending;
    realtime t_last, t_rise;
    per = 2 * (CLK_N_INV * T_INV_PS + T_C_PS);
    rst = 1'b0; wr = '0; out_ack = '0; rd = '0; in_req = '0;
    #10 rst = 1'b1;
    #5000 rst = 1'b0;
    repeat (3) @(posedge clk);
    check(stretch == 1'b0, "stretch high with no port enabled");
    for (int it = 0; it < 40; it++) begin
      sel = 3'($urandom_range(1, 7));
      @(posedge clk);
      #50;
      wr = sel[1:0];
      rd = sel[2];
      n = rises;
      #(2 * per);
      check(rises == n, "clock not stopped by a port");
      check(stretch == 1'b1, "merged stretch low");
      for (int p = 0; p < 2; p++)
        check(out_req[p] == sel[p], $sformatf("out_req[%0d] wrong", p));
      pending = sel;
      // serve in random order
      order = '{0, 1, 2};
      for (int k = 2; k > 0; k--) begin
        j = $urandom_range(0, k);
        tmp = order[k]; order[k] = order[j]; order[j] = tmp;
      end
      for (int k = 0; k < 3; k++) begin
        int p;
        p = order[k];
        if (!sel[p]) continue;
        t_last = $realtime;
        armed  = 1'b1;
        if (p < 2) begin
          out_ack[p] = 1'b1;
          wait (!out_req[p]);
          #20 out_ack[p] = 1'b0;
        end else begin
          in_req[0] = 1'b1;
          @(posedge in_ack[0]);
          @(negedge in_ack[0]);
          in_req[0] = 1'b0;
        end
        #(T_FF_PS + 10);
        pending = pending & ~(3'b001 << p);
        if (pending != 0) begin
          n = rises;
          #(per);
          check(rises == n, "clock ran while a port was still pending");
        end
      end
      // all served: the clock restarts promptly
      wait (!armed);
      t_rise = first_rise;
      check((t_rise - t_last) <= real'(T_FF_PS + T_NOR_PS + T_C_PS + 2 * T_AND_PS + 100),
            $sformatf("restart %0.0f ps after last service", t_rise - t_last));
      check(stretch == 1'b0, "stretch still high after all ports served");
      wr = '0; rd = '0;
    end
    // a clock stopped by two ports stays stopped after only one is served
    @(posedge clk);
    #50 wr = 2'b11;
    #(2 * per);
    n = rises;
    out_ack[0] = 1'b1; wait (!out_req[0]); #20 out_ack[0] = 1'b0;
    #(3 * per);
    check(rises == n, "clock restarted with a port still pending");
    check(stretch == 1'b1 && out_stretch == 2'b10, "stretch state after partial service");
    out_ack[1] = 1'b1; wait (!out_req[1]); #20 out_ack[1] = 1'b0;
    #(2 * per);
    check(rises > n, "clock did not restart after all ports served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
