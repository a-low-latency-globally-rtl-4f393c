// tb_muller_fifo: checks the Muller-pipeline FIFO with 2 and 4 stages.
// A four-phase producer and consumer with random delays move random words
// through each FIFO; the consumer compares them with a queue of the words
// sent. Also checked: a request crosses an empty FIFO in STAGES * T_C;
// ack_out answers req_in after T_C; with the consumer stopped the FIFO
// accepts exactly STAGES/2 words; the four-phase order holds on both sides.
`timescale 1ps / 1ps
module tb_muller_fifo;
  import gals_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic rst;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- two FIFOs under test ----------------
  logic         req_in2, ack_out2, req_out2, ack_in2;
  logic         req_in4, ack_out4, req_out4, ack_in4;
  logic [W-1:0] d_in2, d_out2, d_in4, d_out4;

  muller_fifo #(.W(W), .STAGES(2)) dut2 (
    .rst(rst), .req_in(req_in2), .ack_out(ack_out2), .d_in(d_in2),
    .req_out(req_out2), .ack_in(ack_in2), .d_out(d_out2));
  muller_fifo #(.W(W), .STAGES(4)) dut4 (
    .rst(rst), .req_in(req_in4), .ack_out(ack_out4), .d_in(d_in4),
    .req_out(req_out4), .ack_in(ack_in4), .d_out(d_out4));

  // four-phase order on every handshake wire pair
  always @(posedge req_out2) if (!rst) check(!ack_in2, "fifo2 req_out rose while ack_in high");
  always @(negedge req_out2) if (!rst) check(ack_in2,  "fifo2 req_out fell unacknowledged");
  always @(posedge req_out4) if (!rst) check(!ack_in4, "fifo4 req_out rose while ack_in high");
  always @(negedge req_out4) if (!rst) check(ack_in4,  "fifo4 req_out fell unacknowledged");

  task automatic run(input int stages, input int words);
    logic [W-1:0] sent [$];
    int received;
    received = 0;
    fork
      // producer
      begin
        for (int i = 0; i < words; i++) begin
          logic [W-1:0] v;
          v = 8'($urandom);
          #($urandom % 400);
          if (stages == 2) begin
            d_in2 = v; sent.push_back(v); #20 req_in2 = 1'b1;
            wait (ack_out2); #($urandom % 100) req_in2 = 1'b0; wait (!ack_out2);
          end else begin
            d_in4 = v; sent.push_back(v); #20 req_in4 = 1'b1;
            wait (ack_out4); #($urandom % 100) req_in4 = 1'b0; wait (!ack_out4);
          end
        end
      end
      // consumer
      begin
        while (received < words) begin
          logic [W-1:0] got;
          if (stages == 2) begin
            wait (req_out2); got = d_out2;
            #(10 + $urandom % 600) ack_in2 = 1'b1; wait (!req_out2); #(10 + $urandom % 100) ack_in2 = 1'b0;
          end else begin
            wait (req_out4); got = d_out4;
            #(10 + $urandom % 600) ack_in4 = 1'b1; wait (!req_out4); #(10 + $urandom % 100) ack_in4 = 1'b0;
          end
          check(sent.size() > 0 && got == sent[0],
                $sformatf("fifo%0d word %0d: got %h expected %h", stages, received, got, sent[0]));
          void'(sent.pop_front());
          received++;
        end
      end
    join
  endtask

  task automatic fill(input int stages);
    int accepted;
    accepted = 0;
    for (int i = 0; i < stages; i++) begin
      if (stages == 2) begin
        d_in2 = 8'(i + 1); #20 req_in2 = 1'b1;
        #(20 * T_C_PS);
        if (!ack_out2) begin req_in2 = 1'b0; break; end
        accepted++; req_in2 = 1'b0; #(20 * T_C_PS);
      end else begin
        d_in4 = 8'(i + 1); #20 req_in4 = 1'b1;
        #(20 * T_C_PS);
        if (!ack_out4) begin req_in4 = 1'b0; break; end
        accepted++; req_in4 = 1'b0; #(20 * T_C_PS);
      end
    end
    check(accepted == stages / 2,
          $sformatf("fifo%0d holds %0d words when full, expected %0d", stages, accepted, stages / 2));
    // drain and check the first word comes out first
    if (stages == 2) begin
      check(req_out2 && d_out2 == 8'd1, "fifo2 first word after fill");
      for (int i = 0; i < accepted; i++) begin
        wait (req_out2); #10 ack_in2 = 1'b1; wait (!req_out2); #10 ack_in2 = 1'b0;
      end
    end else begin
      check(req_out4 && d_out4 == 8'd1, "fifo4 first word after fill");
      for (int i = 0; i < accepted; i++) begin
        wait (req_out4); #10 ack_in4 = 1'b1; wait (!req_out4); #10 ack_in4 = 1'b0;
      end
    end
    #(20 * T_C_PS);
  endtask

  initial begin
    realtime t0, t1;
    rst = 1'b0;
    req_in2 = 0; ack_in2 = 0; d_in2 = 0;
    req_in4 = 0; ack_in4 = 0; d_in4 = 0;
    #10 rst = 1'b1;
    #2000 rst = 1'b0;
    #2000;
    check(!req_out2 && !ack_out2 && !req_out4 && !ack_out4, "FIFO not empty after reset");
    // latency through an empty FIFO
    d_in4 = 8'hC3;
    #20;
    t0 = $realtime;
    req_in4 = 1'b1;
    @(posedge ack_out4) t1 = $realtime;
    check((t1 - t0) == real'(T_C_PS), $sformatf("req_in -> ack_out %0.0f ps", t1 - t0));
    @(posedge req_out4) t1 = $realtime;
    check((t1 - t0) == real'(4 * T_C_PS), $sformatf("empty 4-stage FIFO crossed in %0.0f ps", t1 - t0));
    check(d_out4 == 8'hC3, "word through empty FIFO");
    req_in4 = 1'b0;
    wait (!ack_out4);
    #10 ack_in4 = 1'b1; wait (!req_out4); #10 ack_in4 = 1'b0;
    #2000;
    fill(2);
    fill(4);
    run(2, 300);
    run(4, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
