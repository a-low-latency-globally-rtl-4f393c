// tb_c_element: checks the Muller C-element against its truth table.
// Output follows equal inputs after T_PS and holds its value for unequal
// inputs; reset forces 0. Every input sequence step is compared with a
// reference model held in the testbench.
`timescale 1ps / 1ps
module tb_c_element;
  localparam int unsigned T = 150;
  logic rst, a, b, y;
  logic model;
  int checks = 0, failures = 0;

  c_element #(.T_PS(T)) dut (.rst(rst), .a(a), .b(b), .y(y));

  task automatic step(input logic na, input logic nb);
    a = na; b = nb;
    if (na == nb) model = na;
    #(T + 10);
    checks++;
    if (y !== model) begin
      failures++;
      $display("FAIL a=%b b=%b y=%b expected %b", na, nb, y, model);
    end
  endtask

  initial begin
    rst = 1'b0; a = 1'b0; b = 1'b0;
    #10 rst = 1'b1;
    #(T + 10);
    model = 1'b0;
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    // truth table, including both hold cases from 0 and from 1
    step(0, 1); step(1, 0); step(1, 1); step(0, 1); step(1, 0);
    step(0, 0); step(1, 0); step(0, 1); step(1, 1);
    // delay: the output must not change before T_PS
    a = 1'b0; b = 1'b0;
    #(T - 10);
    checks++;
    if (y !== 1'b1) begin failures++; $display("FAIL output changed before T_PS"); end
    #20;
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL output not changed after T_PS"); end
    model = 1'b0;
    // random sequence
    for (int i = 0; i < 200; i++) step(1'($urandom), 1'($urandom));
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
