// c_element: Muller C-element with active-high reset.
//
// The output follows the inputs when they agree and holds its previous value
// when they differ (out = 1 for 1/1, 0 for 0/0, unchanged for 0/1 and 1/0).
// The gate-level form is the majority function out = a&b | a&out | b&out;
// here it is written as a latch that is open exactly when a == b, which is
// the same function. The reset forces the output to 0, as the interface needs
// a known initial value for every C-element.
//
// The stored value feeds back into the enable when C-elements are chained
// (Muller FIFO, clock generator); linters report that as a combinational
// loop, which is the intended asynchronous state-holding behaviour.
//
// Interface: a, b inputs; rst active high, asynchronous; y output.
// Timing: y changes T_PS after the input change that enables it.
`timescale 1ps / 1ps
module c_element #(
  parameter int unsigned T_PS = gals_pkg::T_C_PS
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic y
);

  logic state;

  always_latch begin
    if (rst)
      state = 1'b0;
    else if (a == b)
      state = a;
  end

  assign #(T_PS) y = state;

endmodule
