// stretch_clock_gen: stretchable local clock generator (behavioural model).
//
// Behavioural model: the oscillation period is set by gate delays, which only
// a simulator or a full-custom layout gives; synthesis of this module yields
// a combinational loop, not a clock.
//
// Structure: a NOR gate takes the stretch request and the clock output, an
// odd chain of inverters takes the clock output, and a C-element combines the
// NOR output with the end of the inverter chain to produce the clock.
//   clk = 1: NOR -> 0, chain -> 0 after the chain delay, so clk falls.
//   clk = 0: NOR -> 1 (if stretch = 0), chain -> 1, so clk rises.
// While stretch = 1 the NOR output stays 0 and the C-element cannot rise:
// the clock stops in its low phase. When stretch falls, the chain output is
// already 1, so the next rising edge follows after only T_NOR + T_C.
// The reset is this design's addition: it holds the C-element at 0 so that
// the clock starts from a known low phase.
//
// Interface: rst active high; stretch active high; clk output.
// Timing: period = 2 * (N_INV * T_INV_PS + T_C_PS) while stretch = 0, as long
// as the chain is slower than the NOR gate. A stretch request must arrive
// before the next rising edge to stop the clock in the current cycle.
`timescale 1ps / 1ps
module stretch_clock_gen #(
  parameter int unsigned N_INV    = gals_pkg::CLK_N_INV,
  parameter int unsigned T_INV_PS = gals_pkg::T_INV_PS,
  parameter int unsigned T_NOR_PS = gals_pkg::T_NOR_PS,
  parameter int unsigned T_C_PS   = gals_pkg::T_C_PS
) (
  input  logic rst,
  input  logic stretch,
  output logic clk
);

  logic       nor_out;
  logic [N_INV:0] chain;

  initial begin
    assert (N_INV % 2 == 1) else $error("stretch_clock_gen: N_INV must be odd");
  end

  assign #(T_NOR_PS) nor_out = ~(stretch | clk);

  assign chain[0] = clk;
  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    assign #(T_INV_PS) chain[i+1] = ~chain[i];
  end

  c_element #(.T_PS(T_C_PS)) u_c (
    .rst (rst),
    .a   (nor_out),
    .b   (chain[N_INV]),
    .y   (clk)
  );

endmodule
