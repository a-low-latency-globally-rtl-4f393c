// gals_pkg: gate delays shared by the stretchable-clock GALS interface.
//
// The interface is a self-timed circuit: the order of its handshake events
// (WR+ -> stretch+ -> REQ+ -> ACK+ -> REQ-/stretch-) is set by the delays of
// the few gates it is built from, so every module carries its gate delays as
// parameters. The values below are this design's own estimates for a
// 0.13 um standard-cell library; they are not taken from a data sheet.
// Synthesis ignores them. All delays are in picoseconds (timescale 1ps).
`timescale 1ps / 1ps
package gals_pkg;

  // Flip-flop clock-to-Q and clear-to-Q delay.
  parameter int unsigned T_FF_PS    = 300;
  // Two-input AND gate delay.
  parameter int unsigned T_AND_PS   = 150;
  // Inverter delay.
  parameter int unsigned T_INV_PS   = 50;
  // Two-input NOR gate delay (stretchable clock generator).
  parameter int unsigned T_NOR_PS   = 100;
  // Muller C-element delay (input change to output change).
  parameter int unsigned T_C_PS     = 150;

  // Inverters in the ring of the stretchable clock generator. With the
  // delays above the ring runs at 1 / (2 * (15 * 50 + 150) ps) = 555 MHz.
  parameter int unsigned CLK_N_INV  = 15;

  // Data width of the link (the 8-bit multiplier/adder experiment).
  parameter int unsigned DATA_W     = 8;

  // Stages of the optional Muller-pipeline FIFO (must be even; 0 = none).
  parameter int unsigned FIFO_STAGES = 2;

endpackage
