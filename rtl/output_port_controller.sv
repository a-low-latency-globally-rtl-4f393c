// output_port_controller: sender-side port controller of the stretchable-clock
// GALS interface.
//
// The locally synchronous sender raises WR when it has a word to send. The
// rising edge of WR clocks a D flip-flop whose D input is tied to 1; its output
// is stretch1, which stops the sender's clock. REQ is stretch1 AND NOT ACK, so
// REQ follows stretch1. When the receiver side answers with ACK, ACK clears
// the flip-flop and, through the inverter, drops REQ at the same time: REQ-
// and stretch1- run in parallel instead of one after the other, which is what
// shortens the handshake. The sender's clock restarts as soon as stretch1
// falls; the word it offered is held in the ACK-controlled latch by then.
//
// Following the document: the event order (WR+, stretch+, REQ+, ACK+, then REQ-
// and stretch- in parallel), the D flip-flop clocked by WR and reset by ACK,
// and the gate budget of the pair of controllers (two flip-flops, two AND
// gates, one inverter). This design's own choices: the exact gate wiring
// (REQ = stretch & ~ACK), the extra reset input and the gate delays.
//
// Interface: rst (active high, clears stretch), wr from the sender, ack from
// the link; stretch to the sender's clock generator, req to the link.
// Timing: stretch rises T_FF after WR+; REQ rises T_AND later. After ACK+,
// REQ falls after T_INV + T_AND and stretch after T_FF. WR must not rise
// again while ACK is still high (the clear would swallow the edge).
`timescale 1ps / 1ps
module output_port_controller #(
  parameter int unsigned T_FF_PS  = gals_pkg::T_FF_PS,
  parameter int unsigned T_AND_PS = gals_pkg::T_AND_PS,
  parameter int unsigned T_INV_PS = gals_pkg::T_INV_PS
) (
  input  logic rst,
  input  logic wr,
  input  logic ack,
  output logic stretch,
  output logic req
);

  logic s_q;
  logic ack_n;


  // D flip-flop, D tied high, clocked by WR, asynchronously cleared by ACK.
  always_ff @(posedge wr or posedge ack or posedge rst) begin
    if (rst)
      s_q <= 1'b0;
    else if (ack)
      s_q <= 1'b0;
    else
      s_q <= 1'b1;
  end

  assign #(T_FF_PS)  stretch = s_q;
  assign #(T_INV_PS) ack_n   = ~ack;
  assign #(T_AND_PS) req     = stretch & ack_n;

endmodule
