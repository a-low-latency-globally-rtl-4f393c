// input_port_controller: receiver-side port controller of the stretchable-
// clock GALS interface.
//
// The locally synchronous receiver raises RD when it needs a word. The rising
// edge of RD clocks a D flip-flop whose D input is tied to 1; its output is
// stretch2, which stops the receiver's clock. ACK is REQ AND stretch2: it is
// given only when the sender offers a word and the receiver wants one, which
// is why ACK also opens the data latch. ACK clears the flip-flop, so stretch2
// falls in parallel with the sender's REQ- and stretch1-, and ACK itself falls
// once stretch2 (or REQ) is low. ACK is therefore a self-timed pulse whose
// width is the flip-flop clear delay plus one AND delay.
//
// Following the document: the event order of the new STG (ACK+ is the first
// event after which REQ, stretch1 and stretch2 fall in parallel), the D
// flip-flop clocked by the enable signal and the two-flip-flop, two-AND,
// one-inverter budget of the controller pair. This design's own choices: the
// exact gate wiring (ACK = REQ & stretch2, flip-flop cleared by ACK), the
// reset input and the gate delays.
//
// Interface: rst (active high), rd from the receiver, req from the link;
// stretch to the receiver's clock generator, ack to the link and the latch.
// Timing: stretch rises T_FF after RD+. ACK rises T_AND after both REQ and
// stretch are high and stays high for T_FF + T_AND.
`timescale 1ps / 1ps
module input_port_controller #(
  parameter int unsigned T_FF_PS  = gals_pkg::T_FF_PS,
  parameter int unsigned T_AND_PS = gals_pkg::T_AND_PS
) (
  input  logic rst,
  input  logic rd,
  input  logic req,
  output logic stretch,
  output logic ack
);

  logic s_q;

  // D flip-flop, D tied high, clocked by RD, asynchronously cleared by ACK.
  always_ff @(posedge rd or posedge ack or posedge rst) begin
    if (rst)
      s_q <= 1'b0;
    else if (ack)
      s_q <= 1'b0;
    else
      s_q <= 1'b1;
  end

  assign #(T_FF_PS)  stretch = s_q;
  assign #(T_AND_PS) ack     = req & stretch;

endmodule
