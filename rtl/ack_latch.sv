// ack_latch: data holding element between the sender and the receiver wrapper.
//
// The sender's word cannot be handed straight to the receiver, because nobody
// knows when the receiver's restarted clock will next rise. The word is
// therefore stored under control of the receiver-side ACK, which is high only
// when a word is offered and the receiver wants one. This design stores the
// word on the rising edge of ACK and holds it until the next ACK+, so the
// receiver may sample it at any of its clock edges after the handshake.
//
// Following the document: a storage element on the data path controlled by
// ACK, drawn with an edge-sensitive control input, and the rule that the word
// is stored between ACK+ and ACK-. This design's own choice: capture on ACK+
// (a positive-edge register, not a level latch). A latch held open for the
// whole ACK pulse would also pass the next word of a Muller FIFO, whose last
// stage reopens while ACK is still high. Reset clears the stored word.
//
// Interface: rst active high, asynchronous; en (ACK); d from the sender or
// FIFO; q to the receiver.
// Timing: d must be stable around the rising edge of en; q changes on it.
`timescale 1ps / 1ps
module ack_latch #(
  parameter int unsigned W = gals_pkg::DATA_W
) (
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge en or posedge rst) begin
    if (rst)
      q <= '0;
    else
      q <= d;
  end

endmodule
