// muller_fifo: four-phase bundled-data Muller pipeline used as an
// asynchronous FIFO between the output and the input port controller.
//
// Each stage has one C-element, one inverter and a data latch. The C-element
// of stage i takes the request from the left (req_in, or the C-element output
// of stage i-1) and the inverted C-element output of stage i+1 (or the
// inverted ack_in). A stage's C-element output is both the request to the
// right and the acknowledge to the left. A token moves right while the next
// stage is empty, so a sender can hand its word to the FIFO and get ACK
// without waiting for the receiver. When the receiver stops taking words the
// pipeline fills to STAGES/2 words (full stages alternate with empty ones),
// which is why the stage count must be even.
//
// Following the document: the C-element/inverter/latch stage of the Muller
// pipeline, its use as a FIFO on the data path and the even stage count, with
// 2 and 4 stages as the sizes it reports. This design's own choices: the
// latches are open while their stage's C-element output is 0 and close when
// it rises; all C-elements and latches reset to 0.
//
// Interface (4-phase, bundled data, active-high request and acknowledge):
//   left : req_in, d_in in; ack_out out.   right: req_out, d_out out; ack_in in.
// Lint: the stage chain is a ring of C-elements (each stage's output feeds
// the stage before it through an inverter), so a linter reports circular
// combinational logic. That loop is the handshake itself and is intended.
//
// Timing: an empty FIFO passes a request to req_out after STAGES * T_C_PS;
// ack_out rises T_C_PS after req_in when stage 0 is empty.
`timescale 1ps / 1ps
module muller_fifo #(
  parameter int unsigned W        = gals_pkg::DATA_W,
  parameter int unsigned STAGES   = gals_pkg::FIFO_STAGES,
  parameter int unsigned T_C_PS   = gals_pkg::T_C_PS,
  parameter int unsigned T_INV_PS = gals_pkg::T_INV_PS
) (
  input  logic         rst,
  // left (sender) side
  input  logic         req_in,
  output logic         ack_out,
  input  logic [W-1:0] d_in,
  // right (receiver) side
  output logic         req_out,
  input  logic         ack_in,
  output logic [W-1:0] d_out
);

  logic [STAGES-1:0] c;        // C-element outputs
  logic [STAGES-1:0] nack;     // inverted acknowledge into each stage
  logic [STAGES:0]   req_chain;
  logic [STAGES:0]   ack_chain;
  logic [W-1:0]      data [STAGES+1];

  initial begin
    assert (STAGES >= 2 && STAGES % 2 == 0)
      else $error("muller_fifo: STAGES must be even and at least 2");
  end

  assign req_chain[0]      = req_in;
  assign ack_chain[STAGES] = ack_in;
  assign data[0]           = d_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    assign #(T_INV_PS) nack[i] = ~ack_chain[i+1];

    c_element #(.T_PS(T_C_PS)) u_c (
      .rst (rst),
      .a   (req_chain[i]),
      .b   (nack[i]),
      .y   (c[i])
    );

    assign req_chain[i+1] = c[i];
    assign ack_chain[i]   = c[i];

    // Latch: transparent while the stage is empty (c = 0), holds once its
    // C-element has accepted the token (c = 1).
    always_latch begin
      if (rst)
        data[i+1] = '0;
      else if (!c[i])
        data[i+1] = data[i];
    end
  end

  assign ack_out = ack_chain[0];
  assign req_out = req_chain[STAGES];
  assign d_out   = data[STAGES];
endmodule
