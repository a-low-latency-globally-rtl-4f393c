// gals_top: one point-to-point link of a stretchable-clock GALS system.
//
// Two locally synchronous modules, each with its own clock, exchange words
// through an asynchronous four-phase handshake. This module holds everything
// between them:
//   sender wrapper   : async_wrapper with one output port
//                      (stretch_clock_gen for tx_clk + output_port_controller)
//   optional FIFO    : muller_fifo with FIFO_STAGES stages (0 = direct link)
//   receiver wrapper : async_wrapper with one input port
//                      (stretch_clock_gen for rx_clk + input_port_controller)
//   data storage     : ack_latch, loaded on the receiver-side ACK+
// The sender puts a word on tx_data and raises tx_wr on a rising edge of
// tx_clk; its clock then stops (tx_stretch) until the word has been taken.
// The receiver raises rx_rd on a rising edge of rx_clk; its clock stops until
// a word has been latched, and the first rx_clk edge after the stop samples
// rx_data. With the new controllers the two clocks restart as soon as ACK
// rises, in parallel with the rest of the handshake. With a FIFO the sender
// is acknowledged by the FIFO's first stage and only waits when it is full.
//
// The LS modules themselves are outside; the clocks are outputs for them.
// Following the document: the partition into wrappers, controllers, clock
// generators, latch and FIFO. This design's own choices: the port list, the
// reset, the parameter for a direct link and all delay values.
//
// Timing: without a FIFO, when WR and RD rise together the last stretch falls
// 2*T_FF + 2*T_AND after them (900 ps with the package defaults).
`timescale 1ps / 1ps
module gals_top #(
  parameter int unsigned DATA_W      = gals_pkg::DATA_W,
  parameter int unsigned FIFO_STAGES = gals_pkg::FIFO_STAGES,
  parameter int unsigned TX_N_INV    = gals_pkg::CLK_N_INV,
  parameter int unsigned TX_T_INV_PS = gals_pkg::T_INV_PS,
  parameter int unsigned RX_N_INV    = gals_pkg::CLK_N_INV,
  parameter int unsigned RX_T_INV_PS = gals_pkg::T_INV_PS
) (
  input  logic              rst,
  // sender (locally synchronous module 1)
  output logic              tx_clk,
  input  logic              tx_wr,
  input  logic [DATA_W-1:0] tx_data,
  output logic              tx_stretch,
  // receiver (locally synchronous module 2)
  output logic              rx_clk,
  input  logic              rx_rd,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_stretch,
  // handshake wires, brought out for observation
  output logic              tx_req,
  output logic              tx_ack,
  output logic              rx_req,
  output logic              rx_ack
);

  logic [DATA_W-1:0] link_data;

  // ---------------- sender wrapper: one output port ----------------
  logic tx_unused_ack, tx_unused_stretch, tx_merged;

  async_wrapper #(.N_OUT(1), .N_IN(0), .N_INV(TX_N_INV), .T_INV_PS(TX_T_INV_PS)) u_tx (
    .rst         (rst),
    .clk         (tx_clk),
    .stretch     (tx_merged),
    .wr          (tx_wr),
    .out_req     (tx_req),
    .out_ack     (tx_ack),
    .out_stretch (tx_stretch),
    .rd          (1'b0),
    .in_req      (1'b0),
    .in_ack      (tx_unused_ack),
    .in_stretch  (tx_unused_stretch)
  );

  // ---------------- link ----------------
  if (FIFO_STAGES == 0) begin : g_direct
    assign rx_req    = tx_req;
    assign tx_ack    = rx_ack;
    assign link_data = tx_data;
  end else begin : g_fifo
    muller_fifo #(.W(DATA_W), .STAGES(FIFO_STAGES)) u_fifo (
      .rst     (rst),
      .req_in  (tx_req),
      .ack_out (tx_ack),
      .d_in    (tx_data),
      .req_out (rx_req),
      .ack_in  (rx_ack),
      .d_out   (link_data)
    );
  end

  // ---------------- receiver wrapper: one input port ----------------
  logic rx_unused_req, rx_unused_stretch, rx_merged;

  async_wrapper #(.N_OUT(0), .N_IN(1), .N_INV(RX_N_INV), .T_INV_PS(RX_T_INV_PS)) u_rx (
    .rst         (rst),
    .clk         (rx_clk),
    .stretch     (rx_merged),
    .wr          (1'b0),
    .out_req     (rx_unused_req),
    .out_ack     (1'b0),
    .out_stretch (rx_unused_stretch),
    .rd          (rx_rd),
    .in_req      (rx_req),
    .in_ack      (rx_ack),
    .in_stretch  (rx_stretch)
  );

  ack_latch #(.W(DATA_W)) u_latch (
    .rst (rst),
    .en  (rx_ack),
    .d   (link_data),
    .q   (rx_data)
  );

endmodule
