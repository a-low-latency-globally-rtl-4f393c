// async_wrapper: the asynchronous wrapper around one locally synchronous (LS)
// module: its stretchable clock generator plus its port controllers.
//
// An LS module may have several ports: N_OUT output ports (each an
// output_port_controller driven by a WR enable) and N_IN input ports (each an
// input_port_controller driven by an RD enable). Every controller produces a
// stretch request; the clock generator receives their OR, so the LS clock
// stops while any port of the module is waiting for a handshake and runs
// again once every port has been served. A count of 0 removes that kind of
// port (the bundled array keeps one unused element so the ports stay legal).
//
// Following the document: one clock generator per LS module, fed with the
// stretch signals of its input and output port controllers. This design's own
// choices: the OR that merges the stretch requests, the port counts as
// parameters and the reset.
//
// Interface: rst; clk to the LS module; per output port wr (in), out_req
// (out), out_ack (in), out_stretch (out); per input port rd (in), in_req (in),
// in_ack (out), in_stretch (out); stretch is the merged request.
// Timing: a port's stretch reaches the clock generator through the OR gate
// (modelled with zero delay), so it must still arrive before the next rising
// edge of clk to stop the clock in the same cycle.
`timescale 1ps / 1ps
module async_wrapper #(
  parameter int unsigned N_OUT    = 1,
  parameter int unsigned N_IN     = 1,
  parameter int unsigned N_INV    = gals_pkg::CLK_N_INV,
  parameter int unsigned T_INV_PS = gals_pkg::T_INV_PS,
  localparam int unsigned NO = (N_OUT > 0) ? N_OUT : 1,
  localparam int unsigned NI = (N_IN  > 0) ? N_IN  : 1
) (
  input  logic          rst,
  output logic          clk,
  output logic          stretch,
  // output ports
  input  logic [NO-1:0] wr,
  output logic [NO-1:0] out_req,
  input  logic [NO-1:0] out_ack,
  output logic [NO-1:0] out_stretch,
  // input ports
  input  logic [NI-1:0] rd,
  input  logic [NI-1:0] in_req,
  output logic [NI-1:0] in_ack,
  output logic [NI-1:0] in_stretch
);

  for (genvar i = 0; i < NO; i++) begin : g_out
    if (i < int'(N_OUT)) begin : g_port
      output_port_controller u_ctrl (
        .rst     (rst),
        .wr      (wr[i]),
        .ack     (out_ack[i]),
        .stretch (out_stretch[i]),
        .req     (out_req[i])
      );
    end else begin : g_none
      assign out_stretch[i] = 1'b0;
      assign out_req[i]     = 1'b0;
    end
  end

  for (genvar i = 0; i < NI; i++) begin : g_in
    if (i < int'(N_IN)) begin : g_port
      input_port_controller u_ctrl (
        .rst     (rst),
        .rd      (rd[i]),
        .req     (in_req[i]),
        .stretch (in_stretch[i]),
        .ack     (in_ack[i])
      );
    end else begin : g_none
      assign in_stretch[i] = 1'b0;
      assign in_ack[i]     = 1'b0;
    end
  end

  assign stretch = (|out_stretch) | (|in_stretch);

  stretch_clock_gen #(.N_INV(N_INV), .T_INV_PS(T_INV_PS)) u_clk (
    .rst     (rst),
    .stretch (stretch),
    .clk     (clk)
  );

endmodule
