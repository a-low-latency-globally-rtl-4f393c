// tb_link_env: one GALS link (gals_top) with two locally synchronous test
// modules around it, a scoreboard and event counters.
//
// Sender LS module (on tx_clk): on one rising edge it raises WR together with
// a new word, on the next it drops WR; so it offers a word every two of its
// clock cycles. Receiver LS module (on rx_clk): likewise raises RD on one
// edge and takes rx_data on the next. A clock edge that sees WR (RD) already
// high is the first edge after the clock was released, so it marks the end
// of a transfer.
//
// MODE 0: the sender sends a counter 0, 1, 2, ...; the receiver stores it.
// MODE 1: the sender is a multiplier (word k = low byte of k * MUL_K) and the
//         receiver an adder (running 8-bit sum of the words it gets).
// MODE 2: the two functions exchanged: the sender sends the running sum
//         0+1+..+k, the receiver multiplies each word by MUL_K.
// The expected receiver results are computed here from k alone, not from the
// link's signals. The environment also checks the four-phase order on both
// sides of the link and counts the mechanisms a run went through.
`timescale 1ps / 1ps
module tb_link_env #(
  parameter int unsigned FIFO_STAGES = 0,
  parameter int unsigned TX_N_INV    = 15,
  parameter int unsigned TX_T_INV_PS = 50,
  parameter int unsigned RX_N_INV    = 15,
  parameter int unsigned RX_T_INV_PS = 50,
  parameter int unsigned MODE        = 0,
  parameter int unsigned WORDS       = 100,
  // extra receiver cycles between words, to make the sender wait
  parameter int unsigned RX_IDLE     = 0
) (
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_tx_wait,     // sender clock stopped while receiver not reading
  output int   n_rx_wait,     // receiver clock stopped while no word offered
  output int   n_fifo_early,  // sender acknowledged while receiver not reading
  output int   n_fifo_full,   // sender waiting with the FIFO holding STAGES/2 words
  output int   n_parallel,    // both stretches released by the same ACK
  output int   proto_fail     // four-phase order violations
);
  localparam int unsigned W     = 8;
  localparam logic [7:0]  MUL_K = 8'd13;

  logic         tx_clk, rx_clk, tx_wr, rx_rd, tx_stretch, rx_stretch;
  logic         tx_req, tx_ack, rx_req, rx_ack;
  logic [W-1:0] tx_data, rx_data;

  gals_top #(
    .DATA_W(W), .FIFO_STAGES(FIFO_STAGES),
    .TX_N_INV(TX_N_INV), .TX_T_INV_PS(TX_T_INV_PS),
    .RX_N_INV(RX_N_INV), .RX_T_INV_PS(RX_T_INV_PS)
  ) dut (.*);

  function automatic logic [7:0] sender_word(int k);
    logic [7:0] sum;
    case (MODE)
      1: return 8'(k * MUL_K);
      2: begin
        sum = '0;
        for (int i = 0; i <= k; i++) sum = sum + 8'(i);
        return sum;
      end
      default: return 8'(k);
    endcase
  endfunction

  // ---------------- sender LS module ----------------
  int tx_k;
  always @(posedge tx_clk or posedge rst) begin
    if (rst) begin
      tx_wr   <= 1'b0;
      tx_data <= '0;
      tx_k    <= 0;
    end else if (!tx_wr) begin
      if (tx_k < int'(WORDS)) begin
        tx_wr   <= 1'b1;
        tx_data <= sender_word(tx_k);
      end
    end else begin
      tx_wr <= 1'b0;
      tx_k  <= tx_k + 1;
    end
  end

  // ---------------- receiver LS module ----------------
  int         rx_k, idle;
  logic [7:0] acc, expect_acc, result;
  always @(posedge rx_clk or posedge rst) begin
    if (rst) begin
      rx_rd    <= 1'b0;
      rx_k     <= 0;
      idle     <= 0;
      acc      <= '0;
      checks   <= 0;
      failures <= 0;
      done     <= 1'b0;
    end else if (!rx_rd) begin
      if (idle > 0)
        idle <= idle - 1;
      else if (rx_k < int'(WORDS))
        rx_rd <= 1'b1;
    end else begin
      rx_rd  <= 1'b0;
      idle   <= int'(RX_IDLE);
      rx_k   <= rx_k + 1;
      checks <= checks + 1;
      case (MODE)
        1: begin
          result = acc + rx_data;
          expect_acc = '0;
          for (int i = 0; i <= rx_k; i++) expect_acc = expect_acc + 8'(i * MUL_K);
          acc <= result;
          if (result != expect_acc) begin
            failures <= failures + 1;
            $display("FAIL env mode1 fifo=%0d word %0d: sum %0d expected %0d",
                     FIFO_STAGES, rx_k, result, expect_acc);
          end
        end
        2: begin
          result = 8'(rx_data * MUL_K);
          expect_acc = '0;
          for (int i = 0; i <= rx_k; i++) expect_acc = expect_acc + 8'(i);
          expect_acc = 8'(expect_acc * MUL_K);
          if (result != expect_acc) begin
            failures <= failures + 1;
            $display("FAIL env mode2 fifo=%0d word %0d: product %0d expected %0d",
                     FIFO_STAGES, rx_k, result, expect_acc);
          end
        end
        default: begin
          if (rx_data != 8'(rx_k)) begin
            failures <= failures + 1;
            $display("FAIL %m mode0 fifo=%0d word %0d: got %0d expected %0d",
                     FIFO_STAGES, rx_k, rx_data, 8'(rx_k));
          end
        end
      endcase
      if (rx_k + 1 == int'(WORDS)) done <= 1'b1;
    end
  end

  // ---------------- protocol checks and event counters ----------------
  int words_in_fifo;
  initial begin
    proto_fail   = 0; n_tx_wait = 0; n_rx_wait = 0;
    n_fifo_early = 0; n_fifo_full = 0; n_parallel = 0; words_in_fifo = 0;
  end

  // four-phase order: a request falls only after it was acknowledged, and
  // rises only while the acknowledge is low
  always @(negedge tx_req) if (!rst && !tx_ack) proto_fail++;
  always @(posedge tx_req) if (!rst && tx_ack)  proto_fail++;
  always @(posedge rx_req) if (!rst && rx_ack)  proto_fail++;
  // a stretched clock must not rise: one clock edge per transfer, no more
  always @(posedge tx_clk) if (!rst && tx_stretch) proto_fail++;
  always @(posedge rx_clk) if (!rst && rx_stretch) proto_fail++;

  // sender waits: its clock is stopped for longer than a whole period of its
  // own while the receiver is not asking for a word
  realtime tx_stop_t;
  always @(posedge tx_stretch) tx_stop_t = $realtime;
  always @(negedge tx_stretch)
    if (!rst && ($realtime - tx_stop_t) > 2.0 * 2 * (TX_N_INV * TX_T_INV_PS + 150))
      n_tx_wait++;
  // receiver waits for the sender
  always @(posedge rx_stretch) if (!rst && !rx_req) n_rx_wait++;
  // the FIFO accepts a word with no reader, and fills up
  always @(posedge tx_ack) begin
    if (!rst && FIFO_STAGES > 0) begin
      words_in_fifo++;
      if (!rx_stretch) n_fifo_early++;
    end
  end
  always @(posedge rx_ack) if (FIFO_STAGES > 0) words_in_fifo--;
  always @(posedge tx_req)
    if (!rst && FIFO_STAGES > 0 && words_in_fifo >= int'(FIFO_STAGES / 2)) n_fifo_full++;
  // direct link: both stretches fall within one flip-flop delay of each other
  realtime s1_fall, s2_fall;
  always @(negedge tx_stretch) begin
    s1_fall = $realtime;
    if (FIFO_STAGES == 0 && !rst && (s1_fall - s2_fall) < 1.0) n_parallel++;
  end
  always @(negedge rx_stretch) begin
    s2_fall = $realtime;
    if (FIFO_STAGES == 0 && !rst && (s2_fall - s1_fall) < 1.0) n_parallel++;
  end

endmodule
