// tb_gals_top: end-to-end test of the GALS link.
//
// Runs the link in the clock-rate combinations of the interface's functional
// verification (sender/receiver 555/133, 555/555, 133/555 MHz with a counter;
// 300/400 and 400/300 MHz with a multiplier feeding an adder and the reverse),
// each directly connected and through 2- and 4-stage Muller FIFOs, plus a
// slow-reader case that fills the FIFO. It also measures the handshake
// latency: with WR and RD raised at the same instant on a direct link, the
// later of the two stretch signals must fall 2*T_FF + 2*T_AND after them.
// Every mechanism (sender stall, receiver stall, early FIFO acknowledge, full
// FIFO, parallel release of both clocks) must be seen at least once. One
// more link runs both clocks at 646 MHz, close to the fastest ring clock.
`timescale 1ps / 1ps
module tb_gals_top;
  import gals_pkg::*;

  localparam int NE = 11;
  logic rst;
  logic [NE-1:0] done;
  int chk [NE], fl [NE], txw [NE], rxw [NE], fe [NE], ff [NE], par [NE], pf [NE];

  // clock settings: N_INV, T_INV for 555, 133, 300, 400 MHz
  // period = 2 * (N * T + T_C_PS)
  `define ENV(IDX, FIFO, TXN, TXT, RXN, RXT, MD, IDLE)                        \
    tb_link_env #(.FIFO_STAGES(FIFO), .TX_N_INV(TXN), .TX_T_INV_PS(TXT),      \
                  .RX_N_INV(RXN), .RX_T_INV_PS(RXT), .MODE(MD), .WORDS(64),  \
                  .RX_IDLE(IDLE))                                            \
      u_env``IDX (.rst(rst), .done(done[IDX]), .checks(chk[IDX]),            \
                  .failures(fl[IDX]), .n_tx_wait(txw[IDX]),                  \
                  .n_rx_wait(rxw[IDX]), .n_fifo_early(fe[IDX]),              \
                  .n_fifo_full(ff[IDX]), .n_parallel(par[IDX]),              \
                  .proto_fail(pf[IDX]));

  // Figure-3-8 style cases, direct link
  `ENV(0, 0, 15,  50, 15, 240, 0, 0)   // 555 / 133 MHz
  `ENV(1, 0, 15,  50, 15,  50, 0, 0)   // 555 / 555 MHz
  `ENV(2, 0, 15, 240, 15,  50, 0, 0)   // 133 / 555 MHz
  // multiplier -> adder and adder -> multiplier, direct link
  `ENV(3, 0, 15, 101, 11, 100, 1, 0)   // 300 / 400 MHz
  `ENV(4, 0, 11, 100, 15, 101, 2, 0)   // 400 / 300 MHz
  // the same through FIFOs
  `ENV(5, 2, 15,  50, 15, 240, 0, 0)
  `ENV(6, 4, 15, 240, 15,  50, 0, 0)
  `ENV(7, 4, 15, 101, 11, 100, 1, 0)
  `ENV(8, 2, 11, 100, 15, 101, 2, 0)
  // slow reader: the FIFO fills and the sender stalls
  `ENV(9, 4, 15,  50, 15,  50, 0, 6)
  // near the fastest ring clock: 2 * (13 * 48 + 150) ps = 1548 ps, 646 MHz
  `ENV(10, 0, 13, 48, 13,  48, 1, 0)
  `undef ENV

  // ---------------- latency measurement on a direct link ----------------
  logic       l_wr, l_rd, l_txclk, l_rxclk, l_s1, l_s2, l_treq, l_tack, l_rreq, l_rack;
  logic [7:0] l_txd, l_rxd;
  gals_top #(.DATA_W(8), .FIFO_STAGES(0)) u_lat (
    .rst(rst), .tx_clk(l_txclk), .tx_wr(l_wr), .tx_data(l_txd), .tx_stretch(l_s1),
    .rx_clk(l_rxclk), .rx_rd(l_rd), .rx_data(l_rxd), .rx_stretch(l_s2),
    .tx_req(l_treq), .tx_ack(l_tack), .rx_req(l_rreq), .rx_ack(l_rack));

  int checks = 0, failures = 0;
  realtime t0, t_s1, t_s2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst  = 1'b0;
    #100;
    rst  = 1'b1;
    l_wr = 1'b0; l_rd = 1'b0; l_txd = 8'h00;
    #5000;
    rst = 1'b0;
    // latency: WR and RD together
    #3000;
    l_txd = 8'hA5;
    #100;
    t0 = $realtime;
    l_wr = 1'b1; l_rd = 1'b1;
    @(posedge l_s1);
    @(negedge l_s1) t_s1 = $realtime;
    if (l_s2) @(negedge l_s2);
    t_s2 = $realtime;
    check(l_rxd == 8'hA5, "latency run: word not latched");
    check((t_s2 - t0) == real'(2 * T_FF_PS + 2 * T_AND_PS),
          $sformatf("latency %0t ps, expected %0d", t_s2 - t0, 2 * T_FF_PS + 2 * T_AND_PS));
    check(t_s1 == t_s2, "stretch1 and stretch2 not released together");
    $display("handshake latency (WR/RD+ to last stretch-): %0.0f ps", t_s2 - t0);
    l_wr = 1'b0; l_rd = 1'b0;

    wait (&done);
    #20000;
    for (int i = 0; i < NE; i++) begin
      checks   += chk[i];
      failures += fl[i] + pf[i];
      check(chk[i] == 64, $sformatf("env %0d received %0d words", i, chk[i]));
    end
    begin
      int s_txw = 0, s_rxw = 0, s_fe = 0, s_ff = 0, s_par = 0;
      for (int i = 0; i < NE; i++) begin
        s_txw += txw[i]; s_rxw += rxw[i]; s_fe += fe[i]; s_ff += ff[i]; s_par += par[i];
      end
      $display("events: sender stalls %0d, receiver stalls %0d, early FIFO acks %0d, FIFO full %0d, parallel releases %0d",
               s_txw, s_rxw, s_fe, s_ff, s_par);
      check(s_txw > 0, "no sender stall seen");
      check(s_rxw > 0, "no receiver stall seen");
      check(s_fe  > 0, "no early FIFO acknowledge seen");
      check(s_ff  > 0, "no full FIFO seen");
      check(s_par > 0, "no parallel stretch release seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog: done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
