// tb_gals_top_full: the link with every parameter at its default (8-bit
// words, 2-stage FIFO, both clocks at 555 MHz). A sender LS module offers
// the 8-bit products k * 13 every two clock cycles; a receiver LS module
// takes a word every two of its cycles and adds it to a running sum, as in
// the multiplier/adder experiment. The sum after every word is compared with
// the value computed from k alone.
`timescale 1ps / 1ps
module tb_gals_top_full;
  import gals_pkg::*;
  localparam int WORDS = 40;

  logic              rst, tx_clk, rx_clk, tx_wr, rx_rd, tx_stretch, rx_stretch;
  logic              tx_req, tx_ack, rx_req, rx_ack;
  logic [DATA_W-1:0] tx_data, rx_data;
  int checks = 0, failures = 0;

  gals_top dut (.*);

  int tx_k;
  always @(posedge tx_clk or posedge rst) begin
    if (rst) begin
      tx_wr <= 1'b0; tx_data <= '0; tx_k <= 0;
    end else if (!tx_wr) begin
      if (tx_k < WORDS) begin
        tx_wr   <= 1'b1;
        tx_data <= DATA_W'(tx_k * 13);
      end
    end else begin
      tx_wr <= 1'b0;
      tx_k  <= tx_k + 1;
    end
  end

  int rx_k;
  logic [DATA_W-1:0] sum, expect_sum;
  always @(posedge rx_clk or posedge rst) begin
    if (rst) begin
      rx_rd <= 1'b0; rx_k <= 0; sum <= '0;
    end else if (!rx_rd) begin
      if (rx_k < WORDS) rx_rd <= 1'b1;
    end else begin
      rx_rd <= 1'b0;
      rx_k  <= rx_k + 1;
      expect_sum = '0;
      for (int i = 0; i <= rx_k; i++) expect_sum = expect_sum + DATA_W'(i * 13);
      sum <= sum + rx_data;
      checks++;
      if (DATA_W'(sum + rx_data) != expect_sum) begin
        failures++;
        $display("FAIL word %0d: sum %0d expected %0d", rx_k, DATA_W'(sum + rx_data), expect_sum);
      end
    end
  end

  initial begin
    rst = 1'b0;
    #100 rst = 1'b1;
    #5000 rst = 1'b0;
    wait (rx_k == WORDS);
    #10000;
    checks++;
    if (tx_k != WORDS) begin failures++; $display("FAIL sender sent %0d words", tx_k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
