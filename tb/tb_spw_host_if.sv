// tb_spw_host_if: host data interface between host streams and FIFOs.
// The FIFO sides are modelled here with queues: the transmit FIFO accepts
// writes unless the test marks it full, the receive FIFO is filled with
// random words. Random valid/ready patterns on the host side check order,
// loss-free transfer, that rx data holds while not read, and that both
// directions reach one word per cycle when nothing stalls.
`timescale 1ns/1ps
module tb_spw_host_if;
  import spw_pkg::*;
  logic clk = 0, rst = 1;
  logic host_tx_valid = 0, host_tx_ready, host_rx_valid, host_rx_ready = 0;
  nchar_t host_tx_data = '0, host_rx_data, txf_wr_data, rxf_rd_data;
  logic txf_wr_en, txf_full = 0, rxf_rd_en, rxf_empty = 1;
  int checks = 0, failures = 0;
  nchar_t txf[$], rxf[$], tx_exp[$], rx_exp[$];
  bit tx_taken = 0;
  int n_tx = 0, n_rx = 0, burst_tx = 0, burst_rx = 0, best_tx = 0, best_rx = 0;
  always #2.5 clk = ~clk;

  spw_host_if dut (.*);

  // FIFO outputs are refreshed at each falling edge, after the queue changed
  always @(negedge clk) begin
    #0.1;
    rxf_empty   = (rxf.size() == 0);
    rxf_rd_data = rxf_empty ? '0 : rxf[0];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (txf_wr_en) begin
      checks++;
      if (txf_full) begin failures++; $display("FAIL write to full tx FIFO"); end
      if (tx_exp.size() == 0 || txf_wr_data != tx_exp[0]) begin
        failures++; $display("FAIL tx FIFO got %h", txf_wr_data);
      end else void'(tx_exp.pop_front());
      n_tx++;
      burst_tx++;
      if (burst_tx > best_tx) best_tx = burst_tx;
    end else burst_tx = 0;
    tx_taken = host_tx_valid && host_tx_ready;
    if (tx_taken) tx_exp.push_back(host_tx_data);
    if (rxf_rd_en) begin
      checks++;
      if (rxf_empty) begin failures++; $display("FAIL read from empty rx FIFO"); end
      else begin rx_exp.push_back(rxf[0]); void'(rxf.pop_front()); end
    end
    if (host_rx_valid && host_rx_ready) begin
      checks++;
      if (rx_exp.size() == 0 || host_rx_data != rx_exp[0]) begin
        failures++; $display("FAIL host got %h", host_rx_data);
      end else void'(rx_exp.pop_front());
      n_rx++;
      burst_rx++;
      if (burst_rx > best_rx) best_rx = burst_rx;
    end else burst_rx = 0;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 6000; i++) begin
      automatic bit free_run = (i >= 5000);     // last part: nothing stalls
      @(negedge clk);
      if (!host_tx_valid || tx_taken) begin
        host_tx_valid = free_run || ($urandom_range(0, 3) != 0);
        host_tx_data  = nchar_t'(9'($urandom));
      end
      txf_full      = !free_run && ($urandom_range(0, 4) == 0);
      host_rx_ready = free_run || ($urandom_range(0, 2) != 0);
      if (rxf.size() < 4 && (free_run || $urandom_range(0, 1))) rxf.push_back(nchar_t'(9'($urandom)));
    end
    host_tx_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (tx_exp.size() != 0 || best_tx < 100 || best_rx < 100) begin
      failures++;
      $display("FAIL left %0d, longest bursts tx %0d rx %0d", tx_exp.size(), best_tx, best_rx);
    end
    $display("transferred tx=%0d rx=%0d", n_tx, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
