// spw_host_if: host data interface between the host application and the
// codec FIFOs.
//
// The host sees two valid/ready streams of 9-bit N-Chars (nchar_t): one
// into the transmit FIFO and one out of the receive FIFO. Each direction has
// one pipeline register, in keeping with the codec's pipelined build:
//   - transmit: a word accepted from the host is held in a register and
//     written into the transmit FIFO when that has room; the host may send
//     a new word in the same cycle the held one moves on.
//   - receive: a word is popped from the receive FIFO into an output
//     register whenever that register is empty or being read, so the host
//     gets a registered rx_data/rx_valid.
// The document says only that this block moves data between link and host
// and is written to suit different target devices; the stream protocol and
// the registers are this design's choice.
//
// Timing: one cycle of latency in each direction; full throughput (one word
// per cycle) when the FIFOs allow it.
module spw_host_if
  import spw_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // host transmit stream
  input  logic   host_tx_valid,
  input  nchar_t host_tx_data,
  output logic   host_tx_ready,
  // host receive stream
  output logic   host_rx_valid,
  output nchar_t host_rx_data,
  input  logic   host_rx_ready,
  // transmit FIFO write side
  output logic   txf_wr_en,
  output nchar_t txf_wr_data,
  input  logic   txf_full,
  // receive FIFO read side (show-ahead)
  output logic   rxf_rd_en,
  input  nchar_t rxf_rd_data,
  input  logic   rxf_empty
);

  logic   tx_hold_v;
  nchar_t tx_hold;

  assign txf_wr_en     = tx_hold_v && !txf_full;
  assign txf_wr_data   = tx_hold;
  assign host_tx_ready = !tx_hold_v || !txf_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_hold_v <= 1'b0;
      tx_hold   <= '0;
    end else if (host_tx_ready) begin
      tx_hold_v <= host_tx_valid;
      if (host_tx_valid) tx_hold <= host_tx_data;
    end
  end

  assign rxf_rd_en = !rxf_empty && (!host_rx_valid || host_rx_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      host_rx_valid <= 1'b0;
      host_rx_data  <= '0;
    end else if (!host_rx_valid || host_rx_ready) begin
      host_rx_valid <= !rxf_empty;
      if (!rxf_empty) host_rx_data <= rxf_rd_data;
    end
  end

  a_rx_stable: assert property (@(posedge clk) disable iff (rst)
    host_rx_valid && !host_rx_ready |=> host_rx_valid && $stable(host_rx_data));

endmodule
