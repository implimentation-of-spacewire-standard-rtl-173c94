// spw_codec: SpaceWire codec, top level.
//
// A SpaceWire link interface with its host-side buffering: the host writes
// N-Chars (data bytes and end-of-packet markers) into a transmit FIFO and
// reads received ones from a receive FIFO through the host data interface;
// the time distribution interface keeps the time-code counter. The receive
// FIFO is the receiver buffer whose free space decides when the link sends
// FCTs, so the far end can never overrun it.
//
// One clock, Sys_clk (`clk`), runs everything; INIT_DIV must be Sys_clk /
// 10 MHz (default 20, for 200 MHz). `tx_speed` picks one of eight Run-state
// bit rates (see spw_tx_clock); TX_DDR = 1 selects the double-data-rate
// transmit output, which doubles them. Reset is synchronous and active high.
module spw_codec
  import spw_pkg::*;
#(
  parameter int unsigned INIT_DIV = 20,
  parameter int unsigned SPEED_DIV [8] = '{20, 16, 10, 8, 5, 4, 2, 1},
  parameter int unsigned FIFO_DEPTH = 64,
  parameter bit          TX_DDR = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  // link control and status
  input  logic        link_start,
  input  logic        link_disable,
  input  logic        autostart,
  input  logic [2:0]  tx_speed,
  output link_state_t link_state,
  output logic        rx_error,
  output logic        credit_err,
  // host transmit stream
  input  logic        host_tx_valid,
  input  nchar_t      host_tx_data,
  output logic        host_tx_ready,
  // host receive stream
  output logic        host_rx_valid,
  output nchar_t      host_rx_data,
  input  logic        host_rx_ready,
  // time-codes
  input  logic        host_tick,
  input  logic [1:0]  host_flags,
  output logic        host_tick_out,
  output logic [5:0]  host_time,
  output logic [1:0]  host_flags_out,
  output logic        time_err,
  // SpaceWire line
  input  logic        din,
  input  logic        sin,
  output logic        dout,
  output logic        sout,
  output logic        rx_clock
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  nchar_t txf_wr_data, txf_rd_data, rxf_wr_data, rxf_rd_data;
  logic   txf_wr_en, txf_rd_en, txf_empty, txf_full;
  logic   rxf_wr_en, rxf_rd_en, rxf_empty, rxf_full;
  logic [AW:0] rxf_free, txf_count, txf_free, rxf_count;
  logic   tx_ready;
  logic   l_tick_in, l_tick_out;
  logic [5:0] l_time_in, l_time_out;
  logic [1:0] l_flags_in, l_flags_out;

  spw_host_if u_host (
    .clk, .rst,
    .host_tx_valid, .host_tx_data, .host_tx_ready,
    .host_rx_valid, .host_rx_data, .host_rx_ready,
    .txf_wr_en, .txf_wr_data, .txf_full,
    .rxf_rd_en, .rxf_rd_data, .rxf_empty
  );

  spw_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_txfifo (
    .clk, .rst, .wr_en(txf_wr_en), .wr_data(txf_wr_data), .rd_en(txf_rd_en),
    .rd_data(txf_rd_data), .empty(txf_empty), .full(txf_full),
    .count(txf_count), .free(txf_free)
  );

  spw_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_rxfifo (
    .clk, .rst, .wr_en(rxf_wr_en), .wr_data(rxf_wr_data), .rd_en(rxf_rd_en),
    .rd_data(rxf_rd_data), .empty(rxf_empty), .full(rxf_full),
    .count(rxf_count), .free(rxf_free)
  );

  assign txf_rd_en = tx_ready && !txf_empty;

  spw_time_if u_time (
    .clk, .rst, .host_tick, .host_flags, .host_tick_out, .host_time, .host_flags_out, .time_err,
    .link_tick_in(l_tick_in), .link_time_in(l_time_in), .link_flags_in(l_flags_in),
    .link_tick_out(l_tick_out), .link_time_out(l_time_out), .link_flags_out(l_flags_out)
  );

  spw_link #(.INIT_DIV(INIT_DIV), .SPEED_DIV(SPEED_DIV), .FREE_W(AW+1), .TX_DDR(TX_DDR)) u_link (
    .clk, .rst, .link_start, .link_disable, .autostart, .tx_speed, .link_state,
    .tx_write(!txf_empty), .tx_data(txf_rd_data), .tx_ready,
    .tick_in(l_tick_in), .time_in(l_time_in), .ctrl_flags_in(l_flags_in),
    .tick_out(l_tick_out), .time_out(l_time_out), .ctrl_flags_out(l_flags_out),
    .buffer_ready(!rxf_full), .rx_buf_free(rxf_free), .buffer_write(rxf_wr_en), .rx_data(rxf_wr_data),
    .rx_error, .credit_err,
    .din, .sin, .dout, .sout, .rx_clock
  );

endmodule
