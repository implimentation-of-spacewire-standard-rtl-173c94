// spw_link: SpaceWire link interface.
//
// Wires together the blocks of the link: TX clock generator, transmitter,
// RX clock recovery, receiver, timer and link state machine. The state
// machine enables and disables transmitter and receiver and chooses what
// the transmitter may send; the receiver reports what it got
// (gotNULL, gotFCT, gotN-Char, gotTime-Code, RxErr, CreditError) back to it.
// Received FCTs go straight to the transmitter as credit.
//
// FCT requests: the link asks the transmitter for an FCT while the receive
// buffer (`rx_buf_free` free places) can hold 8 more N-Chars on top of the
// credit already given, and that credit stays within 56. A credit error is
// reported by the receiver (N-Char without credit) or by the transmitter
// (received credit above 56).
//
// TX_DDR selects the double-data-rate transmit option: the line then leaves
// through a DDR output cell (spw_ddr_out, a model of the device's own
// primitive) that sends one value per half clock, and the bit clock counts
// half-clock periods, doubling every Run rate.
//
// Everything runs on Sys_clk; INIT_DIV is the clock division from Sys_clk
// to the 10 MHz initialisation clock, SPEED_DIV the eight Run-state bit-rate
// dividers selected by `tx_speed`.
module spw_link
  import spw_pkg::*;
#(
  parameter int unsigned INIT_DIV = 20,
  parameter int unsigned SPEED_DIV [8] = '{20, 16, 10, 8, 5, 4, 2, 1},
  parameter int unsigned FREE_W = 7,
  parameter bit          TX_DDR = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  // control
  input  logic              link_start,
  input  logic              link_disable,
  input  logic              autostart,
  input  logic [2:0]        tx_speed,
  output link_state_t       link_state,
  // transmit N-Chars
  input  logic              tx_write,
  input  nchar_t            tx_data,
  output logic              tx_ready,
  // time-codes
  input  logic              tick_in,
  input  logic [5:0]        time_in,
  input  logic [1:0]        ctrl_flags_in,
  output logic              tick_out,
  output logic [5:0]        time_out,
  output logic [1:0]        ctrl_flags_out,
  // receive buffer
  input  logic              buffer_ready,
  input  logic [FREE_W-1:0] rx_buf_free,
  output logic              buffer_write,
  output nchar_t            rx_data,
  // status pulses
  output logic              rx_error,
  output logic              credit_err,
  // line
  input  logic              din,
  input  logic              sin,
  output logic              dout,
  output logic              sout,
  output logic              rx_clock
);

  link_ctrl_t ctrl;
  logic bit_en, bit_en2, bit_valid, bit_data;
  logic after_6_4, after_12_8, disconnect, timer_restart;
  logic got_bit, got_null, got_fct, got_nchar, got_timecode, rx_err;
  logic rx_credit_err, tx_credit_err, fct_sent, fct_req;
  logic [5:0] rx_credit;

  // a buffer_write still on its way counts as taken space: the receiver has
  // already spent the credit for it, but rx_buf_free drops a clock later
  assign fct_req    = (32'(rx_buf_free) >= 32'(rx_credit) + FCT_CREDIT + 32'(buffer_write)) &&
                      (32'(rx_credit) + FCT_CREDIT <= MAX_CREDIT);
  assign rx_error   = rx_err;
  assign credit_err = rx_credit_err || tx_credit_err;

  spw_tx_clock #(.INIT_DIV(INIT_DIV), .SPEED_DIV(SPEED_DIV), .DDR(TX_DDR)) u_txclk (
    .clk, .rst, .run(link_state == ST_RUN), .speed(tx_speed), .bit_en, .bit_en2
  );

  logic tx_d, tx_s, tx_d2, tx_s2;

  spw_transmitter #(.DDR(TX_DDR)) u_tx (
    .clk, .rst,
    .enable_tx(ctrl.enable_tx), .send_nulls(ctrl.send_nulls), .send_fcts(ctrl.send_fcts),
    .send_nchars(ctrl.send_nchars), .send_timecodes(ctrl.send_timecodes),
    .bit_en, .bit_en2, .tx_write, .tx_data, .tx_ready,
    .tick_in, .time_in, .ctrl_flags_in,
    .got_fct, .fct_req, .fct_sent, .credit_error(tx_credit_err),
    .dout(tx_d), .sout(tx_s), .dout2(tx_d2), .sout2(tx_s2)
  );

  // Single data rate: the transmitter registers drive the line directly.
  // Double data rate: a DDR output cell per line drives one value per half
  // clock.
  if (TX_DDR) begin : g_ddr
    spw_ddr_out u_ddr_d (.clk, .d_rise(tx_d), .d_fall(tx_d2), .q(dout));
    spw_ddr_out u_ddr_s (.clk, .d_rise(tx_s), .d_fall(tx_s2), .q(sout));
  end else begin : g_sdr
    logic unused_pair;
    assign unused_pair = tx_d2 ^ tx_s2;
    assign dout = tx_d;
    assign sout = tx_s;
  end

  spw_rx_clock_recovery u_rxclk (
    .clk, .rst, .enable(ctrl.enable_rx), .din, .sin, .rx_clock, .bit_valid, .bit_data
  );

  spw_receiver u_rx (
    .clk, .rst, .enable_rx(ctrl.enable_rx), .bit_valid, .bit_data, .disconnect,
    .fct_sent, .buffer_ready,
    .got_bit, .got_null, .got_fct, .got_nchar, .got_timecode, .rx_err,
    .credit_error(rx_credit_err), .buffer_write, .rx_data,
    .tick_out, .time_out, .ctrl_flags_out, .rx_credit
  );

  spw_timer #(.INIT_DIV(INIT_DIV)) u_timer (
    .clk, .rst, .restart(timer_restart), .bit_seen(bit_valid),
    .disc_arm(ctrl.enable_rx && got_bit), .after_6_4, .after_12_8, .disconnect
  );

  spw_state_machine u_fsm (
    .clk, .rst, .link_start, .link_disable, .autostart, .after_6_4, .after_12_8,
    .got_null, .got_fct, .got_nchar, .got_timecode, .rx_err, .credit_error(credit_err),
    .state(link_state), .ctrl, .timer_restart
  );

endmodule
