// spw_state_machine: SpaceWire link initialisation and error recovery.
//
// Six states, with the transitions of the standard's exchange-level state
// diagram:
//   ErrorReset  -> ErrorWait   after 6.4 us
//   ErrorWait   -> Ready       after 12.8 us
//   Ready       -> Started     when the link is enabled
//   Started     -> Connecting  on gotNULL
//   Connecting  -> Run         on gotFCT
// and back to ErrorReset on RxErr, on an unexpected character (gotFCT,
// gotN-Char or gotTime-Code before it is allowed), after 12.8 us in Started
// or Connecting, and in Run on RxErr, CreditError or when the link is
// disabled. Reset enters ErrorReset.
//
// "Link enabled" is link_start, or autostart once a NULL has been received,
// and link_disable low; this follows the standard, the document only names
// the three inputs. Outputs are decoded from the state: enable_tx is high
// in Started, Connecting and Run, enable_rx in every state but ErrorReset.
// `timer_restart` is high in the cycle before each state change, so the
// timer clears on the same edge and its timeouts count from state entry.
module spw_state_machine
  import spw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        link_start,
  input  logic        link_disable,
  input  logic        autostart,
  input  logic        after_6_4,
  input  logic        after_12_8,
  input  logic        got_null,
  input  logic        got_fct,
  input  logic        got_nchar,
  input  logic        got_timecode,
  input  logic        rx_err,
  input  logic        credit_error,
  output link_state_t state,
  output link_ctrl_t  ctrl,
  output logic        timer_restart
);

  link_state_t nxt;
  logic        null_seen;   // a NULL arrived since the receiver was enabled
  logic        link_enabled;

  assign link_enabled = !link_disable && (link_start || (autostart && (null_seen || got_null)));

  always_comb begin
    nxt = state;
    unique case (state)
      ST_ERROR_RESET: if (after_6_4) nxt = ST_ERROR_WAIT;
      ST_ERROR_WAIT:
        if (rx_err || got_fct || got_nchar || got_timecode) nxt = ST_ERROR_RESET;
        else if (after_12_8)                                nxt = ST_READY;
      ST_READY:
        if (rx_err || got_fct || got_nchar || got_timecode) nxt = ST_ERROR_RESET;
        else if (link_enabled)                              nxt = ST_STARTED;
      ST_STARTED:
        if (rx_err || got_fct || got_nchar || got_timecode || after_12_8) nxt = ST_ERROR_RESET;
        else if (got_null)                                                nxt = ST_CONNECTING;
      ST_CONNECTING:
        if (rx_err || got_nchar || got_timecode || after_12_8) nxt = ST_ERROR_RESET;
        else if (got_fct)                                      nxt = ST_RUN;
      ST_RUN:
        if (rx_err || credit_error || link_disable) nxt = ST_ERROR_RESET;
      default: nxt = ST_ERROR_RESET;
    endcase
  end

  // restart the timer on the same clock edge that changes the state
  assign timer_restart = (nxt != state);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= ST_ERROR_RESET;
      null_seen     <= 1'b0;
    end else begin
      state         <= nxt;
      if (state == ST_ERROR_RESET) null_seen <= 1'b0;
      else if (got_null)           null_seen <= 1'b1;
    end
  end

  always_comb begin
    ctrl                = '0;
    ctrl.enable_rx      = (state != ST_ERROR_RESET);
    ctrl.enable_tx      = (state == ST_STARTED) || (state == ST_CONNECTING) || (state == ST_RUN);
    ctrl.send_nulls     = ctrl.enable_tx;
    ctrl.send_fcts      = (state == ST_CONNECTING) || (state == ST_RUN);
    ctrl.send_nchars    = (state == ST_RUN);
    ctrl.send_timecodes = (state == ST_RUN);
  end

endmodule
