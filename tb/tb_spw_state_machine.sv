// tb_spw_state_machine: walks the link state machine through every arc of
// the SpaceWire state diagram and checks the state and the enables it
// drives. The timer inputs are driven directly by the test.
`timescale 1ns/1ps
module tb_spw_state_machine;
  import spw_pkg::*;
  logic clk = 0, rst = 1;
  logic link_start = 0, link_disable = 0, autostart = 0, after_6_4 = 0, after_12_8 = 0;
  logic got_null = 0, got_fct = 0, got_nchar = 0, got_timecode = 0, rx_err = 0, credit_error = 0;
  link_state_t state;
  link_ctrl_t ctrl;
  logic timer_restart;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_state_machine dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (state %s)", msg, state.name()); end
  endtask

  task automatic pulse(input int which);
    case (which)
      0: got_null = 1; 1: got_fct = 1; 2: got_nchar = 1; 3: got_timecode = 1;
      4: rx_err = 1; 5: credit_error = 1; 6: after_6_4 = 1; 7: after_12_8 = 1;
      default: ;
    endcase
    @(negedge clk);
    {got_null, got_fct, got_nchar, got_timecode, rx_err, credit_error, after_6_4, after_12_8} = '0;
  endtask

  // expected enables per state, from the diagram
  task automatic check_outputs();
    bit tx = (state == ST_STARTED || state == ST_CONNECTING || state == ST_RUN);
    check(ctrl.enable_rx == (state != ST_ERROR_RESET), "enable_rx");
    check(ctrl.enable_tx == tx && ctrl.send_nulls == tx, "enable_tx/send_nulls");
    check(ctrl.send_fcts == (state == ST_CONNECTING || state == ST_RUN), "send_fcts");
    check(ctrl.send_nchars == (state == ST_RUN) && ctrl.send_timecodes == (state == ST_RUN),
          "send_nchars/send_timecodes");
  endtask

  // bring the machine from reset to the given state
  task automatic go_to(input link_state_t s);
    rst = 1; @(negedge clk); rst = 0;
    check(state == ST_ERROR_RESET, "reset enters ErrorReset");
    check_outputs();
    if (s == ST_ERROR_RESET) return;
    pulse(6);
    check(state == ST_ERROR_WAIT, "ErrorReset -> ErrorWait after 6.4 us");
    check_outputs();
    if (s == ST_ERROR_WAIT) return;
    pulse(7);
    check(state == ST_READY, "ErrorWait -> Ready after 12.8 us");
    check_outputs();
    if (s == ST_READY) return;
    link_start = 1; @(negedge clk); link_start = 0;
    check(state == ST_STARTED, "Ready -> Started on link enabled");
    check_outputs();
    if (s == ST_STARTED) return;
    pulse(0);
    check(state == ST_CONNECTING, "Started -> Connecting on gotNULL");
    check_outputs();
    if (s == ST_CONNECTING) return;
    pulse(1);
    check(state == ST_RUN, "Connecting -> Run on gotFCT");
    check_outputs();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    go_to(ST_RUN);
    repeat (20) @(negedge clk);
    check(state == ST_RUN, "Run holds");
    // ErrorReset waits for the timer only
    go_to(ST_ERROR_RESET);
    for (int e = 0; e <= 5; e++) begin pulse(e); check(state == ST_ERROR_RESET, "ErrorReset ignores events"); end
    // ErrorWait / Ready / Started / Connecting: each error event resets.
    for (int e = 0; e <= 4; e++) begin
      go_to(ST_ERROR_WAIT); pulse(e);
      check(state == (e == 0 ? ST_ERROR_WAIT : ST_ERROR_RESET), $sformatf("ErrorWait event %0d", e));
      go_to(ST_READY); pulse(e);
      check(state == (e == 0 ? ST_READY : ST_ERROR_RESET), $sformatf("Ready event %0d", e));
      if (e != 0) begin
        go_to(ST_STARTED); pulse(e);
        check(state == ST_ERROR_RESET, $sformatf("Started event %0d", e));
      end
      if (e >= 2) begin
        go_to(ST_CONNECTING); pulse(e);
        check(state == ST_ERROR_RESET, $sformatf("Connecting event %0d", e));
      end
    end
    go_to(ST_STARTED); pulse(7);
    check(state == ST_ERROR_RESET, "Started times out after 12.8 us");
    go_to(ST_CONNECTING); pulse(7);
    check(state == ST_ERROR_RESET, "Connecting times out after 12.8 us");
    // Run: rx error, credit error, link disable reset it; other events do not
    go_to(ST_RUN); pulse(0); pulse(1); pulse(2); pulse(3); pulse(7);
    check(state == ST_RUN, "Run ignores characters and timeouts");
    pulse(4); check(state == ST_ERROR_RESET, "Run -> ErrorReset on RxErr");
    go_to(ST_RUN); pulse(5); check(state == ST_ERROR_RESET, "Run -> ErrorReset on CreditError");
    go_to(ST_RUN); link_disable = 1; @(negedge clk); link_disable = 0;
    check(state == ST_ERROR_RESET, "Run -> ErrorReset on link disable");
    // Ready waits for link enable; autostart needs a NULL
    go_to(ST_READY);
    autostart = 1; repeat (5) @(negedge clk);
    check(state == ST_READY, "autostart alone does not start");
    pulse(0);
    check(state == ST_STARTED, "autostart + gotNULL starts");
    autostart = 0;
    go_to(ST_READY);
    link_start = 1; link_disable = 1; repeat (5) @(negedge clk);
    check(state == ST_READY, "link disable blocks link start");
    link_start = 0; link_disable = 0;
    // timer restart on state change
    go_to(ST_ERROR_RESET);
    after_6_4 = 1; #1;
    check(timer_restart, "timer restart before a state change");
    @(negedge clk); after_6_4 = 0; #1;
    check(!timer_restart, "no timer restart while the state holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
