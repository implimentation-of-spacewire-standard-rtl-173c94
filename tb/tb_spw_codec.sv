// tb_spw_codec: end-to-end test of two SpaceWire codecs joined back to back.
//
// Codec A starts its link with link_start, codec B with autostart, both at
// their default parameters (200 MHz system clock, 10 MHz initialisation
// rate). The test then
//   - checks the link reaches Run no earlier than 6.4 us + 12.8 us after
//     reset (ErrorReset and ErrorWait timeouts),
//   - sends packets both ways at several of the eight bit rates, switching
//     speed while the link runs,
//   - stops B's host from reading so that the receive FIFO fills, B stops
//     sending FCTs and A's host is held off by flow control, then resumes,
//   - sends time-codes from A and checks B follows the time counter,
//   - cuts the A->B line in the middle of a packet: B must detect the
//     disconnect, end the partial packet with an EEP, and both ends must
//     return to Run,
//   - flips one bit on the A->B line (parity error) and checks recovery,
//   - disables A's link and re-enables it.
// Every N-Char a host reads is compared with a scoreboard of what the other
// host sent. Each mechanism above is counted; one that never happened is a
// failure.
`timescale 1ns/1ps
module tb_spw_codec;
  import spw_pkg::*;

  localparam int unsigned INIT_DIV = 20;      // the codec's default
  localparam time TCLK = 5ns;                 // 200 MHz

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #(TCLK/2) clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // ---- two codecs and the line between them ----
  logic        a_start = 0, a_dis = 0, b_auto = 0, b_dis = 0;
  logic [2:0]  speed = 3'd0;
  link_state_t a_state, b_state;
  logic        a_rxerr, b_rxerr, a_crerr, b_crerr;
  logic        a_txv = 0, b_txv = 0, a_txr, b_txr;
  nchar_t      a_txd = '0, b_txd = '0, a_rxd, b_rxd;
  logic        a_rxv, b_rxv, a_rxr = 1, b_rxr = 1;
  logic        a_tick = 0;
  logic [1:0]  a_flags = 0;
  logic        a_tko, b_tko, a_terr, b_terr;
  logic [5:0]  a_time, b_time;
  logic [1:0]  a_fo, b_fo;
  logic        a_d, a_s, b_d, b_s, a_rxc, b_rxc;
  logic        ab_d, ab_s;            // line A->B as seen by B
  logic        cut = 0, frz_d = 0, frz_s = 0;
  logic        inj_arm = 0, inj = 0;
  logic        pd = 0, ps = 0;

  assign ab_d = cut ? frz_d : (a_d ^ inj);
  assign ab_s = cut ? frz_s : (a_s ^ inj);

  spw_codec a (
    .clk, .rst, .link_start(a_start), .link_disable(a_dis), .autostart(1'b0), .tx_speed(speed),
    .link_state(a_state), .rx_error(a_rxerr), .credit_err(a_crerr),
    .host_tx_valid(a_txv), .host_tx_data(a_txd), .host_tx_ready(a_txr),
    .host_rx_valid(a_rxv), .host_rx_data(a_rxd), .host_rx_ready(a_rxr),
    .host_tick(a_tick), .host_flags(a_flags), .host_tick_out(a_tko), .host_time(a_time),
    .host_flags_out(a_fo), .time_err(a_terr),
    .din(b_d), .sin(b_s), .dout(a_d), .sout(a_s), .rx_clock(a_rxc)
  );

  spw_codec b (
    .clk, .rst, .link_start(1'b0), .link_disable(b_dis), .autostart(b_auto), .tx_speed(speed),
    .link_state(b_state), .rx_error(b_rxerr), .credit_err(b_crerr),
    .host_tx_valid(b_txv), .host_tx_data(b_txd), .host_tx_ready(b_txr),
    .host_rx_valid(b_rxv), .host_rx_data(b_rxd), .host_rx_ready(b_rxr),
    .host_tick(1'b0), .host_flags(2'b00), .host_tick_out(b_tko), .host_time(b_time),
    .host_flags_out(b_fo), .time_err(b_terr),
    .din(ab_d), .sin(ab_s), .dout(b_d), .sout(b_s), .rx_clock(b_rxc)
  );

  // One-bit inversion of both A->B lines: starts one cycle after a bit
  // boundary and ends one cycle after the next, so exactly one bit flips.
  always_ff @(posedge clk) begin
    pd <= a_d;
    ps <= a_s;
    if ((a_d != pd) || (a_s != ps)) begin
      if (inj_arm && !inj) begin
        inj     <= 1'b1;
        inj_arm <= 1'b0;
      end else if (inj) begin
        inj <= 1'b0;
      end
    end
  end

  // ---- host traffic and scoreboards ----
  nchar_t txq_a[$], txq_b[$], exp_a[$], exp_b[$];

  always_ff @(posedge clk) begin
    if (a_txv && a_txr) begin
      exp_b.push_back(a_txd);
      void'(txq_a.pop_front());
    end
    if (b_txv && b_txr) begin
      exp_a.push_back(b_txd);
      void'(txq_b.pop_front());
    end
  end

  always_comb begin
    a_txv = (txq_a.size() != 0);
    a_txd = a_txv ? txq_a[0] : '0;
    b_txv = (txq_b.size() != 0);
    b_txd = b_txv ? txq_b[0] : '0;
  end

  int n_rx_a = 0, n_rx_b = 0, n_eep_b = 0;
  always_ff @(posedge clk) begin
    if (!rst && b_rxv && b_rxr) begin
      checks++;
      n_rx_b++;
      if (exp_b.size() == 0) begin
        failures++;
        $display("FAIL B got %h with nothing expected at cycle %0d", b_rxd, cyc);
      end else begin
        if (b_rxd != exp_b[0]) begin
          failures++;
          $display("FAIL B got %h expected %h at cycle %0d", b_rxd, exp_b[0], cyc);
        end
        if (b_rxd == '{ctrl: 1'b1, data: 8'h01}) n_eep_b++;
        void'(exp_b.pop_front());
      end
    end
    if (!rst && a_rxv && a_rxr) begin
      checks++;
      n_rx_a++;
      if (exp_a.size() == 0) begin
        failures++;
        $display("FAIL A got %h with nothing expected at cycle %0d", a_rxd, cyc);
      end else begin
        if (a_rxd != exp_a[0]) begin
          failures++;
          $display("FAIL A got %h expected %h at cycle %0d", a_rxd, exp_a[0], cyc);
        end
        void'(exp_a.pop_front());
      end
    end
  end

  // ---- mechanism counters ----
  int n_run = 0, n_stall = 0, n_tc = 0, n_speed = 0, n_disc = 0, n_par = 0, n_disable = 0;
  int n_crerr = 0;
  link_state_t a_prev = ST_ERROR_RESET;
  always_ff @(posedge clk) begin
    a_prev <= a_state;
    if (!rst && a_state == ST_RUN && a_prev != ST_RUN) n_run++;
    if (a_txv && !a_txr && a_state == ST_RUN) n_stall++;
    if (!rst && b_tko) n_tc++;
    if (!rst && (a_crerr || b_crerr)) begin
      n_crerr++;
      $display("credit error at cycle %0d", cyc);
    end
  end

  task automatic send_packet(input bit from_a, input int len, input bit with_end, input bit eep);
    for (int i = 0; i < len; i++) begin
      nchar_t c = '{ctrl: 1'b0, data: 8'($urandom)};
      if (from_a) txq_a.push_back(c); else txq_b.push_back(c);
    end
    if (with_end) begin
      nchar_t e = '{ctrl: 1'b1, data: {7'b0, eep}};
      if (from_a) txq_a.push_back(e); else txq_b.push_back(e);
    end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_run(input string what);
    int t = 0;
    while (!(a_state == ST_RUN && b_state == ST_RUN) && t < 200000) begin
      @(negedge clk);
      t++;
    end
    checks++;
    if (t >= 200000) begin
      failures++;
      $display("FAIL link did not reach Run (%s): A=%s B=%s", what, a_state.name(), b_state.name());
    end
  endtask

  // wait until both ends have left Run (each one drops its link on an error)
  task automatic wait_down(input string what);
    bit a_dn = 0, b_dn = 0;
    int t = 0;
    while (!(a_dn && b_dn) && t < 20000) begin
      @(negedge clk);
      if (a_state != ST_RUN) a_dn = 1;
      if (b_state != ST_RUN) b_dn = 1;
      t++;
    end
    checks++;
    if (t >= 20000) begin
      failures++;
      $display("FAIL link did not go down (%s)", what);
    end
  endtask

  task automatic wait_drain(input string what);
    int t = 0;
    while ((txq_a.size() + txq_b.size() + exp_a.size() + exp_b.size()) != 0 && t < 400000) begin
      @(negedge clk);
      t++;
    end
    checks++;
    if (t >= 400000) begin
      failures++;
      $display("FAIL traffic did not drain (%s): txA=%0d txB=%0d expA=%0d expB=%0d",
               what, txq_a.size(), txq_b.size(), exp_a.size(), exp_b.size());
    end
    wait_cycles(50);
  endtask

  task automatic traffic(input string what);
    for (int p = 0; p < 3; p++) begin
      send_packet(1, 1 + int'($urandom_range(0, 24)), 1, p == 2);
      send_packet(0, 1 + int'($urandom_range(0, 16)), 1, 0);
    end
    wait_drain(what);
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned t0;
  logic [2:0] speeds [5] = '{3'd7, 3'd3, 3'd6, 3'd1, 3'd5};
  initial begin
    wait_cycles(10);
    rst = 1'b0;
    t0 = cyc;
    a_start = 1'b1;
    b_auto  = 1'b1;

    // 1. link start-up, timing from the 6.4 us and 12.8 us timeouts
    wait_run("start-up");
    checks++;
    if (cyc - t0 < longint'((64 + 128) * INIT_DIV)) begin
      failures++;
      $display("FAIL link up after %0d cycles, earlier than 19.2 us", cyc - t0);
    end
    $display("link up after %0d cycles (%0d ns)", cyc - t0, (cyc - t0) * 5);

    // 2. traffic at the start-up rate, then at other rates
    traffic("10 Mb/s");
    foreach (speeds[i]) begin
      speed = speeds[i];
      $display("speed %0d at cycle %0d", speed, cyc);
      wait_cycles(100);
      traffic("speed change");
      if (a_state == ST_RUN && b_state == ST_RUN) n_speed++;
    end

    // 3. flow control: B's host stops reading
    speed = 3'd6;
    b_rxr = 1'b0;
    send_packet(1, 150, 1, 0);
    wait_cycles(30000);
    checks++;
    if (exp_b.size() < 64 || txq_a.size() == 0) begin
      failures++;
      $display("FAIL flow control: expB=%0d still queued at A=%0d", exp_b.size(), txq_a.size());
    end
    b_rxr = 1'b1;
    wait_drain("flow control");

    // 4. time-codes from A
    for (int i = 0; i < 70; i++) begin
      a_flags = 2'($urandom);
      @(posedge clk) a_tick <= 1'b1;
      @(posedge clk) a_tick <= 1'b0;
      wait_cycles(300);
      checks++;
      if (b_time != a_time || b_fo != a_flags) begin
        failures++;
        $display("FAIL time: A=%0d B=%0d flags A=%0d B=%0d", a_time, b_time, a_flags, b_fo);
      end
    end
    checks++;
    if (n_tc != 70) begin
      failures++;
      $display("FAIL %0d time ticks at B, expected 70", n_tc);
    end

    // 5. disconnect in the middle of a packet: B must end it with an EEP
    send_packet(1, 5, 0, 0);
    wait_drain("partial packet");
    frz_d = a_d;
    frz_s = a_s;
    cut   = 1'b1;
    fork
      begin : watch_disc
        while (!b_rxerr) @(negedge clk);
        n_disc++;
      end
      wait_cycles(2000);
    join_any
    disable fork;
    exp_b.push_back('{ctrl: 1'b1, data: 8'h01});   // EEP written by B
    wait_down("disconnect");
    cut = 1'b0;
    wait_run("after disconnect");
    send_packet(1, 0, 1, 0);                         // A finishes its packet
    traffic("after disconnect");
    checks++;
    if (n_eep_b < 1) begin
      failures++;
      $display("FAIL no EEP after disconnect");
    end

    // 6. one inverted bit on the line: parity error
    inj_arm = 1'b1;
    fork
      begin : watch_par
        while (!b_rxerr) @(negedge clk);
        n_par++;
      end
      wait_cycles(5000);
    join_any
    disable fork;
    wait_down("parity error");
    wait_run("after parity error");
    traffic("after parity error");

    // 7. link disable at A
    a_dis = 1'b1;
    wait_cycles(100);
    if (a_state != ST_RUN) n_disable++;
    wait_cycles(6000);
    checks++;
    if (a_state == ST_RUN || b_state == ST_RUN) begin
      failures++;
      $display("FAIL link still running while disabled");
    end
    a_dis = 1'b0;
    wait_run("after re-enable");
    traffic("after re-enable");

    // mechanisms
    checks += 8;
    if (n_run < 4)     begin failures++; $display("FAIL link came up %0d times", n_run); end
    if (n_stall == 0)  begin failures++; $display("FAIL no flow-control stall"); end
    if (n_tc == 0)     begin failures++; $display("FAIL no time-code"); end
    if (n_speed < 5)   begin failures++; $display("FAIL speed changes %0d", n_speed); end
    if (n_disc == 0)   begin failures++; $display("FAIL no disconnect detected"); end
    if (n_par == 0)    begin failures++; $display("FAIL no parity error detected"); end
    if (n_disable == 0) begin failures++; $display("FAIL link disable had no effect"); end
    if (n_crerr != 0)  begin failures++; $display("FAIL %0d credit errors", n_crerr); end
    $display("mechanisms: run=%0d stall_cycles=%0d timecodes=%0d speeds=%0d disconnect=%0d parity=%0d disable=%0d eep=%0d rxA=%0d rxB=%0d",
             n_run, n_stall, n_tc, n_speed, n_disc, n_par, n_disable, n_eep_b, n_rx_a, n_rx_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
