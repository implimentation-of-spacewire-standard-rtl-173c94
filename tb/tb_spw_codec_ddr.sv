// tb_spw_codec_ddr: two codecs joined back to back, both built with the
// double-data-rate transmit option (TX_DDR = 1), so each line can change at
// every half clock. The receivers still sample on the rising clock edge, so
// the test uses rates up to one bit per clock: it checks the link starts at
// 10 Mb/s no earlier than the 6.4 us + 12.8 us timeouts allow, then sends
// packets both ways at the start-up rate and at Run dividers 2, 4, 5 and 8
// half clocks (200, 100, 80 and 50 Mb/s at 200 MHz), switching while the
// link runs, stalls the far host to exercise flow control, and cuts the
// line once to check recovery. Every N-Char read is compared with a
// scoreboard of what the other host sent; a credit error is a failure.
// When B drops its link after the cut, its transmitter forces both lines
// low mid-character, and that last edge can complete a valid EEP at A; one
// such EEP between packets is accepted during the cut, and nowhere else.
`timescale 1ns/1ps
module tb_spw_codec_ddr;
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

  spw_codec #(.TX_DDR(1'b1)) a (
    .clk, .rst, .link_start(a_start), .link_disable(a_dis), .autostart(1'b0), .tx_speed(speed),
    .link_state(a_state), .rx_error(a_rxerr), .credit_err(a_crerr),
    .host_tx_valid(a_txv), .host_tx_data(a_txd), .host_tx_ready(a_txr),
    .host_rx_valid(a_rxv), .host_rx_data(a_rxd), .host_rx_ready(a_rxr),
    .host_tick(a_tick), .host_flags(a_flags), .host_tick_out(a_tko), .host_time(a_time),
    .host_flags_out(a_fo), .time_err(a_terr),
    .din(b_d), .sin(b_s), .dout(a_d), .sout(a_s), .rx_clock(a_rxc)
  );

  spw_codec #(.TX_DDR(1'b1)) b (
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

  int n_rx_a = 0, n_rx_b = 0, n_eep_b = 0, n_stray = 0;
  bit eep_ok = 0;   // an unexpected EEP at A is allowed while the line is cut
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
      if (exp_a.size() == 0 && eep_ok && a_rxd == '{ctrl: 1'b1, data: 8'h01}) begin
        n_stray++;    // B's transmitter stopped mid-character when it dropped
      end else if (exp_a.size() == 0) begin
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
  logic [2:0] speeds [4] = '{3'd6, 3'd4, 3'd5, 3'd3};
  initial begin
    wait_cycles(10);
    rst = 1'b0;
    t0 = cyc;
    a_start = 1'b1;
    b_auto  = 1'b1;

    wait_run("start-up");
    checks++;
    if (cyc - t0 < longint'((64 + 128) * INIT_DIV)) begin
      failures++;
      $display("FAIL link up after %0d cycles, earlier than 19.2 us", cyc - t0);
    end
    $display("link up after %0d cycles (%0d ns)", cyc - t0, (cyc - t0) * 5);

    traffic("10 Mb/s");
    foreach (speeds[i]) begin
      speed = speeds[i];
      $display("speed %0d at cycle %0d", speed, cyc);
      wait_cycles(100);
      traffic("speed change");
      if (a_state == ST_RUN && b_state == ST_RUN) n_speed++;
    end

    // flow control: B's host stops reading
    speed = 3'd6;
    b_rxr = 1'b0;
    send_packet(1, 150, 1, 0);
    wait_cycles(20000);
    checks++;
    if (exp_b.size() < 64 || txq_a.size() == 0) begin
      failures++;
      $display("FAIL flow control: expB=%0d still queued at A=%0d", exp_b.size(), txq_a.size());
    end
    b_rxr = 1'b1;
    wait_drain("flow control");

    // line cut between packets
    frz_d = a_d;
    frz_s = a_s;
    cut   = 1'b1;
    eep_ok = 1'b1;
    fork
      begin : watch_disc
        while (!b_rxerr) @(negedge clk);
        n_disc++;
      end
      wait_cycles(2000);
    join_any
    disable fork;
    wait_down("disconnect");
    cut = 1'b0;
    wait_run("after disconnect");
    eep_ok = 1'b0;
    traffic("after disconnect");

    checks += 5;
    if (n_run < 2)     begin failures++; $display("FAIL link came up %0d times", n_run); end
    if (n_stall == 0)  begin failures++; $display("FAIL no flow-control stall"); end
    if (n_speed < 4)   begin failures++; $display("FAIL speed changes %0d", n_speed); end
    if (n_disc == 0)   begin failures++; $display("FAIL no disconnect detected"); end
    if (n_crerr != 0)  begin failures++; $display("FAIL %0d credit errors", n_crerr); end
    $display("mechanisms: run=%0d stall_cycles=%0d speeds=%0d disconnect=%0d rxA=%0d rxB=%0d stray_eep=%0d",
             n_run, n_stall, n_speed, n_disc, n_rx_a, n_rx_b, n_stray);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
