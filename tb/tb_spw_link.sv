// tb_spw_link: spw_link against a far end modelled in this testbench (a
// data-strobe encoder and decoder written from the SpaceWire character
// format). Default parameters: 200 MHz system clock, 10 Mb/s start-up.
// Checks:
//   - after reset the link stays silent for 6.4 us + 12.8 us, then sends
//     NULLs (Started), at 20 clocks per bit;
//   - with no answer it gives up 12.8 us later and starts again;
//   - NULLs from the far end move it to Connecting (FCTs appear), an FCT to
//     Run, where it sends N-Chars within the credit the far end gave and
//     passes received N-Chars to the buffer;
//   - the far end sending more N-Chars than the FCTs allowed gives a credit
//     error and the link drops;
//   - the far end going silent gives a disconnect error (850 ns) and the
//     link drops.
`timescale 1ns/1ps
module tb_spw_link;
  import spw_pkg::*;
  localparam int T_NULL = 1000, T_FCT = 1001, T_EOP = 1002, T_EEP = 1003, T_OTHER = 1004;
  logic clk = 0, rst = 1;
  logic link_start = 0, link_disable = 0, autostart = 0;
  logic [2:0] tx_speed = 3'd4;          // divider 5 in Run
  link_state_t link_state;
  logic tx_write = 0, tx_ready, tick_in = 0, tick_out, buffer_ready = 1, buffer_write;
  nchar_t tx_data = '0, rx_data;
  logic [5:0] time_in = 0, time_out;
  logic [1:0] ctrl_flags_in = 0, ctrl_flags_out;
  logic [6:0] rx_buf_free = 7'd64;
  logic rx_error, credit_err, din = 0, sin = 0, dout, sout, rx_clock;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always #2.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  longint unsigned t_started = 0;
  int n_credit_err = 0;
  link_state_t st_d = ST_ERROR_RESET;
  always @(posedge clk) begin
    st_d <= link_state;
    if (!rst && link_state == ST_STARTED && st_d != ST_STARTED) t_started <= cyc;
    if (!rst && credit_err) n_credit_err++;
  end

  spw_link dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d, state %s)", msg, cyc, link_state.name()); end
  endtask

  // ---- far-end decoder of the link's output ----
  bit rbits[$];
  longint unsigned t_first_bit = 0, t_prev_bit = 0, bit_gap = 0;
  logic pd = 0, ps = 0;
  int rx_toks[$];
  int rx_pos = 0;
  bit rx_prev_par = 0, rx_esc = 0, rx_synced = 0;
  int n_par_err = 0;
  always @(negedge clk) begin
    if (rst) begin
      pd = 0; ps = 0;
    end else if (dout != pd || sout != ps) begin
      if (rbits.size() == 0) t_first_bit = cyc;
      bit_gap = cyc - t_prev_bit;
      t_prev_bit = cyc;
      pd = dout; ps = sout;
      rbits.push_back(dout);
    end
  end
  // turn received bits into characters (first NULL aligns)
  always @(negedge clk) begin
    if (!rx_synced && rbits.size() >= 8) begin
      // the link's first character is a NULL starting at bit 0
      rx_synced = 1;
    end
    while (rx_synced && rx_pos + 4 <= rbits.size()) begin
      automatic bit p = rbits[rx_pos], f = rbits[rx_pos+1];
      automatic int n = f ? 4 : 10;
      automatic bit x = 0;
      automatic int v = 0;
      if (rx_pos + n > rbits.size()) break;
      for (int k = 2; k < n; k++) begin x ^= rbits[rx_pos+k]; v |= int'(rbits[rx_pos+k]) << (k-2); end
      if ((rx_prev_par ^ p ^ f) != 1'b1) n_par_err++;
      rx_prev_par = x;
      rx_pos += n;
      if (f) begin
        if (rx_esc) begin rx_toks.push_back(v == 0 ? T_NULL : T_OTHER); rx_esc = 0; end
        else if (v == 0) rx_toks.push_back(T_FCT);
        else if (v == 2) rx_toks.push_back(T_EOP);
        else if (v == 1) rx_toks.push_back(T_EEP);
        else rx_esc = 1;
      end else begin
        if (rx_esc) begin rx_toks.push_back(T_OTHER); rx_esc = 0; end
        else rx_toks.push_back(v);
      end
    end
  end
  function automatic int count_rx(input int t);
    int c = 0;
    foreach (rx_toks[i]) if (rx_toks[i] == t) c++;
    return c;
  endfunction
  task automatic reset_decoder();
    rbits.delete(); rx_toks.delete(); rx_pos = 0; rx_prev_par = 0; rx_esc = 0; rx_synced = 0;
  endtask

  // ---- far-end encoder ----
  bit far_on = 0;
  int far_q[$];
  bit far_par = 0;
  task automatic far_bit(input bit b);
    if (b == din) sin = ~sin; else din = b;
    repeat (4) @(negedge clk);
  endtask
  task automatic far_char(input bit ctrl, input logic [7:0] v);
    int n = ctrl ? 2 : 8;
    bit x = 0;
    far_bit(1 ^ far_par ^ ctrl);
    far_bit(ctrl);
    for (int k = 0; k < n; k++) begin far_bit(v[k]); x ^= v[k]; end
    far_par = x;
  endtask
  initial begin
    forever begin
      if (far_on) begin
        if (far_q.size() != 0) begin
          automatic int t = far_q.pop_front();
          if (t == T_FCT) far_char(1, 8'b00);
          else if (t == T_EOP) far_char(1, 8'b10);
          else far_char(0, 8'(t));
        end else begin
          far_char(1, 8'b11); far_char(1, 8'b00);
        end
      end else @(negedge clk);
    end
  end

  // host side of the link
  nchar_t hostq[$];
  nchar_t got[$];
  always @(posedge clk) begin
    if (tx_write && tx_ready) void'(hostq.pop_front());
    if (!rst && buffer_write) got.push_back(rx_data);
  end
  always @(negedge clk) begin
    tx_write = (hostq.size() != 0);
    tx_data  = tx_write ? hostq[0] : '0;
  end

  task automatic wait_state(input link_state_t s, input int limit);
    int t = 0;
    while (link_state != s && t < limit) begin @(negedge clk); t++; end
    check(link_state == s, $sformatf("reach %s", s.name()));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned t0, t1;
    repeat (3) @(negedge clk);
    rst = 0;
    t0 = cyc;
    link_start = 1;
    // start-up silence, then NULLs
    wait (rbits.size() > 0);
    check(t_first_bit - t0 >= (64 + 128) * 20, $sformatf("first bit after %0d clocks", t_first_bit - t0));
    check(link_state == ST_STARTED, "Started while sending first NULLs");
    repeat (400) @(negedge clk);
    check(bit_gap == 20, $sformatf("start-up bit period %0d clocks", bit_gap));
    check(rx_toks.size() > 0 && count_rx(T_NULL) == rx_toks.size(), "Started sends NULLs only");
    // no answer: timeout after 12.8 us in Started
    t1 = t_started;
    wait_state(ST_ERROR_RESET, 4000);
    check(cyc - t1 >= 2560 && cyc - t1 < 2570, $sformatf("Started timeout after %0d clocks", cyc - t1));
    // second attempt: answer with NULLs, then FCT
    reset_decoder();
    wait_state(ST_STARTED, 5000);
    far_par = 0;
    far_on = 1;
    wait_state(ST_CONNECTING, 2000);
    repeat (600) @(negedge clk);
    check(count_rx(T_FCT) > 0, "Connecting sends FCTs");
    check(count_rx(T_FCT) <= 7, $sformatf("at most 56 credit given (%0d FCTs)", count_rx(T_FCT)));
    far_q.push_back(T_FCT);                       // far end grants 8
    wait_state(ST_RUN, 2000);
    // host sends 12 N-Chars; only 8 may leave before a second FCT
    for (int i = 0; i < 11; i++) hostq.push_back('{ctrl: 1'b0, data: 8'(i + 100)});
    hostq.push_back('{ctrl: 1'b1, data: 8'h00});
    repeat (1500) @(negedge clk);
    check(hostq.size() == 4, $sformatf("8 N-Chars per FCT (%0d waiting)", hostq.size()));
    check(bit_gap == 5, $sformatf("Run bit period %0d clocks", bit_gap));
    far_q.push_back(T_FCT);
    repeat (1500) @(negedge clk);
    check(hostq.size() == 0, "rest sent after second FCT");
    begin
      int want[$], have[$];
      for (int i = 0; i < 11; i++) want.push_back(i + 100);
      want.push_back(T_EOP);
      foreach (rx_toks[i]) if (rx_toks[i] < 256 || rx_toks[i] == T_EOP) have.push_back(rx_toks[i]);
      check(have == want, "N-Chars on the line");
    end
    check(n_par_err == 0, "line parity");
    // far end sends N-Chars within the credit it was given
    begin
      int credit = 8 * count_rx(T_FCT);
      for (int i = 0; i < credit; i++) far_q.push_back((i == credit - 1) ? T_EOP : (i & 255));
      while (far_q.size() != 0) @(negedge clk);
      repeat (100) @(negedge clk);
      check(got.size() == credit, $sformatf("%0d N-Chars written, credit %0d", got.size(), credit));
      check(link_state == ST_RUN && !credit_err, "still running within credit");
      // buffer full from now on: no further FCTs; one N-Char beyond the
      // credit outstanding must give a credit error
      rx_buf_free = 7'd0;
      repeat (600) @(negedge clk);
      credit = 8 * count_rx(T_FCT) - credit;      // granted, not yet used
      check(n_credit_err == 0, "no credit error yet");
      for (int i = 0; i <= credit; i++) far_q.push_back(i & 255);
      wait_state(ST_ERROR_RESET, 20000);
      check(n_credit_err == 1, $sformatf("credit error after %0d N-Chars on credit %0d", credit + 1, credit));
    end
    // disconnect: link up again, then the far end stops
    far_on = 0;
    rx_buf_free = 7'd64;
    while (far_q.size() != 0) void'(far_q.pop_front());
    repeat (100) @(negedge clk);
    reset_decoder();
    wait_state(ST_STARTED, 10000);
    far_par = 0; far_on = 1;
    wait_state(ST_CONNECTING, 2000);
    far_q.push_back(T_FCT);
    wait_state(ST_RUN, 2000);
    repeat (200) @(negedge clk);
    far_on = 0;
    begin
      int t = 0;
      while (!rx_error && t < 1000) begin @(negedge clk); t++; end
      check(rx_error, "disconnect detected");
      check(t >= 160 && t <= 200, $sformatf("disconnect after %0d clocks", t));
    end
    wait_state(ST_ERROR_RESET, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
