// tb_spw_transmitter_ddr: the double-data-rate transmit option. A
// spw_tx_clock and a spw_transmitter, both with DDR = 1, drive two
// spw_ddr_out cells, so the line can change at every half clock. For the
// start-up rate and for Run dividers 1, 2 and 5 (400, 200 and 80 Mb/s at
// 200 MHz) the test records every change on the two lines, sampled after
// each clock edge, and checks:
//   - exactly one line changes per bit (data-strobe rule),
//   - bits are evenly spaced at the divider, counted in half clocks,
//   - the decoded stream (its own parser, odd parity checked) has NULLs,
//     then FCTs, and a credit-limited packet of N-Chars with EOP in order.
`timescale 1ns/1ps
module tb_spw_transmitter_ddr;
  import spw_pkg::*;
  localparam int T_NULL = 1000, T_FCT = 1001, T_EOP = 1002, T_EEP = 1003, T_ERR = 1004;
  logic clk = 0, rst = 1, run = 0;
  logic [2:0] speed = 3'd7;
  logic enable_tx = 0, send_nulls = 0, send_fcts = 0, send_nchars = 0;
  logic bit_en, bit_en2, tx_write = 0, tx_ready, got_fct = 0, fct_req = 0;
  logic fct_sent, credit_error, td, ts, td2, ts2, dout, sout;
  nchar_t tx_data = '0;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_tx_clock #(.DDR(1'b1)) u_clk (.clk, .rst, .run, .speed, .bit_en, .bit_en2);
  spw_transmitter #(.DDR(1'b1)) dut (
    .clk, .rst, .enable_tx, .send_nulls, .send_fcts, .send_nchars, .send_timecodes(1'b0),
    .bit_en, .bit_en2, .tx_write, .tx_data, .tx_ready, .tick_in(1'b0), .time_in(6'd0),
    .ctrl_flags_in(2'd0), .got_fct, .fct_req, .fct_sent, .credit_error,
    .dout(td), .sout(ts), .dout2(td2), .sout2(ts2)
  );
  spw_ddr_out u_d (.clk, .d_rise(td), .d_fall(td2), .q(dout));
  spw_ddr_out u_s (.clk, .d_rise(ts), .d_fall(ts2), .q(sout));

  // line recorder: one sample after every clock edge
  bit bits[$];
  logic pd = 0, ps = 0;
  int half = 0, last_change = -1, want_gap = 0, n_gap_err = 0, n_ds_err = 0;
  always @(clk) begin
    #1;
    half++;
    if (rst) begin            // the output cells have no reset of their own
      pd = dout;
      ps = sout;
      last_change = -1;
    end else if (dout != pd || sout != ps) begin
      if (dout != pd && sout != ps) n_ds_err++;
      if (last_change >= 0 && half - last_change != want_gap) n_gap_err++;
      last_change = half;
      bits.push_back(dout);
      pd = dout;
      ps = sout;
    end
  end

  int toks[$];
  function automatic void parse();
    int i = 0;
    bit prev = 0, esc = 0;
    toks.delete();
    while (i + 4 <= bits.size()) begin
      bit p = bits[i], f = bits[i+1];
      int n = f ? 4 : 10;
      bit x = 0;
      int v = 0;
      if (i + n > bits.size()) break;
      for (int k = 2; k < n; k++) begin x ^= bits[i+k]; v |= int'(bits[i+k]) << (k - 2); end
      if ((prev ^ p ^ f) != 1'b1) toks.push_back(T_ERR);
      prev = x;
      if (f) begin
        if (esc) begin toks.push_back(v == 0 ? T_NULL : T_ERR); esc = 0; end
        else if (v == 0) toks.push_back(T_FCT);
        else if (v == 2) toks.push_back(T_EOP);
        else if (v == 1) toks.push_back(T_EEP);
        else esc = 1;
      end else begin
        if (esc) begin toks.push_back(T_ERR); esc = 0; end
        else toks.push_back(v);
      end
      i += n;
    end
  endfunction

  function automatic int count_tok(input int t);
    int c = 0;
    foreach (toks[i]) if (toks[i] == t) c++;
    return c;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  nchar_t hostq[$];
  always @(posedge clk) if (tx_write && tx_ready) void'(hostq.pop_front());
  always @(negedge clk) begin
    tx_write = (hostq.size() != 0);
    tx_data  = tx_write ? hostq[0] : '0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one run: reset, NULLs, FCTs, then 15 data characters and EOP on credit
  task automatic run_case(input bit in_run, input logic [2:0] spd, input int gap);
    int want[$], got[$];
    string tag = $sformatf("run=%0d speed=%0d", in_run, spd);
    int wait_bits = 12 * gap;   // clocks for about 24 bits
    rst = 1; enable_tx = 0; send_nulls = 0; send_fcts = 0; send_nchars = 0;
    run = in_run; speed = spd; want_gap = gap;
    repeat (3) @(negedge clk);
    bits.delete();
    n_ds_err = 0;
    n_gap_err = 0;
    rst = 0;
    enable_tx = 1; send_nulls = 1;
    repeat (4 * wait_bits) @(negedge clk);
    parse();
    check(toks.size() >= 8 && count_tok(T_NULL) == toks.size(), {tag, ": only NULLs"});
    send_fcts = 1; fct_req = 1;
    repeat (wait_bits) @(negedge clk);
    fct_req = 0;
    send_nchars = 1;
    for (int i = 0; i < 15; i++) begin
      hostq.push_back('{ctrl: 1'b0, data: 8'($urandom)});
      want.push_back(int'(hostq[$].data));
    end
    hostq.push_back('{ctrl: 1'b1, data: 8'h00});
    want.push_back(T_EOP);
    repeat (wait_bits) @(negedge clk);
    check(hostq.size() == 16, {tag, ": no N-Chars without credit"});
    got_fct = 1; @(negedge clk); got_fct = 1; @(negedge clk); got_fct = 0;
    repeat (20 * wait_bits) @(negedge clk);
    parse();
    foreach (toks[i]) if (toks[i] < 256 || toks[i] == T_EOP) got.push_back(toks[i]);
    check(got == want, $sformatf("%s: N-Chars %0d of %0d", tag, got.size(), want.size()));
    check(count_tok(T_FCT) > 0, {tag, ": FCTs sent"});
    check(count_tok(T_ERR) == 0, {tag, ": no parity or escape error"});
    check(n_ds_err == 0, {tag, ": one line changes per bit"});
    check(n_gap_err == 0 && bits.size() > 200,
          $sformatf("%s: %0d bits, %0d not %0d half clocks apart", tag, bits.size(), n_gap_err, gap));
  endtask

  initial begin
    run_case(1'b1, 3'd7, 1);    // 400 Mb/s
    run_case(1'b1, 3'd6, 2);    // 200 Mb/s
    run_case(1'b1, 3'd4, 5);    // 80 Mb/s, bits start on either edge
    run_case(1'b0, 3'd7, 40);   // start-up 10 Mb/s
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
