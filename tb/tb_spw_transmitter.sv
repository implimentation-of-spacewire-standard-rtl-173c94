// tb_spw_transmitter: checks the character stream of spw_transmitter.
// The test records every bit put on the line (one per bit_en), checks the
// data-strobe rule (exactly one of D and S changes per bit) and decodes the
// bits with its own character parser, including the odd-parity check. It
// then checks: NULLs only while only send_nulls is set; FCTs when asked
// for, one fct_sent pulse per FCT; no N-Char without credit; exactly 8
// N-Chars per received FCT, in order, with EOP and EEP; time-codes before
// waiting N-Chars; the credit error when credit would exceed 56.
`timescale 1ns/1ps
module tb_spw_transmitter;
  import spw_pkg::*;
  localparam int T_NULL = 1000, T_FCT = 1001, T_EOP = 1002, T_EEP = 1003, T_ESCERR = 1004,
                 T_PARERR = 1005, T_TIME = 2000;
  logic clk = 0, rst = 1;
  logic enable_tx = 0, send_nulls = 0, send_fcts = 0, send_nchars = 0, send_timecodes = 0;
  logic bit_en = 0, bit_en2 = 0, tx_write = 0, tx_ready, tick_in = 0, got_fct = 0, fct_req = 0;
  logic fct_sent, credit_error, dout, sout, dout2, sout2;
  nchar_t tx_data = '0;
  logic [5:0] time_in = 0;
  logic [1:0] ctrl_flags_in = 0;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_transmitter dut (.*);

  // bit clock: one bit every 3 system clocks
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    bit_en <= (div == 2);
  end

  // line recorder
  bit bits[$];
  logic pd = 0, ps = 0, be_d = 0;
  int n_ds_err = 0, n_fct_sent = 0, n_cred_err = 0;
  always @(posedge clk) begin
    be_d <= bit_en && enable_tx;
    if (!rst && fct_sent) n_fct_sent++;
    if (!rst && credit_error) n_cred_err++;
  end
  always @(negedge clk) if (be_d) begin
    if (((dout != pd) + (sout != ps)) != 1) n_ds_err++;
    if (dout2 != dout || sout2 != sout) n_ds_err++;   // single rate: pair repeats
    pd = dout;
    ps = sout;
    bits.push_back(dout);
  end

  // character parser written from the SpaceWire character format
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
      for (int k = 2; k < n; k++) begin
        x ^= bits[i+k];
        v |= int'(bits[i+k]) << (k - 2);
      end
      if ((prev ^ p ^ f) != 1'b1) toks.push_back(T_PARERR);
      prev = x;
      if (f) begin
        // v: bit0 = first code bit, bit1 = second
        if (esc) begin
          toks.push_back(v == 0 ? T_NULL : T_ESCERR);
          esc = 0;
        end else if (v == 0) toks.push_back(T_FCT);
        else if (v == 2) toks.push_back(T_EOP);   // code 0,1
        else if (v == 1) toks.push_back(T_EEP);   // code 1,0
        else esc = 1;
      end else begin
        if (esc) begin toks.push_back(T_TIME + v); esc = 0; end
        else toks.push_back(v);
      end
      i += n;
    end
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int count_tok(input int t);
    int c = 0;
    foreach (toks[i]) if (toks[i] == t) c++;
    return c;
  endfunction

  // host: words offered through tx_write/tx_ready
  nchar_t hostq[$];
  int expect_toks[$];
  always @(posedge clk) if (tx_write && tx_ready) void'(hostq.pop_front());
  always @(negedge clk) begin
    tx_write = (hostq.size() != 0);
    tx_data  = tx_write ? hostq[0] : '0;
  end

  task automatic fct_in(input int n);
    repeat (n) begin got_fct = 1; @(negedge clk); got_fct = 0; @(negedge clk); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    check(dout == 0 && sout == 0, "line idle while disabled");
    // Started: NULLs only
    enable_tx = 1; send_nulls = 1; fct_req = 1;
    repeat (300) @(negedge clk);
    parse();
    check(toks.size() >= 10 && count_tok(T_NULL) == toks.size(), "only NULLs in Started");
    // Connecting: FCTs while requested
    send_fcts = 1;
    repeat (60) @(negedge clk);
    fct_req = 0;
    repeat (100) @(negedge clk);
    parse();
    check(count_tok(T_FCT) > 0 && count_tok(T_FCT) == n_fct_sent,
          $sformatf("FCTs on line %0d, fct_sent pulses %0d", count_tok(T_FCT), n_fct_sent));
    // Run, no credit: N-Chars must wait
    send_nchars = 1; send_timecodes = 1;
    for (int i = 0; i < 20; i++) begin
      nchar_t c = (i == 9) ? '{ctrl: 1'b1, data: 8'h00} :
                  (i == 19) ? '{ctrl: 1'b1, data: 8'h01} : '{ctrl: 1'b0, data: 8'($urandom)};
      hostq.push_back(c);
      expect_toks.push_back(c.ctrl ? (c.data[0] ? T_EEP : T_EOP) : int'(c.data));
    end
    repeat (300) @(negedge clk);
    check(hostq.size() == 20, "no N-Char without credit");
    // two FCTs: 16 N-Chars, then wait
    fct_in(2);
    repeat (800) @(negedge clk);
    check(hostq.size() == 4, $sformatf("16 N-Chars for two FCTs, %0d left", hostq.size()));
    // a time-code overtakes waiting N-Chars
    time_in = 6'd37; ctrl_flags_in = 2'b10;
    tick_in = 1; @(negedge clk); tick_in = 0;
    repeat (100) @(negedge clk);
    fct_in(1);
    repeat (400) @(negedge clk);
    parse();
    begin
      int got[$];
      int tpos = -1, last = -1;
      foreach (toks[i]) begin
        if (toks[i] < 256 || toks[i] == T_EOP || toks[i] == T_EEP) begin
          got.push_back(toks[i]);
          last = i;
        end
        if (toks[i] == T_TIME + 37 + (2 << 6)) tpos = i;
      end
      check(got == expect_toks, $sformatf("N-Char sequence (%0d of %0d)", got.size(), expect_toks.size()));
      check(tpos >= 0 && tpos < last, "time-code sent, ahead of the waiting N-Chars");
    end
    check(count_tok(T_PARERR) == 0 && count_tok(T_ESCERR) == 0, "no parity or escape error");
    check(n_ds_err == 0, $sformatf("data-strobe rule broken %0d times", n_ds_err));
    // credit: 4 left over from the third FCT; six more FCTs give 52, the next one 60 > 56
    fct_in(6);
    check(n_cred_err == 0, "no credit error up to 56");
    fct_in(1);
    check(n_cred_err == 1, "credit error above 56");
    // disable: line returns to zero
    enable_tx = 0;
    repeat (5) @(negedge clk);
    check(dout == 0 && sout == 0, "line low after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
