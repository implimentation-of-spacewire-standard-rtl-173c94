// tb_spw_rx_clock_recovery: drives data-strobe encoded random bits at
// several bit periods (1 to 7 system clocks, with jitter) and checks that
// every bit is recovered once and in order, that rx_clock is D xor S, that
// bit_valid follows a line change by 3 clocks, and that nothing is reported
// while the block is disabled.
`timescale 1ns/1ps
module tb_spw_rx_clock_recovery;
  logic clk = 0, rst = 1, enable = 0, din = 0, sin = 0;
  logic rx_clock, bit_valid, bit_data;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_rx_clock_recovery dut (.*);

  bit sent[$], got[$];
  longint unsigned cyc = 0, t_change[$];
  int n_lat_bad = 0, n_rxc_bad = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && bit_valid) begin
      got.push_back(bit_data);
      if (t_change.size() != 0) begin
        if (cyc - t_change[0] != 3) n_lat_bad++;
        void'(t_change.pop_front());
      end
    end
  end
  always @(negedge clk) if (rx_clock != (din ^ sin)) n_rxc_bad++;

  task automatic send(input bit b, input int period);
    if (b == din) sin = ~sin; else din = b;
    t_change.push_back(cyc);
    sent.push_back(b);
    repeat (period) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // disabled: line activity is ignored
    for (int i = 0; i < 20; i++) send(1'($urandom), 3);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL bits while disabled"); end
    sent.delete(); t_change.delete();
    enable = 1;
    repeat (4) @(negedge clk);
    for (int p = 1; p <= 7; p++)
      for (int i = 0; i < 200; i++) send(1'($urandom), (p == 7) ? int'($urandom_range(2, 7)) : p);
    repeat (6) @(negedge clk);
    checks++;
    if (got != sent) begin
      failures++;
      $display("FAIL recovered %0d bits, sent %0d", got.size(), sent.size());
    end
    checks++;
    if (n_lat_bad != 0) begin failures++; $display("FAIL latency wrong %0d times", n_lat_bad); end
    checks++;
    if (n_rxc_bad != 0) begin failures++; $display("FAIL rx_clock != D xor S"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
