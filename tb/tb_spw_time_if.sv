// tb_spw_time_if: time master and time slave behaviour of spw_time_if.
// Host ticks must count the time modulo 64 and hand each new value to the
// link; received time-codes must update the time, with a tick to the host
// only when the code is the local time plus one.
`timescale 1ns/1ps
module tb_spw_time_if;
  logic clk = 0, rst = 1;
  logic host_tick = 0, host_tick_out, time_err;
  logic [1:0] host_flags = 0, host_flags_out, link_flags_in, link_flags_out = 0;
  logic [5:0] host_time, link_time_in, link_time_out = 0;
  logic link_tick_in, link_tick_out = 0;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_time_if dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] t;
    repeat (3) @(negedge clk);
    rst = 0;
    t = 0;
    // master: 100 ticks wrap the counter
    for (int i = 0; i < 100; i++) begin
      host_flags = 2'($urandom);
      host_tick = 1; @(negedge clk); host_tick = 0;
      t = t + 1;
      check(link_tick_in && link_time_in == t && link_flags_in == host_flags,
            $sformatf("master tick %0d: link_tick_in=%0d time=%0d", i, link_tick_in, link_time_in));
      check(host_time == t, "local time follows master ticks");
      @(negedge clk);
      check(!link_tick_in, "link_tick_in is a pulse");
    end
    // slave: in-sequence codes give ticks
    for (int i = 0; i < 80; i++) begin
      automatic bit in_seq = ($urandom_range(0, 3) != 0);
      automatic logic [5:0] v = in_seq ? t + 1 : t + 6'($urandom_range(2, 60));
      link_time_out = v;
      link_flags_out = 2'($urandom);
      link_tick_out = 1; @(negedge clk); link_tick_out = 0;
      check(host_tick_out == in_seq && time_err == !in_seq,
            $sformatf("slave code %0d after %0d: tick=%0d err=%0d", v, t, host_tick_out, time_err));
      check(host_time == v && host_flags_out == link_flags_out, "slave time loaded");
      t = v;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
