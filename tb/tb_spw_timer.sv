// tb_spw_timer: checks the 6.4 us / 12.8 us timeouts and the 850 ns
// disconnect timeout of spw_timer at the default INIT_DIV (20 clocks per
// 100 ns, a 200 MHz system clock). Expected cycle counts are worked out
// here from the time values: 6.4 us = 1280 clocks, 12.8 us = 2560 clocks,
// 850 ns = 170 clocks.
`timescale 1ns/1ps
module tb_spw_timer;
  logic clk = 0, rst = 1, restart = 0, bit_seen = 0, disc_arm = 0;
  logic after_6_4, after_12_8, disconnect;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_timer dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst = 0;
    // count clocks from the restart until each flag rises
    for (int rep = 0; rep < 2; rep++) begin
      restart = 1; @(negedge clk); restart = 0;
      n = 0;  // clocks counted from the edge that took the restart
      while (!after_6_4) begin @(negedge clk); n++; end
      check(n == 1280, $sformatf("after_6_4 after %0d clocks, expected 1280", n));
      check(!after_12_8, "after_12_8 early");
      while (!after_12_8) begin @(negedge clk); n++; end
      check(n == 2560, $sformatf("after_12_8 after %0d clocks, expected 2560", n));
      repeat (500) @(negedge clk);
      check(after_6_4 && after_12_8, "flags must stay high until restart");
      // restart half way must start over
      restart = 1; @(negedge clk); restart = 0;
      check(!after_6_4 && !after_12_8, "flags clear on restart");
      repeat (700) @(negedge clk);
      restart = 1; @(negedge clk); restart = 0;
    end
    // disconnect: not armed -> never
    repeat (1000) @(negedge clk);
    check(!disconnect, "disconnect while not armed");
    disc_arm = 1;
    // bits every 150 clocks (750 ns): no disconnect
    for (int i = 0; i < 10; i++) begin
      bit_seen = 1; @(negedge clk); bit_seen = 0;
      repeat (149) @(negedge clk);
      check(!disconnect, "disconnect with bits 750 ns apart");
    end
    bit_seen = 1; @(negedge clk); bit_seen = 0;
    n = 0;
    while (!disconnect && n < 1000) begin @(negedge clk); n++; end
    check(n == 170, $sformatf("disconnect after %0d clocks, expected 170", n));
    bit_seen = 1; @(negedge clk); bit_seen = 0;
    check(!disconnect, "disconnect clears on a bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
