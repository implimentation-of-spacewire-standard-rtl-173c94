// tb_spw_tx_clock: measures the spacing of bit_en pulses of spw_tx_clock.
// Outside Run it must be INIT_DIV (20) clocks, i.e. 10 Mb/s at 200 MHz; in
// Run it must be the divider chosen by `speed` from the default table
// 20, 16, 10, 8, 5, 4, 2, 1.
`timescale 1ns/1ps
module tb_spw_tx_clock;
  logic clk = 0, rst = 1, run = 0;
  logic [2:0] speed = 0;
  logic bit_en, bit_en2;
  int checks = 0, failures = 0;
  int unsigned expect_div [8] = '{20, 16, 10, 8, 5, 4, 2, 1};
  always #2.5 clk = ~clk;

  spw_tx_clock dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int unsigned want);
    int n;
    // skip to a pulse, settle for one period, then measure three
    while (!bit_en) @(negedge clk);
    @(negedge clk);
    while (!bit_en) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      n = 0;
      do begin @(negedge clk); n++; end while (!bit_en);
      checks++;
      if (n != int'(want)) begin
        failures++;
        $display("FAIL run=%0d speed=%0d period %0d expected %0d", run, speed, n, want);
      end
    end
  endtask

  int n_en2 = 0;
  always @(posedge clk) if (!rst && bit_en2) n_en2++;   // single rate: never

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    measure(20);
    speed = 3'd6;
    measure(20);                // speed is ignored outside Run
    run = 1;
    for (int s = 7; s >= 0; s--) begin
      speed = 3'(s);
      measure(expect_div[s]);
    end
    run = 0;
    measure(20);
    checks++;
    if (n_en2 != 0) begin failures++; $display("FAIL bit_en2 high without DDR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
