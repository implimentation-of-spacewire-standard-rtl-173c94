// tb_spw_fifo: random writes and reads on spw_fifo (default 9 x 64),
// compared with a queue model: data order, empty, full, count and free.
`timescale 1ns/1ps
module tb_spw_fifo;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [8:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [6:0] count, free;
  int checks = 0, failures = 0;
  logic [8:0] model[$];
  int n_full = 0, n_empty = 0;
  always #2.5 clk = ~clk;

  spw_fifo dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      // bias towards filling in the first half, emptying in the second
      automatic int wp = ((i / 2000) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 64) ||
          count != 7'(model.size()) || free != 7'(64 - model.size()) ||
          (model.size() != 0 && rd_data != model[0])) begin
        failures++;
        if (failures < 10)
          $display("FAIL size=%0d empty=%0d full=%0d count=%0d free=%0d rd=%h", model.size(),
                   empty, full, count, free, rd_data);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      // the writer and reader obey the FIFO's own flags
      wr_en   = ($urandom_range(0, 99) < wp) && !full;
      rd_en   = ($urandom_range(0, 99) < 100 - wp) && !empty;
      wr_data = 9'($urandom);
      @(posedge clk);
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en && model.size() < 64) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL full (%0d) or empty (%0d) never reached", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
