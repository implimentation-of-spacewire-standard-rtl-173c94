// tb_spw_ddr_out: the DDR output cell model. Random d_rise/d_fall values are
// applied before each rising edge; the output must show d_rise for the half
// clock after that edge and d_fall for the half after the falling edge, and
// hold d_fall until the next rising edge whatever the inputs do meanwhile.
`timescale 1ns/1ps
module tb_spw_ddr_out;
  logic clk = 0, d_rise = 0, d_fall = 0, q;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_ddr_out dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r, f, f_last;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      r = 1'($urandom);
      f = 1'($urandom);
      d_rise = r;
      d_fall = f;
      if (i > 0) begin
        #1;             // still the low half: the last d_fall is held
        checks++;
        if (q !== f_last) begin failures++; $display("FAIL low half held: q=%b want %b", q, f_last); end
      end
      @(posedge clk);
      #1;
      d_rise = ~r;    // later input changes must not reach the output
      d_fall = ~f;
      checks++;
      if (q !== r) begin failures++; $display("FAIL rising half: q=%b want %b", q, r); end
      @(negedge clk);
      #0.5;
      checks++;
      if (q !== f) begin failures++; $display("FAIL falling half: q=%b want %b", q, f); end
      f_last = f;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
