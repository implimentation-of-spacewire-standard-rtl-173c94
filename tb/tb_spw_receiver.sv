// tb_spw_receiver: feeds spw_receiver bit by bit with characters built here
// from the SpaceWire character format (parity over the previous character's
// data bits, the parity bit and the flag) and checks what it reports:
// alignment on the first NULL after random line noise, got_null/got_fct,
// N-Chars written to the buffer only within the credit given by fct_sent,
// the credit error beyond it, time-codes, parity and escape errors, the
// disconnect input, and the EEP written when the receiver is disabled in
// the middle of a packet.
`timescale 1ns/1ps
module tb_spw_receiver;
  import spw_pkg::*;
  logic clk = 0, rst = 1;
  logic enable_rx = 0, bit_valid = 0, bit_data = 0, disconnect = 0, fct_sent = 0, buffer_ready = 1;
  logic got_bit, got_null, got_fct, got_nchar, got_timecode, rx_err, credit_error, buffer_write;
  nchar_t rx_data;
  logic tick_out;
  logic [5:0] time_out, rx_credit;
  logic [1:0] ctrl_flags_out;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  spw_receiver dut (.*);

  // event counters
  int c_null = 0, c_fct = 0, c_nchar = 0, c_tc = 0, c_err = 0, c_cred = 0;
  nchar_t written[$];
  always @(posedge clk) if (!rst) begin
    if (got_null) c_null++;
    if (got_fct) c_fct++;
    if (got_nchar) c_nchar++;
    if (got_timecode) c_tc++;
    if (rx_err) c_err++;
    if (credit_error) c_cred++;
    if (buffer_write) written.push_back(rx_data);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic clear_counts();
    c_null = 0; c_fct = 0; c_nchar = 0; c_tc = 0; c_err = 0; c_cred = 0;
    written.delete();
  endtask

  // bit sender: one bit every 2 clocks
  task automatic send_bit(input bit b);
    bit_valid = 1; bit_data = b; @(negedge clk);
    bit_valid = 0; @(negedge clk);
  endtask

  bit prev_par = 0;
  // send a character; flip_par sends a wrong parity bit
  task automatic send_char(input bit ctrl, input logic [7:0] v, input bit flip_par = 0);
    int n = ctrl ? 2 : 8;
    bit x = 0;
    bit p = 1 ^ prev_par ^ ctrl ^ flip_par;
    send_bit(p);
    send_bit(ctrl);
    for (int k = 0; k < n; k++) begin
      send_bit(v[k]);
      x ^= v[k];
    end
    prev_par = x;
  endtask
  // control codes as {second, first} so that v[0] goes first
  localparam logic [7:0] V_FCT = 8'b00, V_EOP = 8'b10, V_EEP = 8'b01, V_ESC = 8'b11;
  task automatic send_null(); send_char(1, V_ESC); send_char(1, V_FCT); endtask

  task automatic restart_rx();
    enable_rx = 0; @(negedge clk); @(negedge clk);
    enable_rx = 1; prev_par = 0;
    clear_counts();
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
    enable_rx = 1;
    @(negedge clk);
    check(!got_bit, "no bit yet");
    // noise that is not a NULL, then NULLs
    send_bit(0); send_bit(1); send_bit(0);
    check(got_bit, "got_bit after the first bit");
    prev_par = 0;
    repeat (4) send_null();
    check(c_null == 4 && c_err == 0, $sformatf("4 NULLs seen: %0d, errors %0d", c_null, c_err));
    // FCT
    send_char(1, V_FCT);
    check(c_fct == 1, "got_fct");
    // credit: one FCT sent by us = 8 N-Chars
    fct_sent = 1; @(negedge clk); fct_sent = 0;
    check(rx_credit == 8, "credit 8 after fct_sent");
    for (int i = 0; i < 7; i++) send_char(0, 8'(i * 37 + 5));
    send_char(1, V_EOP);
    check(c_nchar == 8 && c_cred == 0 && written.size() == 8, "8 N-Chars within credit");
    for (int i = 0; i < 7; i++)
      check(written[i] == '{ctrl: 1'b0, data: 8'(i * 37 + 5)}, $sformatf("data %0d", i));
    check(written[7] == '{ctrl: 1'b1, data: 8'h00}, "EOP");
    check(rx_credit == 0, "credit used up");
    send_char(0, 8'h55);
    check(c_cred == 1 && written.size() == 8, "credit error on N-Char without credit");
    // EEP with credit
    fct_sent = 1; @(negedge clk); fct_sent = 0;
    send_char(1, V_EEP);
    check(written.size() == 9 && written[8] == '{ctrl: 1'b1, data: 8'h01}, "EEP written");
    // time-code: ESC + data
    send_char(1, V_ESC); send_char(0, {2'b01, 6'd42});
    check(c_tc == 1 && time_out == 6'd42 && ctrl_flags_out == 2'b01, "time-code 42 flags 01");
    check(c_err == 0, "no error so far");
    // parity error
    send_char(0, 8'hA5, 1);
    check(c_err == 1, "parity error");
    // escape errors: ESC ESC, ESC EOP
    restart_rx(); send_bit(1); prev_par = 0; send_null();
    send_char(1, V_ESC); send_char(1, V_ESC);
    check(c_err == 1, "ESC ESC is an error");
    restart_rx(); send_bit(0); prev_par = 0; send_null();
    send_char(1, V_ESC); send_char(1, V_EOP);
    check(c_err == 1, "ESC EOP is an error");
    // no characters reported before the first NULL
    restart_rx(); send_char(1, V_FCT); send_char(0, 8'h12);
    check(c_fct == 0 && c_nchar == 0, "nothing before the first NULL");
    // disconnect input
    disconnect = 1; @(negedge clk); disconnect = 0; @(negedge clk);
    check(c_err == 1, "disconnect reported as rx_err");
    // disable in the middle of a packet: EEP
    restart_rx(); send_bit(1); prev_par = 0; send_null();
    fct_sent = 1; @(negedge clk); fct_sent = 0;
    send_char(0, 8'h11); send_char(0, 8'h22);
    enable_rx = 0; @(negedge clk); @(negedge clk);
    check(written.size() == 3 && written[2] == '{ctrl: 1'b1, data: 8'h01}, "EEP on disable mid-packet");
    // disable after a complete packet: nothing added
    restart_rx(); send_bit(1); prev_par = 0; send_null();
    fct_sent = 1; @(negedge clk); fct_sent = 0;
    send_char(0, 8'h33); send_char(1, V_EOP);
    enable_rx = 0; @(negedge clk); @(negedge clk);
    check(written.size() == 2, "no EEP after a complete packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
