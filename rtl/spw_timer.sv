// spw_timer: link timeouts of the SpaceWire link interface.
//
// Two timers run from the system clock. A prescaler divides Sys_clk by
// INIT_DIV to a 10 MHz (100 ns) tick, as the document describes with its
// clock-division generic; a tick counter then raises after_6_4 after 64
// ticks (6.4 us) and after_12_8 after 128 ticks (12.8 us). Both stay high
// until `restart`, which the state machine pulses on every state change.
//
// The disconnect timer counts system clocks since the last received bit
// (`bit_seen`) and raises `disconnect` once 850 ns pass without one. It only
// runs while `disc_arm` is high (receiver enabled and a first bit seen), so a
// link that has never received anything does not report a disconnect. The
// 850 ns limit is rounded up to whole system clocks.
//
// Timing: outputs are registered; after_6_4 rises 64*INIT_DIV clocks after
// the restart pulse, disconnect rises DISC_CYCLES clocks after the last bit.
module spw_timer #(
  parameter int unsigned INIT_DIV = 20   // Sys_clk cycles per 100 ns
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,
  input  logic bit_seen,
  input  logic disc_arm,
  output logic after_6_4,
  output logic after_12_8,
  output logic disconnect
);

  localparam int unsigned DISC_CYCLES = (85 * INIT_DIV + 9) / 10;
  localparam int unsigned PW = (INIT_DIV > 1) ? $clog2(INIT_DIV) : 1;
  localparam int unsigned DW = $clog2(DISC_CYCLES + 1);

  logic [PW-1:0] pre;
  logic [7:0]    ticks;
  logic [DW-1:0] disc_cnt;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      pre   <= '0;
      ticks <= '0;
    end else if (32'(pre) == INIT_DIV - 1) begin
      pre <= '0;
      if (ticks != 8'd128) ticks <= ticks + 8'd1;
    end else begin
      pre <= pre + 1'b1;
    end
  end

  assign after_6_4  = (ticks >= 8'd64);
  assign after_12_8 = (ticks == 8'd128);

  always_ff @(posedge clk) begin
    if (rst || !disc_arm || bit_seen) begin
      disc_cnt   <= '0;
      disconnect <= 1'b0;
    end else if (32'(disc_cnt) == DISC_CYCLES - 1) begin
      disconnect <= 1'b1;
    end else begin
      disc_cnt <= disc_cnt + 1'b1;
    end
  end

endmodule
