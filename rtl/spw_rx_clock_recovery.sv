// spw_rx_clock_recovery: recovers the receive clock and bits from D and S.
//
// Data-strobe encoding changes exactly one of D and S per bit, so D xor S
// toggles once per bit: that is the recovered receive clock, brought out on
// `rx_clock` as the document's figure shows. The receiver of this design
// does not run on that clock: D and S are synchronised into the Sys_clk
// domain with two flip-flops each, and every change of the synchronised
// D xor S yields a one-cycle `bit_valid` pulse with the bit in `bit_data`.
// This keeps the codec on one clock domain; it requires the received bit
// rate to stay below the Sys_clk frequency, which matches the document's
// statement that the receive clock must be slower than the system clock.
//
// Timing: bit_valid follows a change on the lines by three clocks.
// `enable` low holds the block in reset so that stale line levels are not
// reported as bits when the receiver is enabled.
module spw_rx_clock_recovery (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic din,
  input  logic sin,
  output logic rx_clock,
  output logic bit_valid,
  output logic bit_data
);

  logic [1:0] d_sync, s_sync;
  logic       e_prev;
  logic       e_now;

  assign rx_clock = din ^ sin;
  assign e_now    = d_sync[1] ^ s_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      d_sync <= '0;
      s_sync <= '0;
    end else begin
      d_sync <= {d_sync[0], din};
      s_sync <= {s_sync[0], sin};
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      e_prev    <= e_now;
      bit_valid <= 1'b0;
      bit_data  <= 1'b0;
    end else begin
      e_prev    <= e_now;
      bit_valid <= (e_now != e_prev);
      bit_data  <= d_sync[1];
    end
  end

endmodule
