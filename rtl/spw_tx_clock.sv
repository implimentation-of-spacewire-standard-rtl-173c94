// spw_tx_clock: transmit bit-rate generator.
//
// The transmitter runs on Sys_clk and shifts one bit per `bit_en` pulse, so
// this block is a programmable clock-enable divider rather than a second
// clock. Until the link reaches Run (`run` low) it divides by INIT_DIV, which
// gives the 10 Mb/s start-up rate of the standard. In Run, the 3-bit `speed`
// input selects one of eight dividers from SPEED_DIV; the document gives
// eight speeds but not their values, so the defaults (for a 200 MHz Sys_clk)
// are this design's choice: 10, 12.5, 20, 25, 40, 50, 100 and 200 Mb/s.
//
// With DDR set, the line goes through a DDR output cell and the divider
// counts half-clock periods: bit_en marks a bit that starts in the first half
// of the next clock and bit_en2 one that starts in the second half. The
// start-up divider is doubled to keep 10 Mb/s, and every Run rate doubles
// (400 Mb/s at 200 MHz with divider 1, where both pulses are high in every
// clock).
//
// Timing: bit_en is a one-cycle pulse every DIV clocks (every DIV half-clocks
// counting both pulses in DDR mode); a new divider takes effect at once.
// bit_en2 stays low without DDR.
module spw_tx_clock #(
  parameter int unsigned INIT_DIV = 20,
  parameter int unsigned SPEED_DIV [8] = '{20, 16, 10, 8, 5, 4, 2, 1},
  parameter bit          DDR = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,
  input  logic [2:0] speed,
  output logic       bit_en,
  output logic       bit_en2
);

  logic [7:0] cnt;
  logic [7:0] div;

  // with a DDR output two bits leave per pulse: start-up needs half the pulses
  localparam int unsigned START_DIV = DDR ? 2 * INIT_DIV : INIT_DIV;

  always_comb div = run ? 8'(SPEED_DIV[speed]) : 8'(START_DIV);

  // half-clock count after the first half of the next clock
  logic [7:0] cnt_h;
  logic       wrap0, wrap1;
  always_comb begin
    wrap0 = (cnt + 8'd1 >= div);
    cnt_h = wrap0 ? 8'd0 : cnt + 8'd1;
    wrap1 = DDR && (cnt_h + 8'd1 >= div);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      bit_en  <= 1'b0;
      bit_en2 <= 1'b0;
    end else begin
      bit_en  <= wrap0;
      bit_en2 <= wrap1;
      if (!DDR)       cnt <= cnt_h;
      else if (wrap1) cnt <= '0;
      else            cnt <= cnt_h + 8'd1;
    end
  end

endmodule
