// spw_ddr_out: behavioural model of a device-specific double-data-rate
// output register, as used for the DDR transmit option.
//
// This is a behavioural model, not synthesizable logic: on an FPGA the
// vendor's DDR output primitive takes its place (same four ports). On each
// rising clock edge it takes both inputs; `d_rise` is driven onto `q` for
// the high half of the clock period and `d_fall` for the low half. The
// output thus follows its inputs by one clock and changes on both edges.
module spw_ddr_out (
  input  logic clk,
  input  logic d_rise,
  input  logic d_fall,
  output logic q
);

  logic r, f;

  always_ff @(posedge clk) begin
    r <= d_rise;
    f <= d_fall;
  end

  // rising half: r, falling half: f
  always_comb q = clk ? r : f;

endmodule
