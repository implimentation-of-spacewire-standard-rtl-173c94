// spw_time_if: time distribution interface.
//
// Keeps the local copy of the SpaceWire time: a 6-bit time counter and the
// two control flags.
//   - Time master: a `host_tick` pulse increments the counter (modulo 64)
//     and asks the transmitter to send the new value as a time-code
//     (link_tick_in, link_time_in, link_flags_in).
//   - Time slave: a time-code from the receiver (link_tick_out) updates the
//     counter. If its value is the local counter plus one the code is in
//     sequence and `host_tick_out` pulses; otherwise the counter is still
//     loaded but no tick is given and `time_err` pulses.
// The document only says this block maintains and distributes the time
// information of the standard; the in-sequence rule is the standard's.
// Timing: every output is registered, one cycle after its cause.
module spw_time_if (
  input  logic       clk,
  input  logic       rst,
  // host side
  input  logic       host_tick,
  input  logic [1:0] host_flags,
  output logic       host_tick_out,
  output logic [5:0] host_time,
  output logic [1:0] host_flags_out,
  output logic       time_err,
  // link side
  output logic       link_tick_in,
  output logic [5:0] link_time_in,
  output logic [1:0] link_flags_in,
  input  logic       link_tick_out,
  input  logic [5:0] link_time_out,
  input  logic [1:0] link_flags_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      host_time      <= '0;
      host_flags_out <= '0;
      host_tick_out  <= 1'b0;
      time_err       <= 1'b0;
      link_tick_in   <= 1'b0;
      link_time_in   <= '0;
      link_flags_in  <= '0;
    end else begin
      host_tick_out <= 1'b0;
      time_err      <= 1'b0;
      link_tick_in  <= 1'b0;
      if (host_tick) begin
        host_time     <= host_time + 6'd1;
        link_tick_in  <= 1'b1;
        link_time_in  <= host_time + 6'd1;
        link_flags_in <= host_flags;
      end else if (link_tick_out) begin
        host_time      <= link_time_out;
        host_flags_out <= link_flags_out;
        if (link_time_out == host_time + 6'd1) host_tick_out <= 1'b1;
        else                                   time_err      <= 1'b1;
      end
    end
  end

endmodule
