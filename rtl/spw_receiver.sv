// spw_receiver: SpaceWire character decoder and receive-side error checks.
//
// Bits arrive from the clock recovery as one-cycle `bit_valid` pulses. After
// the receiver is enabled it first hunts for a NULL: it compares the last
// seven bits with the fixed part of a NULL (flag and code of ESC, then the
// parity, flag and code of FCT), which does not depend on the unknown parity
// that precedes it. The first match gives character alignment and raises
// got_null. From then on each character is assembled from its parity bit,
// its flag and its two or eight data bits, and checked for odd parity over
// the previous character's data bits, the parity bit and the flag.
//
// Decoded characters: FCT (got_fct), EOP/EEP/data (got_nchar, written to the
// receive buffer), ESC+FCT = NULL (got_null) and ESC+data = time-code
// (got_timecode, with time_out/ctrl_flags_out and a tick_out pulse). ESC
// followed by anything else is an escape error. `rx_err` reports parity,
// escape and disconnect errors; `credit_error` reports an N-Char received
// while no credit was outstanding (or the buffer was full).
//
// Credit: every FCT the local transmitter sends (`fct_sent`) allows the far
// end 8 more N-Chars; `rx_credit` is the number still allowed. The 850 ns
// disconnect timeout is counted in the timer block and enters through
// `disconnect`; `got_bit` (high after the first bit) arms it.
//
// Packet ends: when the receiver is disabled (the state machine leaves the
// connected states after an error) in the middle of a packet, it writes an
// EEP into the buffer so the host sees the packet as terminated by an error.
//
// Timing: all outputs are registered and pulse for one cycle, the cycle
// after the last bit of a character. enable_rx low clears all state.
module spw_receiver
  import spw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable_rx,
  input  logic       bit_valid,
  input  logic       bit_data,
  input  logic       disconnect,
  input  logic       fct_sent,
  input  logic       buffer_ready,
  output logic       got_bit,
  output logic       got_null,
  output logic       got_fct,
  output logic       got_nchar,
  output logic       got_timecode,
  output logic       rx_err,
  output logic       credit_error,
  output logic       buffer_write,
  output nchar_t     rx_data,
  output logic       tick_out,
  output logic [5:0] time_out,
  output logic [1:0] ctrl_flags_out,
  output logic [5:0] rx_credit
);

  localparam logic [6:0] NULL_TAIL = 7'b1110100;  // oldest bit first

  logic       synced;
  logic [5:0] hist;
  logic [3:0] cnt;
  logic [8:0] cbuf;       // bits of the character being received
  logic       prev_par;
  logic       esc_pend;
  logic       in_packet;  // data written since the last EOP/EEP

  // completion of a character with the current bit
  logic       is_ctrl, done, par_ok;
  logic [1:0] code;
  logic [7:0] data;

  assign is_ctrl = cbuf[1];
  assign done    = synced && bit_valid &&
                   ((cnt == 4'd3 && cbuf[1]) || (cnt == 4'd9 && !cbuf[1]));
  assign par_ok  = prev_par ^ cbuf[0] ^ cbuf[1];
  assign code    = {cbuf[2], bit_data};
  assign data    = {bit_data, cbuf[8:2]};

  always_ff @(posedge clk) begin
    if (rst || !enable_rx) begin
      in_packet      <= 1'b0;
      synced         <= 1'b0;
      hist           <= '0;
      cnt            <= '0;
      cbuf           <= '0;
      prev_par       <= 1'b0;
      esc_pend       <= 1'b0;
      got_bit        <= 1'b0;
      got_null       <= 1'b0;
      got_fct        <= 1'b0;
      got_nchar      <= 1'b0;
      got_timecode   <= 1'b0;
      rx_err         <= 1'b0;
      credit_error   <= 1'b0;
      // A link error ends a partly received packet with an EEP.
      buffer_write   <= !rst && in_packet && buffer_ready;
      rx_data        <= '{ctrl: 1'b1, data: 8'h01};
      tick_out       <= 1'b0;
      time_out       <= '0;
      ctrl_flags_out <= '0;
      rx_credit      <= '0;
    end else begin
      got_null     <= 1'b0;
      got_fct      <= 1'b0;
      got_nchar    <= 1'b0;
      got_timecode <= 1'b0;
      rx_err       <= disconnect;
      credit_error <= 1'b0;
      buffer_write <= 1'b0;
      tick_out     <= 1'b0;

      if (fct_sent) rx_credit <= rx_credit + 6'(FCT_CREDIT);

      if (bit_valid) got_bit <= 1'b1;

      if (bit_valid && !synced) begin
        hist <= {hist[4:0], bit_data};
        if ({hist[5:0], bit_data} == NULL_TAIL) begin
          synced   <= 1'b1;
          got_null <= 1'b1;
          cnt      <= '0;
          prev_par <= 1'b0;
        end
      end else if (bit_valid && !done) begin
        cbuf[cnt] <= bit_data;
        cnt       <= cnt + 4'd1;
      end else if (done) begin
        cnt <= '0;
        if (!par_ok) begin
          rx_err <= 1'b1;
        end else if (is_ctrl) begin
          prev_par <= ^code;
          if (esc_pend) begin
            esc_pend <= 1'b0;
            if (code == CTRL_FCT) got_null <= 1'b1;
            else                  rx_err   <= 1'b1;   // escape error
          end else begin
            unique case (code)
              CTRL_FCT: got_fct  <= 1'b1;
              CTRL_ESC: esc_pend <= 1'b1;
              default: begin  // EOP or EEP
                got_nchar <= 1'b1;
                rx_data   <= '{ctrl: 1'b1, data: {7'b0, code == CTRL_EEP}};
                if (rx_credit == 6'd0 || !buffer_ready) begin
                  credit_error <= 1'b1;
                end else begin
                  buffer_write <= 1'b1;
                  in_packet    <= 1'b0;
                  rx_credit    <= rx_credit - 6'd1 + (fct_sent ? 6'(FCT_CREDIT) : 6'd0);
                end
              end
            endcase
          end
        end else begin
          prev_par <= ^data;
          if (esc_pend) begin
            esc_pend       <= 1'b0;
            got_timecode   <= 1'b1;
            tick_out       <= 1'b1;
            time_out       <= data[5:0];
            ctrl_flags_out <= data[7:6];
          end else begin
            got_nchar <= 1'b1;
            rx_data   <= '{ctrl: 1'b0, data: data};
            if (rx_credit == 6'd0 || !buffer_ready) begin
              credit_error <= 1'b1;
            end else begin
              buffer_write <= 1'b1;
              in_packet    <= 1'b1;
              rx_credit    <= rx_credit - 6'd1 + (fct_sent ? 6'(FCT_CREDIT) : 6'd0);
            end
          end
        end
      end
    end
  end

endmodule
