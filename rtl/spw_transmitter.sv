// spw_transmitter: SpaceWire character transmitter with data-strobe encoding.
//
// On every `bit_en` pulse from the TX clock generator the transmitter puts
// one bit on Dout. When the previous character has been fully sent it picks
// the next one, by priority: a pending time-code, then an FCT, then an N-Char
// from the host, and a NULL when nothing else may be sent. What may be sent
// is set by the state machine (send_nulls, send_fcts, send_nchars,
// send_timecodes), as in the link state diagram.
//
// Each character starts with its parity bit: odd parity over the data bits
// of the previous character, the parity bit itself and the current flag, so
// the parity bit is 1 ^ prev_par ^ flag. Data bits go least significant
// first. Strobe toggles whenever Data does not, so D xor S changes once per
// bit.
//
// Flow control: each received FCT (`got_fct`) adds 8 to the transmit credit
// and each N-Char sent takes 1; N-Chars wait while the credit is 0. A credit
// above 56 raises `credit_error` for one cycle. An FCT is sent while
// `fct_req` is high (the receive buffer has room for 8 more N-Chars); the
// cycle it is started, `fct_sent` pulses.
//
// Host interface: tx_data is taken in the cycle where tx_write and tx_ready
// are both high; tx_ready is only high during the bit_en cycle in which an
// N-Char can start. Time-codes: a tick_in pulse while send_timecodes is high
// latches time_in and ctrl_flags_in and sends them as the next character.
// With enable_tx low the outputs are held low and all state is cleared.
//
// Double data rate (DDR = 1): the line is driven through a DDR output cell,
// so each clock carries two half-clock line values: dout/sout for the half
// after the rising edge and dout2/sout2 for the half after the falling edge.
// bit_en starts a new bit in the first half and bit_en2 in the second half
// (the bit clock counts in half-clock periods), so one clock can carry zero,
// one or two new bits. With DDR = 0, bit_en2 is ignored and dout2/sout2
// repeat dout/sout, which a DDR cell turns into the plain single-rate line.
module spw_transmitter
  import spw_pkg::*;
#(
  parameter bit DDR = 1'b0      // 1: two half-clock line values per clock
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable_tx,
  input  logic       send_nulls,
  input  logic       send_fcts,
  input  logic       send_nchars,
  input  logic       send_timecodes,
  input  logic       bit_en,     // start a bit (first half of the clock in DDR)
  input  logic       bit_en2,    // DDR only: start a bit in the second half
  // host N-Chars
  input  logic       tx_write,
  input  nchar_t     tx_data,
  output logic       tx_ready,
  // time-codes
  input  logic       tick_in,
  input  logic [5:0] time_in,
  input  logic [1:0] ctrl_flags_in,
  // flow control
  input  logic       got_fct,
  input  logic       fct_req,
  output logic       fct_sent,
  output logic       credit_error,
  // line
  output logic       dout,
  output logic       sout,
  output logic       dout2,
  output logic       sout2
);

  typedef enum logic [2:0] {C_NONE, C_TIME, C_FCT, C_NCHAR, C_NULL} pick_t;

  logic [13:0] sh;
  logic [3:0]  bcnt;        // bits of the current character still to send
  logic        prev_par;    // parity of the data bits of the last character
  logic [5:0]  credit;
  logic        tc_pend;
  logic [7:0]  tc_val;

  logic        load;        // a new character may start in this clock
  pick_t       pick;
  logic [13:0] seq;
  logic [3:0]  len;
  logic        next_par;
  logic [1:0]  eop_code;

  assign eop_code = tx_data.data[0] ? CTRL_EEP : CTRL_EOP;

  // A character can start when the previous one has ended: at the first half
  // if nothing is left, or at the second half if at most one bit is left.
  assign load = enable_tx &&
                ((bit_en && bcnt == 4'd0) ||
                 (DDR && bit_en2 && (bcnt == 4'd0 || (bit_en && bcnt == 4'd1))));

  always_comb begin
    if (tc_pend && send_timecodes)                 pick = C_TIME;
    else if (send_fcts && fct_req)                 pick = C_FCT;
    else if (send_nchars && credit != 6'd0 && tx_write) pick = C_NCHAR;
    else if (send_nulls)                           pick = C_NULL;
    else                                           pick = C_NONE;
  end

  assign tx_ready = load && send_nchars && (credit != 6'd0) &&
                    !(tc_pend && send_timecodes) && !(send_fcts && fct_req);

  // Build the character, bit 0 first on the line.
  always_comb begin
    seq      = '0;
    len      = 4'd0;
    next_par = prev_par;
    unique case (pick)
      C_TIME: begin   // ESC, then data character carrying the time-code
        seq      = {tc_val, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1, prev_par};
        len      = 4'd14;
        next_par = ^tc_val;
      end
      C_FCT: begin
        seq      = {10'b0, CTRL_FCT[0], CTRL_FCT[1], 1'b1, prev_par};
        len      = 4'd4;
        next_par = 1'b0;
      end
      C_NCHAR: begin
        if (tx_data.ctrl) begin
          seq      = {10'b0, eop_code[0], eop_code[1], 1'b1, prev_par};
          len      = 4'd4;
          next_par = ^eop_code;
        end else begin
          seq      = {4'b0, tx_data.data, 1'b0, ~prev_par};
          len      = 4'd10;
          next_par = ^tx_data.data;
        end
      end
      C_NULL: begin   // ESC then FCT
        seq      = {6'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b1, prev_par};
        len      = 4'd8;
        next_par = 1'b0;
      end
      default: ;
    endcase
  end

  // Line values for the two halves of the clock. Each half either starts a
  // bit (taken from a new character or from the shift register) or holds the
  // line. The strobe toggles when the data bit equals the previous one. The
  // line at the end of the last clock is dout2/sout2.
  logic        has_char, start_a, start_b, step_a, step_b, bit_a, bit_b;
  logic        d_a, s_a, d_b, s_b;
  logic [13:0] sh_a, sh_b;
  logic [3:0]  bcnt_a, bcnt_b;
  always_comb begin
    has_char = (pick != C_NONE);
    start_a  = bit_en && bcnt == 4'd0 && has_char;
    step_a   = bit_en && (bcnt != 4'd0 || has_char);
    bit_a    = start_a ? seq[0] : sh[0];
    sh_a     = start_a ? seq >> 1 : (step_a ? sh >> 1 : sh);
    bcnt_a   = start_a ? len - 4'd1 : (step_a ? bcnt - 4'd1 : bcnt);
    d_a      = step_a ? bit_a : dout2;
    s_a      = step_a ? (sout2 ^ ~(bit_a ^ dout2)) : sout2;

    start_b  = DDR && bit_en2 && bcnt_a == 4'd0 && has_char;
    step_b   = DDR && bit_en2 && (bcnt_a != 4'd0 || has_char);
    bit_b    = start_b ? seq[0] : sh_a[0];
    sh_b     = start_b ? seq >> 1 : (step_b ? sh_a >> 1 : sh_a);
    bcnt_b   = start_b ? len - 4'd1 : (step_b ? bcnt_a - 4'd1 : bcnt_a);
    d_b      = step_b ? bit_b : d_a;
    s_b      = step_b ? (s_a ^ ~(bit_b ^ d_a)) : s_a;
  end

  logic nchar_taken;
  assign nchar_taken = load && (pick == C_NCHAR);

  always_ff @(posedge clk) begin
    if (rst || !enable_tx) begin
      sh           <= '0;
      bcnt         <= '0;
      prev_par     <= 1'b0;
      credit       <= '0;
      tc_pend      <= 1'b0;
      tc_val       <= '0;
      dout         <= 1'b0;
      sout         <= 1'b0;
      dout2        <= 1'b0;
      sout2        <= 1'b0;
      fct_sent     <= 1'b0;
      credit_error <= 1'b0;
    end else begin
      fct_sent     <= 1'b0;
      credit_error <= 1'b0;

      // credit bookkeeping
      if (got_fct && (7'(credit) + 7'd8 - 7'(nchar_taken) > 7'(MAX_CREDIT))) begin
        credit_error <= 1'b1;
      end else begin
        credit <= credit + (got_fct ? 6'd8 : 6'd0) - (nchar_taken ? 6'd1 : 6'd0);
      end

      if (tick_in && send_timecodes) begin
        tc_pend <= 1'b1;
        tc_val  <= {ctrl_flags_in, time_in};
      end

      if (load && has_char) begin
        prev_par <= next_par;
        if (pick == C_TIME && !tick_in) tc_pend  <= 1'b0;
        if (pick == C_FCT)              fct_sent <= 1'b1;
      end
      dout  <= d_a;
      sout  <= s_a;
      dout2 <= d_b;
      sout2 <= s_b;
      sh    <= sh_b;
      bcnt  <= bcnt_b;
    end
  end

endmodule
