// bch_codec_top: complete encode - transfer - parallel decode path.
//
// A 16-bit message accepted on in_valid/in_ready is encoded into a 22-bit
// code word (bch_encoder) and loaded into the transmit shift register. The
// word then crosses a one-bit serial line, MSB first, into the receive shift
// register; the line passes through an XOR with chan_flip, which models the
// noisy channel: driving chan_flip high in a shift cycle flips the bit on
// the line in that cycle. Once all 22 bits have arrived, the parallel
// decoder corrects the word in one combinational step and the result is
// registered on the out_* ports with a one-cycle out_valid pulse.
//
// Timing (one clock, active-low synchronous reset):
//   edge 0        in_valid && in_ready: word accepted, encoded, loaded
//   cycles 1..22  shifting; during the k-th of these cycles (k = 1..22)
//                 the line carries code word bit 22-k, i.e. bit 21 first,
//                 and shift_active is high
//   edge 23       decoder outputs registered; out_valid is high in the
//                 following cycle and in_ready returns
// One word is therefore transferred every 24 cycles, 23 cycles of latency
// from acceptance to out_valid. Results stay on out_* until the next word.
//
// The chain encoder -> shift register -> parity check equations ->
// correction follows the document's block diagram description. The serial
// line, the handshake and the sequencing are this design's own choices.
module bch_codec_top
  import bch_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // message input
  input  logic      in_valid,
  output logic      in_ready,
  input  message_t  in_message,
  // channel error injection and observation
  input  logic      chan_flip,
  output logic      shift_active,
  output logic      line_bit,
  // decoded result
  output logic      out_valid,
  output message_t  out_message,
  output codeword_t out_rx_word,
  output syndrome_t out_syndrome,
  output status_e   out_status,
  output location_t out_err_loc,
  output logic      out_loc_valid
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_DECODE} state_e;

  state_e    state;
  location_t bit_cnt;

  parity_t   enc_parity;
  codeword_t enc_word;
  codeword_t tx_q, rx_q;
  logic      tx_out, rx_out;
  logic      accept;

  message_t  dec_message;
  codeword_t dec_corrected;
  syndrome_t dec_syndrome;
  location_t dec_err_loc;
  logic      dec_loc_valid;
  logic      dec_err_detected;
  status_e   dec_status;

  assign in_ready     = (state == S_IDLE);
  assign accept       = in_valid && in_ready;
  assign shift_active = (state == S_SHIFT);
  assign line_bit     = tx_out ^ (chan_flip && shift_active);

  bch_encoder u_enc (
    .message (in_message),
    .parity  (enc_parity),
    .codeword(enc_word)
  );

  bch_shift_reg #(.W(N)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (accept),
    .load_data (enc_word),
    .shift     (shift_active),
    .serial_in (1'b0),
    .serial_out(tx_out),
    .q         (tx_q)
  );

  bch_shift_reg #(.W(N)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (1'b0),
    .load_data ('0),
    .shift     (shift_active),
    .serial_in (line_bit),
    .serial_out(rx_out),
    .q         (rx_q)
  );

  bch_parallel_decoder u_dec (
    .rx_word     (rx_q),
    .dec_message (dec_message),
    .corrected   (dec_corrected),
    .syndrome    (dec_syndrome),
    .err_loc     (dec_err_loc),
    .loc_valid   (dec_loc_valid),
    .err_detected(dec_err_detected),
    .status      (dec_status)
  );

  // Sequencer: idle -> 22 shift cycles -> one decode/register cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      bit_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          state   <= S_SHIFT;
          bit_cnt <= '0;
        end
        S_SHIFT: begin
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == location_t'(N - 1)) state <= S_DECODE;
        end
        S_DECODE: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // Result register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_message   <= '0;
      out_rx_word   <= '0;
      out_syndrome  <= '0;
      out_status    <= ST_NO_ERROR;
      out_err_loc   <= '0;
      out_loc_valid <= 1'b0;
    end else begin
      out_valid <= (state == S_DECODE);
      if (state == S_DECODE) begin
        out_message   <= dec_message;
        out_rx_word   <= rx_q;
        out_syndrome  <= dec_syndrome;
        out_status    <= dec_status;
        out_err_loc   <= dec_err_loc;
        out_loc_valid <= dec_loc_valid;
      end
    end
  end

  // The full corrected word, the detector's plain error flag and the shift
  // registers' other taps are not brought out: the status and the corrected
  // message carry the same information at the ports.
  logic unused_ok;
  assign unused_ok = ^{dec_corrected, dec_err_detected, tx_q, rx_out, enc_parity};

  // Protocol rules.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |=> !out_valid);
  a_no_accept_busy: assert property (@(posedge clk) disable iff (!rst_n)
    shift_active |-> !in_ready);
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    shift_active |-> (bit_cnt < location_t'(N)));

endmodule
