// uart_hamming_top: UART whose characters survive any single bit error in
// the protected part of the frame, corrected at the receiver without
// retransmission.
//
// Transmit path: an 8-bit character is split into its MSB, which is carried
// unprotected, and its 7 low bits, which hamming_encoder turns into an
// 11-bit code word. The 12-bit payload {msb, code[11:1]} is written into the
// transmitter's hold register and sent as start bit, 12 payload bits
// (code position 1 first, the MSB last), optional parity and stop bits.
// Receive path: uart_rx collects the 12 payload bits into its buffer
// register; hamming_decoder recomputes the check bits, reports the error
// position (syndrome, 0 = no error) and inverts that bit; the corrected 7 bits
// and the separated MSB form the 8-bit output character.
// The control word register sets baud rate factor, parity, stop bits and
// character length for both directions. Characters shorter than 8 bits have
// their unused upper bits cleared before encoding and after decoding; how
// the character length interacts with the fixed 12-bit Hamming payload is
// this design's choice.
//
// Interface and timing: cw_wr loads the control word. tx_wr with tx_ready
// high queues a character; its start bit appears on tx_out two cycles
// later when the transmitter is idle. A frame lasts
// (1 + 12 + parity + stop) bit times. rx_valid pulses one cycle after the
// stop bit's middle reaches the receiver (plus two synchronizer cycles);
// rx_data and the status outputs are then stable until the next rx_valid.
module uart_hamming_top
  import uart_pkg::*;
#(
  parameter logic [7:0] CTRL_RESET = CTRL_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  // control word register
  input  logic              cw_wr,
  input  logic [7:0]        cw_data,
  output logic [7:0]        cw_q,
  // transmit side
  input  logic              tx_wr,
  input  logic [DATA_W-1:0] tx_data,
  output logic              tx_ready,
  output logic              tx_busy,
  output logic              tx_out,
  // receive side
  input  logic              rx_in,
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_err_detected,   // a bit was found in error
  output logic [3:0]        rx_err_pos,        // its position 1..11, 0 = none
  output logic [CODE_W:1]   rx_code,           // corrected code word
  output logic              rx_uncorrectable,  // syndrome points past bit 11
  output logic              rx_parity_err,
  output logic              rx_framing_err
);

  ctrl_word_t cw;
  uart_cfg_t  cfg;

  control_word_register #(.RESET_VALUE(CTRL_RESET)) u_cwr (
    .clk, .rst_n, .wr(cw_wr), .din(cw_data), .q(cw), .cfg
  );
  assign cw_q = cw;

  logic [DATA_W-1:0] char_mask;
  assign char_mask = DATA_W'((9'd1 << cfg.char_bits) - 9'd1);

  // ---- transmit: MSB separation and Hamming encoding -------------------
  logic [DATA_W-1:0]       tx_char;
  logic [CODE_W:1]         tx_code;
  logic [FRAME_DATA_W-1:0] tx_payload;

  assign tx_char = tx_data & char_mask;

  hamming_encoder u_enc (.data(tx_char[INFO_W-1:0]), .code(tx_code));

  assign tx_payload = {tx_char[DATA_W-1], tx_code};

  uart_tx u_tx (
    .clk, .rst_n, .cfg,
    .thr_wr   (tx_wr),
    .thr_data (tx_payload),
    .thr_empty(tx_ready),
    .busy     (tx_busy),
    .tx_out
  );

  // ---- receive: MSB separation and Hamming decoding --------------------
  logic [FRAME_DATA_W-1:0] rx_payload;
  logic [INFO_W-1:0]       rx_info;

  uart_rx u_rx (
    .clk, .rst_n, .cfg, .rx_in,
    .rbr        (rx_payload),
    .rx_valid,
    .parity_err (rx_parity_err),
    .framing_err(rx_framing_err)
  );

  hamming_decoder u_dec (
    .code_in      (rx_payload[CODE_W-1:0]),
    .data         (rx_info),
    .code_out     (rx_code),
    .syndrome     (rx_err_pos),
    .error        (rx_err_detected),
    .uncorrectable(rx_uncorrectable)
  );

  assign rx_data = {rx_payload[FRAME_DATA_W-1], rx_info} & char_mask;

endmodule
