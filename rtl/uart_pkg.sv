// uart_pkg: types and constants shared by the Hamming-protected UART.
//
// The UART carries one 8-bit character per serial frame. Bit 7 of the
// character travels unprotected; bits 6..0 are expanded by an (11,4)-style
// Hamming code into 11 bits with check bits at positions 1, 2, 4 and 8.
// Together these form the 12-bit frame payload: {bit7, code[11:1]}.
//
// The 8-bit control word follows the layout of the mode register of a
// classic programmable UART: D7..D6 stop-bit length, D5 even parity select,
// D4 parity enable, D3..D2 character length, D1..D0 baud rate factor.
// The field encodings below are the ones printed in the control word table.
// The decoded configuration struct (uart_cfg_t) is this design's own form
// of passing those settings to the transmitter and receiver.
package uart_pkg;

  localparam int unsigned DATA_W       = 8;   // character width
  localparam int unsigned INFO_W       = 7;   // Hamming-protected data bits
  localparam int unsigned CHECK_W      = 4;   // Hamming check bits
  localparam int unsigned CODE_W       = 11;  // Hamming code word
  localparam int unsigned FRAME_DATA_W = 12;  // serial payload: {msb, code}

  // Baud rate factor: clock cycles per serial bit.
  typedef enum logic [1:0] {
    BAUD_SYNC = 2'b00,
    BAUD_X1   = 2'b01,
    BAUD_X16  = 2'b10,
    BAUD_X64  = 2'b11
  } baud_factor_e;

  typedef enum logic [1:0] {
    CHAR_5 = 2'b00,
    CHAR_6 = 2'b01,
    CHAR_7 = 2'b10,
    CHAR_8 = 2'b11
  } char_len_e;

  typedef enum logic [1:0] {
    STOP_INHIBIT = 2'b00,
    STOP_1       = 2'b01,
    STOP_1_5     = 2'b10,
    STOP_2       = 2'b11
  } stop_len_e;

  // Raw control word, D7 first.
  typedef struct packed {
    stop_len_e    stop;   // D7..D6
    logic         ep;     // D5: 1 = even parity, 0 = odd parity
    logic         pen;    // D4: parity enable
    char_len_e    len;    // D3..D2
    baud_factor_e baud;   // D1..D0
  } ctrl_word_t;

  // Decoded settings used by the serial sections.
  typedef struct packed {
    logic [6:0] clks_per_bit;  // 1, 16 or 64
    logic [7:0] stop_clks;     // length of the stop period in clock cycles
    logic       parity_en;
    logic       parity_odd;
    logic       tx_inhibit;    // stop-bit code 00: transmitter held
    logic [3:0] char_bits;     // 5..8 meaningful character bits
  } uart_cfg_t;

  // Two stop bits, no parity, 8-bit characters, one clock per bit.
  localparam logic [7:0] CTRL_DEFAULT = 8'hCD;

endpackage
