// control_word_register: the UART's 8-bit programmable mode register.
//
// A write (wr high on a rising clock edge) loads din; the register holds its
// value until the next write and returns to RESET_VALUE on an active-low
// asynchronous reset. The stored word is decoded combinationally into the
// settings used by the transmitter and receiver:
//   D1..D0 baud rate factor : 01 -> 1x, 10 -> 16x, 11 -> 64x clocks per bit
//   D3..D2 character length : 00 -> 5, 01 -> 6, 10 -> 7, 11 -> 8 bits
//   D4     parity enable, D5 parity type (1 even, 0 odd)
//   D7..D6 stop bits        : 01 -> 1, 10 -> 1.5, 11 -> 2, 00 -> inhibit
// The field layout and encodings are those of the printed control word
// table. Choices of this design: code 00 of the baud field (synchronous
// mode) is run as 1x bit timing, since synchronous framing is not defined
// here; 1.5 stop bits are rounded up to whole clocks (2 clocks at 1x);
// "inhibit" holds the transmitter idle. The reset value (two stop bits,
// no parity, 8-bit characters, 1x) matches the frame format of this UART.
module control_word_register
  import uart_pkg::*;
#(
  parameter logic [7:0] RESET_VALUE = CTRL_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] din,
  output ctrl_word_t q,
  output uart_cfg_t  cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= ctrl_word_t'(RESET_VALUE);
    else if (wr) q <= ctrl_word_t'(din);
  end

  always_comb begin
    logic [7:0] f;
    unique case (q.baud)
      BAUD_X16: f = 8'd16;
      BAUD_X64: f = 8'd64;
      default:  f = 8'd1;     // BAUD_X1 and BAUD_SYNC
    endcase
    cfg.clks_per_bit = f[6:0];

    unique case (q.stop)
      STOP_1:   cfg.stop_clks = f;
      STOP_1_5: cfg.stop_clks = f + ((f + 8'd1) >> 1);   // ceil(1.5 * f)
      default:  cfg.stop_clks = f << 1;                   // STOP_2, STOP_INHIBIT
    endcase
    cfg.tx_inhibit = (q.stop == STOP_INHIBIT);

    cfg.parity_en  = q.pen;
    cfg.parity_odd = !q.ep;
    cfg.char_bits  = 4'd5 + {2'b00, q.len};
  end

endmodule
