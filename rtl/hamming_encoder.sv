// hamming_encoder: (11,4) Hamming encoder for 7 data bits.
//
// The 11-bit code word is numbered 1..11 (code[1] is position 1). Data bits
// d0..d6 occupy positions 3, 5, 6, 7, 9, 10, 11 and the check bits occupy the
// power-of-two positions:
//   r1 (pos 1) covers positions 1, 3, 5, 7, 9, 11
//   r2 (pos 2) covers positions 2, 3, 6, 7, 10, 11
//   r4 (pos 4) covers positions 4, 5, 6, 7
//   r8 (pos 8) covers positions 8, 9, 10, 11
// Each check bit makes its group even. Example: data 1010101 (d6..d0)
// encodes to 10100101111 (positions 11..1). Placement, coverage and the
// example follow the code definition this UART is built on; even parity is
// what that example implies. Purely combinational, no clock.
module hamming_encoder
  import uart_pkg::*;
(
  input  logic [INFO_W-1:0] data,   // d6..d0
  output logic [CODE_W:1]   code    // positions 11..1
);

  always_comb begin
    code     = '0;
    code[3]  = data[0];
    code[5]  = data[1];
    code[6]  = data[2];
    code[7]  = data[3];
    code[9]  = data[4];
    code[10] = data[5];
    code[11] = data[6];
    code[1]  = code[3] ^ code[5] ^ code[7] ^ code[9] ^ code[11];
    code[2]  = code[3] ^ code[6] ^ code[7] ^ code[10] ^ code[11];
    code[4]  = code[5] ^ code[6] ^ code[7];
    code[8]  = code[9] ^ code[10] ^ code[11];
  end

endmodule
