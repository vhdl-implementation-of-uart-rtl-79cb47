// hamming_decoder: (11,4) Hamming decoder with single-error correction.
//
// The four parity groups of the code (see hamming_encoder) are rechecked on
// the received word. The syndrome {c8, c4, c2, c1} is the binary number of
// the bit position in error, or 0 when every group is even. For a syndrome
// of 1..11 the addressed bit is inverted and the 7 data bits are taken from
// positions 3, 5, 6, 7, 9, 10, 11 of the corrected word. Example: received
// 10000101111 gives syndrome 1001 (position 9) and is corrected to
// 10100101111. A syndrome of 12..15 points outside the word; it can only come
// from several errors, so this design then leaves the word unchanged and
// raises uncorrectable (the behaviour for that case is this design's own).
// Two errors whose syndrome lands on 1..11 are miscorrected: the code is a
// distance-3 code and cannot tell them from one error. Combinational.
module hamming_decoder
  import uart_pkg::*;
(
  input  logic [CODE_W:1]   code_in,        // received positions 11..1
  output logic [INFO_W-1:0] data,           // corrected d6..d0
  output logic [CODE_W:1]   code_out,       // corrected code word
  output logic [CHECK_W-1:0] syndrome,      // error bit position, 0 = none
  output logic              error,          // syndrome != 0
  output logic              uncorrectable   // syndrome > 11
);

  always_comb begin
    syndrome[0] = code_in[1] ^ code_in[3] ^ code_in[5] ^ code_in[7] ^ code_in[9] ^ code_in[11];
    syndrome[1] = code_in[2] ^ code_in[3] ^ code_in[6] ^ code_in[7] ^ code_in[10] ^ code_in[11];
    syndrome[2] = code_in[4] ^ code_in[5] ^ code_in[6] ^ code_in[7];
    syndrome[3] = code_in[8] ^ code_in[9] ^ code_in[10] ^ code_in[11];
    error         = (syndrome != '0);
    uncorrectable = (syndrome > 4'(CODE_W));

    code_out = code_in;
    for (int p = 1; p <= CODE_W; p++)
      if (syndrome == 4'(p)) code_out[p] = !code_in[p];

    data = {code_out[11], code_out[10], code_out[9], code_out[7],
            code_out[6], code_out[5], code_out[3]};
  end

endmodule
