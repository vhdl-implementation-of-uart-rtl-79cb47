// hamming_decoder_tb: for every data word, checks the decoder on the clean
// code word, on all 11 single-bit errors (syndrome = position, data and code
// corrected) and on all 55 double-bit errors (error always flagged), plus the
// worked example 10000101111 -> position 9 -> 10100101111.
module hamming_decoder_tb;
  import hamming_ref_pkg::*;

  logic [11:1] code_in, code_out;
  logic [6:0]  data;
  logic [3:0]  syndrome;
  logic        error, uncorrectable;
  int checks = 0, failures = 0;

  hamming_decoder dut (.code_in, .data, .code_out, .syndrome, .error, .uncorrectable);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: in=%b data=%b syn=%0d err=%b unc=%b", what, code_in, data,
               syndrome, error, uncorrectable);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_in = 11'b10000101111;
    #1;
    check(syndrome == 4'd9, "example syndrome");
    check(code_out == 11'b10100101111, "example corrected");
    check(data == 7'b1010101, "example data");

    for (int d = 0; d < 128; d++) begin
      logic [11:1] c;
      c = ref_encode(7'(d));
      code_in = c;
      #1;
      check(data == 7'(d) && !error && !uncorrectable && syndrome == 0 && code_out == c,
            "clean");
      for (int p = 1; p <= 11; p++) begin
        code_in = c;
        code_in[p] = !c[p];
        #1;
        check(data == 7'(d) && error && !uncorrectable && syndrome == 4'(p) && code_out == c,
              "single");
        for (int q = p + 1; q <= 11; q++) begin
          code_in = c;
          code_in[p] = !c[p];
          code_in[q] = !c[q];
          #1;
          check(error && syndrome == 4'(p ^ q) && uncorrectable == ((p ^ q) > 11), "double");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
