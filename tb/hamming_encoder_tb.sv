// hamming_encoder_tb: checks the encoder against the reference model for all
// 128 data words, and against the worked example (1010101 -> 10100101111).
module hamming_encoder_tb;
  import hamming_ref_pkg::*;

  logic [6:0]  data;
  logic [11:1] code;
  int checks = 0, failures = 0;

  hamming_encoder dut (.data, .code);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 7'b1010101;
    #1;
    checks++;
    if (code !== 11'b10100101111) begin
      failures++;
      $display("example: got %b", code);
    end
    for (int d = 0; d < 128; d++) begin
      data = 7'(d);
      #1;
      checks++;
      if (code !== ref_encode(7'(d))) begin
        failures++;
        $display("data %b: got %b expected %b", data, code, ref_encode(7'(d)));
      end
      // every valid code word has a zero syndrome
      checks++;
      if (ref_syndrome(code) != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
