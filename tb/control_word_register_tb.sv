// control_word_register_tb: checks the reset value, that a write loads the
// register and that without a write it holds, and the decoding of all 256
// control words against the control word table (baud factor, character
// length, parity, stop bits).
module control_word_register_tb;
  import uart_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, wr = 1'b0;
  logic [7:0] din = '0;
  ctrl_word_t q;
  uart_cfg_t  cfg;
  int checks = 0, failures = 0;

  control_word_register dut (.clk, .rst_n, .wr, .din, .q, .cfg);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what, input int v);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s for word %02h: q=%02h cfg=%p", what, v, q, cfg);
    end
  endtask

  initial begin
    int f, stop_expected;
    @(posedge clk);
    #1;
    check(q == 8'hCD, "reset value", 8'hCD);
    @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 256; v++) begin
      din = 8'(v);
      wr  = 1'b1;
      @(negedge clk);
      wr  = 1'b0;
      din = ~8'(v);              // not written: must be ignored
      @(negedge clk);
      check(q == 8'(v), "load/hold", v);
      case (v & 3)
        0, 1: f = 1;
        2:    f = 16;
        default: f = 64;
      endcase
      check(int'(cfg.clks_per_bit) == f, "baud factor", v);
      check(int'(cfg.char_bits) == 5 + ((v >> 2) & 3), "char length", v);
      check(cfg.parity_en == ((v >> 4) & 1), "parity enable", v);
      check(cfg.parity_odd == !((v >> 5) & 1), "parity type", v);
      case ((v >> 6) & 3)
        1: stop_expected = f;
        2: stop_expected = (3 * f + 1) / 2;
        default: stop_expected = 2 * f;
      endcase
      check(int'(cfg.stop_clks) == stop_expected, "stop length", v);
      check(cfg.tx_inhibit == (((v >> 6) & 3) == 0), "inhibit", v);
    end
    // asynchronous reset returns the default
    rst_n = 1'b0;
    #1;
    check(q == 8'hCD, "reset again", 8'hCD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
