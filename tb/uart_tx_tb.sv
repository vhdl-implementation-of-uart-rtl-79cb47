// uart_tx_tb: drives the transmitter with every baud factor (1x, 16x, 64x),
// parity setting (none, odd, even) and stop length (1, 1.5, 2 bits). For
// each, three random payloads are queued back to back and tx_out is compared
// cycle by cycle with the expected line: start bit two cycles after the
// first write, 12 payload bits LSB first, parity, stop period, and the next
// frame immediately after. Also checks that an inhibited transmitter holds
// its word and the line idle.
module uart_tx_tb;
  import uart_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  uart_cfg_t   cfg;
  logic        thr_wr = 1'b0;
  logic [11:0] thr_data = '0;
  logic        thr_empty, busy, tx_out;
  int checks = 0, failures = 0;

  uart_tx dut (.clk, .rst_n, .cfg, .thr_wr, .thr_data, .thr_empty, .busy, .tx_out);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected line level, one entry per clock cycle
  bit exp_q[$];

  task automatic add_frame(input logic [11:0] w, input int f, input int pmode, input int stop_clks);
    repeat (f) exp_q.push_back(1'b0);
    for (int i = 0; i < 12; i++) repeat (f) exp_q.push_back(w[i]);
    if (pmode != 0) begin
      bit p;
      p = ^w;
      if (pmode == 1) p = !p;    // odd parity: total count of ones is odd
      repeat (f) exp_q.push_back(p);
    end
    repeat (stop_clks) exp_q.push_back(1'b1);
  endtask

  task automatic run_config(input int f, input int pmode, input int stop_code);
    logic [11:0] words[3];
    int stop_clks;
    int total;
    stop_clks = (stop_code == 1) ? f : (stop_code == 2) ? (3 * f + 1) / 2 : 2 * f;
    cfg = '0;
    cfg.clks_per_bit = 7'(f);
    cfg.stop_clks    = 8'(stop_clks);
    cfg.parity_en    = (pmode != 0);
    cfg.parity_odd   = (pmode == 1);
    cfg.char_bits    = 4'd8;
    exp_q.delete();
    foreach (words[i]) begin
      words[i] = 12'($urandom);
      add_frame(words[i], f, pmode, stop_clks);
    end
    repeat (3) exp_q.push_back(1'b1);
    total = exp_q.size();
    fork
      begin : writer
        foreach (words[i]) begin
          @(negedge clk);
          while (!thr_empty) @(negedge clk);
          thr_wr   = 1'b1;
          thr_data = words[i];
          @(negedge clk);
          thr_wr   = 1'b0;
        end
      end
      begin : line_check
        int errs;
        errs = 0;
        // first write is driven at the next falling edge, sampled at the
        // rising edge after it; the start bit follows one edge later
        @(negedge clk);
        @(posedge clk);
        @(posedge clk);
        for (int c = 0; c < total; c++) begin
          @(negedge clk);
          if (tx_out !== exp_q[c]) begin
            if (errs == 0) $display("first mismatch at cycle %0d of %0d", c, total);
            errs++;
          end
        end
        checks++;
        if (errs != 0) begin
          failures++;
          $display("FAIL f=%0d parity=%0d stop=%0d: %0d wrong cycles", f, pmode, stop_code, errs);
        end
        checks++;
        if (busy || !thr_empty) begin
          failures++;
          $display("FAIL not idle after frames");
        end
      end
    join
  endtask

  initial begin
    cfg = '0;
    cfg.clks_per_bit = 7'd1;
    cfg.stop_clks    = 8'd2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (tx_out !== 1'b1 || !thr_empty || busy) failures++;
    foreach (int_f[i])
      for (int pm = 0; pm < 3; pm++)
        for (int sc = 1; sc <= 3; sc++)
          run_config(int_f[i], pm, sc);

    // inhibited transmitter keeps its word and the line high
    cfg.clks_per_bit = 7'd1;
    cfg.stop_clks    = 8'd2;
    cfg.parity_en    = 1'b0;
    cfg.tx_inhibit   = 1'b1;
    @(negedge clk);
    thr_wr = 1'b1;
    thr_data = 12'h0F0;
    @(negedge clk);
    thr_wr = 1'b0;
    begin
      int bad;
      bad = 0;
      repeat (50) begin
        @(negedge clk);
        if (tx_out !== 1'b1 || busy || thr_empty) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL inhibit");
      end
    end
    cfg.tx_inhibit = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (tx_out !== 1'b0) begin
      failures++;
      $display("FAIL frame did not start after inhibit released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_f[3] = '{1, 16, 64};
endmodule
