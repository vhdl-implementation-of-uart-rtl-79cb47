// uart_rx_tb: a serial line model sends frames to the receiver with every
// baud factor, parity setting and stop length, separated by random idle
// gaps. For each frame the buffer register, parity_err and framing_err are
// compared with what was sent (including frames with a wrong parity bit and
// with a low stop bit), and the time from the start edge to rx_valid is
// checked: 3 cycles (synchronizer and detection) + half a bit + 13 bits
// (+1 with parity). A low glitch shorter than half a bit must be ignored.
module uart_rx_tb;
  import uart_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  uart_cfg_t   cfg;
  logic        rx_in = 1'b1;
  logic [11:0] rbr;
  logic        rx_valid, parity_err, framing_err;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_valid = 0;

  uart_rx dut (.clk, .rst_n, .cfg, .rx_in, .rbr, .rx_valid, .parity_err, .framing_err);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rx_valid) n_valid <= n_valid + 1;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (f=%0d par=%b/%b)", what, cfg.clks_per_bit, cfg.parity_en, cfg.parity_odd);
    end
  endtask

  // Drive one frame; returns the cycle count at the start edge.
  task automatic send(input logic [11:0] w, input int f, input int pmode, input int stop_clks,
                      input bit bad_parity, input bit bad_stop);
    bit p;
    p = (^w) ^ (pmode == 1) ^ bad_parity;
    rx_in = 1'b0;
    repeat (f) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      rx_in = w[i];
      repeat (f) @(negedge clk);
    end
    if (pmode != 0) begin
      rx_in = p;
      repeat (f) @(negedge clk);
    end
    rx_in = !bad_stop;
    repeat (f) @(negedge clk);
    rx_in = 1'b1;
    repeat (stop_clks > f ? stop_clks - f : 0) @(negedge clk);
  endtask

  task automatic run_config(input int f, input int pmode, input int stop_code);
    int stop_clks, half, lat_exp;
    stop_clks = (stop_code == 1) ? f : (stop_code == 2) ? (3 * f + 1) / 2 : 2 * f;
    half = f / 2;
    lat_exp = 3 + half + (13 + (pmode != 0)) * f;
    cfg = '0;
    cfg.clks_per_bit = 7'(f);
    cfg.stop_clks    = 8'(stop_clks);
    cfg.parity_en    = (pmode != 0);
    cfg.parity_odd   = (pmode == 1);
    cfg.char_bits    = 4'd8;
    for (int k = 0; k < 4; k++) begin
      logic [11:0] w;
      bit bp, bs;
      int c0, nv0;
      w  = 12'($urandom);
      bp = (k == 2) && (pmode != 0);
      bs = (k == 3);
      // random idle time, a whole number of cycles
      repeat ($urandom_range(1, 5)) @(negedge clk);
      c0  = cyc;
      nv0 = n_valid;
      fork
        send(w, f, pmode, stop_clks, bp, bs);
        begin
          int lat;
          @(negedge clk);
          while (!rx_valid) @(negedge clk);
          lat = cyc - c0;
          check(lat == lat_exp, $sformatf("latency %0d expected %0d", lat, lat_exp));
          check(rbr == w, $sformatf("data %h expected %h", rbr, w));
          check(parity_err == bp, "parity_err");
          check(framing_err == bs, "framing_err");
        end
      join
      @(negedge clk);
      @(negedge clk);
      check(n_valid == nv0 + 1, "exactly one rx_valid per frame");
      // a low stop bit is followed by a line that is high for a bit time
      // before the next frame, so the receiver is back in idle
      if (bs) repeat (2 * f + 4) @(negedge clk);
    end
    // glitch shorter than half a bit: nothing received
    if (f > 1) begin
      int nv0;
      nv0 = n_valid;
      rx_in = 1'b0;
      repeat (f / 2 - 2) @(negedge clk);
      rx_in = 1'b1;
      repeat (20 * f) @(negedge clk);
      check(n_valid == nv0, "glitch rejected");
    end
  endtask

  int fs[3] = '{1, 16, 64};

  initial begin
    cfg = '0;
    cfg.clks_per_bit = 7'd1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    foreach (fs[i])
      for (int pm = 0; pm < 3; pm++)
        for (int sc = 1; sc <= 3; sc++)
          run_config(fs[i], pm, sc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
