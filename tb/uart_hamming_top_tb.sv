// uart_hamming_top_tb: end-to-end test of the Hamming-protected UART at its
// default parameters. tx_out is looped back to rx_in through an error
// injector that inverts chosen bits of a frame on the line. Every received
// character is compared with a reference built from an independent model of
// the code: the expected error position, corrected data, parity and framing
// flags. Covered: clean frames, a single error at each of the 11 code
// positions (corrected), an error on the unprotected MSB, double errors
// (detected), parity and framing errors, all three baud factors, both parity
// types, all stop lengths, all character lengths, back-to-back frames, an
// inhibited transmitter, and the two worked examples (byte 0xAC, and data
// 1010101 with bit 9 corrupted). End-to-end latency is checked for isolated
// frames. Each mechanism must occur at least once.
module uart_hamming_top_tb;
  import uart_pkg::*;
  import hamming_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cw_wr = 1'b0;
  logic [7:0]  cw_data = '0, cw_q;
  logic        tx_wr = 1'b0;
  logic [7:0]  tx_data = '0;
  logic        tx_ready, tx_busy, tx_out;
  logic        rx_in;
  logic        rx_valid;
  logic [7:0]  rx_data;
  logic        rx_err_detected, rx_uncorrectable, rx_parity_err, rx_framing_err;
  logic [3:0]  rx_err_pos;
  logic [11:1] rx_code;
  logic        flip = 1'b0;

  assign rx_in = tx_out ^ flip;

  uart_hamming_top dut (
    .clk, .rst_n, .cw_wr, .cw_data, .cw_q, .tx_wr, .tx_data, .tx_ready, .tx_busy, .tx_out,
    .rx_in, .rx_valid, .rx_data, .rx_err_detected, .rx_err_pos, .rx_code,
    .rx_uncorrectable, .rx_parity_err, .rx_framing_err
  );

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- settings
  int f_cur = 1, pmode_cur = 0, stop_cur = 3, len_cur = 3;

  function automatic logic [7:0] cw_of(int baud, int len, int pmode, int stop);
    logic [7:0] w;
    w[1:0] = 2'(baud);
    w[3:2] = 2'(len);
    w[4]   = (pmode != 0);
    w[5]   = (pmode == 2);
    w[7:6] = 2'(stop);
    return w;
  endfunction

  // ---------------------------------------------------------------- mechanisms
  int n_clean, n_msb_err, n_double, n_parity, n_framing, n_b2b, n_inhibit, n_cw_write;
  int n_pos[12];
  int n_baud[4], n_stop[4], n_len[4], n_pmode[3];

  // ---------------------------------------------------------------- frames
  typedef struct {
    logic [7:0]  data;
    logic [11:0] pay_flip;   // payload bits inverted on the line
    logic        par_flip;
    logic        stop_flip;
    int          f, pmode, len;
  } frame_t;

  frame_t inj_q[$];   // frames still to be put on the line
  frame_t exp_q[$];   // frames still to be received

  // Error injector: follows the clean transmitter output and inverts the
  // line during the bit periods selected for the frame in flight.
  initial begin
    @(negedge clk);
    forever begin
      frame_t fr;
      if (tx_out === 1'b0 && inj_q.size() != 0) begin
        fr = inj_q.pop_front();
        flip = 1'b0;                                   // start bit
        repeat (fr.f) @(negedge clk);
        for (int i = 0; i < 12; i++) begin
          flip = fr.pay_flip[i];
          repeat (fr.f) @(negedge clk);
        end
        if (fr.pmode != 0) begin
          flip = fr.par_flip;
          repeat (fr.f) @(negedge clk);
        end
        flip = fr.stop_flip;
        repeat (fr.f) @(negedge clk);
        flip = 1'b0;
        // a back-to-back frame may start right here: check without waiting
      end else begin
        @(negedge clk);
      end
    end
  end

  // Scoreboard: each received character against the reference model.
  initial begin
    forever begin
      @(negedge clk);
      if (rx_valid) begin
        frame_t      fr;
        logic [7:0]  ch, mask, exp_data;
        logic [11:1] code_line, code_fix;
        logic        msb_line;
        logic [3:0]  syn;
        int          nflips;
        bit          exp_par;
        if (exp_q.size() == 0) begin
          check(0, "unexpected character");
          continue;
        end
        fr   = exp_q.pop_front();
        mask = 8'((1 << (5 + fr.len)) - 1);
        ch   = fr.data & mask;
        code_line = ref_encode(ch[6:0]) ^ fr.pay_flip[10:0];
        msb_line  = ch[7] ^ fr.pay_flip[11];
        syn       = ref_syndrome(code_line);
        code_fix  = code_line;
        if (syn >= 1 && syn <= 11) code_fix[syn] = !code_fix[syn];
        exp_data = {msb_line, code_fix[11], code_fix[10], code_fix[9], code_fix[7],
                    code_fix[6], code_fix[5], code_fix[3]} & mask;
        nflips  = $countones(fr.pay_flip) + int'(fr.par_flip);
        exp_par = (fr.pmode != 0) && (nflips % 2 == 1);
        check(rx_data == exp_data,
              $sformatf("data %h expected %h (sent %h, flips %b)", rx_data, exp_data, fr.data,
                        fr.pay_flip));
        check(rx_err_pos == syn, $sformatf("error position %0d expected %0d", rx_err_pos, syn));
        check(rx_err_detected == (syn != 0), "error detected flag");
        check(rx_uncorrectable == (syn > 11), "uncorrectable flag");
        check(rx_code == code_fix, "corrected code word");
        check(rx_parity_err == exp_par, "parity error flag");
        check(rx_framing_err == fr.stop_flip, "framing error flag");
        // mechanism counters
        if (nflips == 0 && !fr.stop_flip) n_clean++;
        if ($countones(fr.pay_flip[10:0]) == 1 && rx_data == ch) n_pos[syn]++;
        if (fr.pay_flip == 12'h800 && fr.len == 3 && rx_data == (ch ^ 8'h80)) n_msb_err++;
        if ($countones(fr.pay_flip[10:0]) == 2 && rx_err_detected) n_double++;
        if (exp_par && rx_parity_err) n_parity++;
        if (fr.stop_flip && rx_framing_err) n_framing++;
      end
    end
  end

  task automatic set_mode(input int baud, input int len, input int pmode, input int stop);
    // wait for the line to go quiet before changing the format
    while (tx_busy || !tx_ready || exp_q.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
    cw_data = cw_of(baud, len, pmode, stop);
    cw_wr   = 1'b1;
    @(negedge clk);
    cw_wr   = 1'b0;
    check(cw_q == cw_data, "control word read back");
    n_cw_write++;
    f_cur     = (baud == 2) ? 16 : (baud == 3) ? 64 : 1;
    pmode_cur = pmode;
    stop_cur  = stop;
    len_cur   = len;
    n_baud[baud]++;
    n_stop[stop]++;
    n_len[len]++;
    n_pmode[pmode]++;
  endtask

  // Queue one character for transmission with the given line errors.
  task automatic send(input logic [7:0] d, input logic [11:0] pf, input bit parf, input bit stopf);
    frame_t fr;
    fr.data = d; fr.pay_flip = pf; fr.par_flip = parf; fr.stop_flip = stopf;
    fr.f = f_cur; fr.pmode = pmode_cur; fr.len = len_cur;
    while (!tx_ready) @(negedge clk);
    if (tx_busy) n_b2b++;
    inj_q.push_back(fr);
    exp_q.push_back(fr);
    tx_data = d;
    tx_wr   = 1'b1;
    @(negedge clk);
    tx_wr   = 1'b0;
  endtask

  task automatic drain();
    while (tx_busy || !tx_ready || exp_q.size() != 0) @(negedge clk);
    repeat (3 * f_cur + 4) @(negedge clk);
  endtask

  function automatic logic [11:0] one_flip(int pos);   // code position 1..11, 12 = MSB
    return 12'(1) << (pos - 1);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cw_q == 8'hCD, "reset control word: 2 stop bits, no parity, 8 bits, 1x");

    // ---- worked examples at the default format ----
    begin
      int t0, lat;
      // byte 0xAC, no error; also the end-to-end latency of an idle link
      t0 = cyc;
      send(8'hAC, '0, 1'b0, 1'b0);
      while (!rx_valid) @(negedge clk);
      lat = cyc - t0;
      // write edge, start one edge later, then 3 + 13 bit times at 1x
      check(lat == 1 + 1 + 3 + 13, $sformatf("end-to-end latency %0d", lat));
      drain();
      // data 1010101 with code position 9 corrupted on the line
      send(8'b0101_0101, one_flip(9), 1'b0, 1'b0);
      while (!rx_valid) @(negedge clk);
      check(rx_err_pos == 4'd9 && rx_code == 11'b10100101111 && rx_data == 8'h55,
            "worked example: position 9 corrected");
      drain();
    end

    // ---- every format, every single-error position ----
    for (int baud = 1; baud <= 3; baud++)
      for (int pm = 0; pm < 3; pm++)
        for (int stop = 1; stop <= 3; stop++) begin
          set_mode(baud, 3, pm, stop);
          send(8'($urandom), '0, 1'b0, 1'b0);               // clean
          for (int p = 1; p <= 12; p++)                      // single error, MSB too
            send(8'($urandom), one_flip(p), 1'b0, 1'b0);
          send(8'($urandom), one_flip(3) | one_flip(10), 1'b0, 1'b0);  // double
          send(8'($urandom), one_flip(12) | one_flip(5), 1'b0, 1'b0);  // two with the MSB
          if (pm != 0) send(8'($urandom), '0, 1'b1, 1'b0);   // parity bit hit
          drain();
          send(8'($urandom), '0, 1'b0, 1'b1);                // stop bit hit
          drain();
        end

    // ---- character lengths and the sync code (run as 1x) ----
    for (int len = 0; len < 4; len++) begin
      set_mode(len == 0 ? 0 : 1, len, 2, 3);
      for (int k = 0; k < 4; k++) send(8'($urandom), one_flip(1 + $urandom_range(0, 10)), 1'b0, 1'b0);
      drain();
    end

    // ---- random traffic at 16x, even parity, two stop bits ----
    set_mode(2, 3, 2, 3);
    for (int k = 0; k < 40; k++) begin
      logic [11:0] pf;
      pf = ($urandom_range(0, 1) != 0) ? one_flip($urandom_range(1, 12)) : 12'h000;
      send(8'($urandom), pf, 1'b0, 1'b0);
    end
    drain();

    // ---- inhibited transmitter: the character waits in the hold register ----
    set_mode(1, 3, 0, 0);
    begin
      int bad;
      bad = 0;
      tx_data = 8'h3C;
      tx_wr = 1'b1;
      @(negedge clk);
      tx_wr = 1'b0;
      repeat (40) begin
        @(negedge clk);
        if (tx_out !== 1'b1 || tx_busy || tx_ready || rx_valid) bad++;
      end
      check(bad == 0, "inhibit holds the line idle");
      if (bad == 0) n_inhibit++;
      // release with 1 stop bit: the held character goes out
      begin
        frame_t fr;
        fr.data = 8'h3C; fr.pay_flip = '0; fr.par_flip = 1'b0; fr.stop_flip = 1'b0;
        fr.f = 1; fr.pmode = 0; fr.len = 3;
        inj_q.push_back(fr);
        exp_q.push_back(fr);
      end
      cw_data = cw_of(1, 3, 0, 1);
      cw_wr = 1'b1;
      @(negedge clk);
      cw_wr = 1'b0;
      drain();
    end

    // ---- mechanism coverage ----
    check(n_clean > 0, "clean frames");
    for (int p = 1; p <= 11; p++)
      check(n_pos[p] > 0, $sformatf("single error corrected at position %0d", p));
    check(n_msb_err > 0, "unprotected MSB error passed through");
    check(n_double > 0, "double error detected");
    check(n_parity > 0, "parity error");
    check(n_framing > 0, "framing error");
    check(n_b2b > 0, "back-to-back frames");
    check(n_inhibit > 0, "transmitter inhibit");
    for (int b = 0; b < 4; b++) check(n_baud[b] > 0, $sformatf("baud code %0d", b));
    for (int s = 1; s < 4; s++) check(n_stop[s] > 0, $sformatf("stop code %0d", s));
    for (int l = 0; l < 4; l++) check(n_len[l] > 0, $sformatf("length code %0d", l));
    for (int m = 0; m < 3; m++) check(n_pmode[m] > 0, $sformatf("parity mode %0d", m));
    check(exp_q.size() == 0, "every character received");
    $display("clean=%0d msb=%0d double=%0d parity=%0d framing=%0d b2b=%0d inhibit=%0d cw=%0d",
             n_clean, n_msb_err, n_double, n_parity, n_framing, n_b2b, n_inhibit, n_cw_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
