// uart_tx: serial transmitter section, Transmitter Hold Register (THR) and
// Transmitter Shift Register (TSR).
//
// A write (thr_wr high for one cycle while thr_empty is high) places a 12-bit
// payload in the THR. Whenever the TSR is idle, the THR is full and the
// transmitter is not inhibited, the payload moves to the TSR (one cycle) and
// the frame is sent on tx_out:
//   start bit '0', payload bits 0..11 (bit 0 first), parity bit if enabled,
//   then a high stop period of cfg.stop_clks cycles.
// Each bit lasts cfg.clks_per_bit cycles. The line idles high. The THR is
// free again as soon as its word moved to the TSR, so a second word can wait
// there and frames follow each other without an idle gap. The configuration
// is sampled when a frame starts. Start/stop polarity and the two registers
// come from the UART description; least-significant-bit-first order and the
// position of the parity bit (after the payload) are this design's choice,
// following common UART practice.
module uart_tx
  import uart_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  uart_cfg_t               cfg,
  input  logic                    thr_wr,
  input  logic [FRAME_DATA_W-1:0] thr_data,
  output logic                    thr_empty,
  output logic                    busy,      // a frame is on the line
  output logic                    tx_out
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e                  state;
  logic [FRAME_DATA_W-1:0] thr;
  logic [FRAME_DATA_W-1:0] tsr;
  logic                    parity;
  logic [7:0]              cnt;       // cycles left in the current bit, minus one
  logic [3:0]              bitn;      // payload bits still to send, minus one
  uart_cfg_t               fcfg;      // configuration of the frame in flight

  logic stop_done;
  logic load_tsr;
  assign stop_done = (state == S_STOP) && (cnt == '0);
  assign load_tsr  = ((state == S_IDLE) || stop_done) && !thr_empty && !cfg.tx_inhibit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      thr       <= '0;
      thr_empty <= 1'b1;
      tsr       <= '0;
      parity    <= 1'b0;
      cnt       <= '0;
      bitn      <= '0;
      fcfg      <= '0;
      tx_out    <= 1'b1;
    end else begin
      if (load_tsr) thr_empty <= 1'b1;
      if (thr_wr && thr_empty) begin
        thr       <= thr_data;
        thr_empty <= 1'b0;
      end

      unique case (state)
        S_IDLE: tx_out <= 1'b1;
        S_START, S_DATA, S_PARITY: begin
          if (cnt != '0) cnt <= cnt - 8'd1;
          else begin
            cnt <= 8'(fcfg.clks_per_bit) - 8'd1;
            if (state == S_START) begin
              state  <= S_DATA;
              bitn   <= 4'(FRAME_DATA_W - 1);
              tx_out <= tsr[0];
              tsr    <= tsr >> 1;
            end else if (state == S_DATA && bitn != '0) begin
              bitn   <= bitn - 4'd1;
              tx_out <= tsr[0];
              tsr    <= tsr >> 1;
            end else if (state == S_DATA && fcfg.parity_en) begin
              state  <= S_PARITY;
              tx_out <= parity;
            end else begin
              state  <= S_STOP;
              cnt    <= fcfg.stop_clks - 8'd1;
              tx_out <= 1'b1;
            end
          end
        end
        S_STOP: begin
          if (cnt != '0) cnt <= cnt - 8'd1;
          else           state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // Start of a frame: from idle, or straight after the previous stop
      // period so that queued frames leave no gap.
      if (load_tsr) begin
        tsr    <= thr;
        parity <= (^thr) ^ cfg.parity_odd;
        fcfg   <= cfg;
        cnt    <= 8'(cfg.clks_per_bit) - 8'd1;
        state  <= S_START;
        tx_out <= 1'b0;
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule
