// uart_rx: serial receiver section, Receiver Shift Register (RSR) and
// Receiver Buffer Register (RBR).
//
// rx_in passes a two-flop synchronizer (reset high). In idle the receiver
// waits for a low level. It then waits half a bit (cfg.clks_per_bit / 2
// cycles, none at 1x), confirms the start bit is still low, and samples the
// 12 payload bits (bit 0 first), the parity bit when enabled and the first
// stop bit one bit time apart, shifting the payload into the RSR. At the
// stop-bit sample the RSR is copied to the RBR, parity_err and framing_err
// (stop bit read low) are updated with it and rx_valid pulses for one cycle.
// The receiver is then ready for the next start bit, so frames sent with
// any number of stop bits are accepted. A start bit that is not low at its
// middle is taken as a glitch and ignored. The frame format matches uart_tx;
// the half-bit sampling point and the error flags are this design's choices.
// With the 1x factor the line must be driven from the same clock, as in a
// loop-back; 16x and 64x tolerate an asynchronous sender.
module uart_rx
  import uart_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  uart_cfg_t               cfg,
  input  logic                    rx_in,
  output logic [FRAME_DATA_W-1:0] rbr,
  output logic                    rx_valid,
  output logic                    parity_err,
  output logic                    framing_err
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e                  state;
  logic [1:0]              sync;
  logic                    rxs;
  logic [FRAME_DATA_W-1:0] rsr;
  logic                    par_rx;
  logic [7:0]              wait_cnt;   // cycles until the next sample
  logic [3:0]              bitn;       // payload bits still to sample, minus one
  uart_cfg_t               fcfg;

  assign rxs = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= 2'b11;
      state       <= S_IDLE;
      rsr         <= '0;
      par_rx      <= 1'b0;
      wait_cnt    <= '0;
      bitn        <= '0;
      fcfg        <= '0;
      rbr         <= '0;
      rx_valid    <= 1'b0;
      parity_err  <= 1'b0;
      framing_err <= 1'b0;
    end else begin
      sync     <= {sync[0], rx_in};
      rx_valid <= 1'b0;

      if (state == S_IDLE) begin
        if (!rxs) begin
          fcfg <= cfg;
          bitn <= 4'(FRAME_DATA_W - 1);
          if (cfg.clks_per_bit == 7'd1) begin
            // At 1x this sample already is the start bit.
            state    <= S_DATA;
            wait_cnt <= '0;
          end else begin
            state    <= S_START;
            wait_cnt <= 8'(cfg.clks_per_bit >> 1) - 8'd1;
          end
        end
      end else if (wait_cnt != '0) begin
        wait_cnt <= wait_cnt - 8'd1;
      end else begin
        wait_cnt <= 8'(fcfg.clks_per_bit) - 8'd1;
        unique case (state)
          S_START: state <= rxs ? S_IDLE : S_DATA;
          S_DATA: begin
            rsr <= {rxs, rsr[FRAME_DATA_W-1:1]};
            if (bitn != '0) bitn <= bitn - 4'd1;
            else            state <= fcfg.parity_en ? S_PARITY : S_STOP;
          end
          S_PARITY: begin
            par_rx <= rxs;
            state  <= S_STOP;
          end
          S_STOP: begin
            rbr         <= rsr;
            rx_valid    <= 1'b1;
            framing_err <= !rxs;
            parity_err  <= fcfg.parity_en &&
                           (((^rsr) ^ fcfg.parity_odd) != par_rx);
            state       <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
