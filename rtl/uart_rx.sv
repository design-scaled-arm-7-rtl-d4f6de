// uart_rx: UART receiver with 16x oversampling. rxd is first passed through a
// two-flop synchroniser. A falling edge (high then low) starts a frame, so a
// line held low after a framing error does not start another one; the start bit is
// checked again 8 ticks later (mid-bit) and the frame is dropped if the
// line is back high (a glitch). Each following bit is sampled in its middle,
// 16 ticks apart: 5 to 8 data bits LSB first, the optional parity bit and the
// first stop bit. At the middle of the stop bit the byte appears on data with
// a one-cycle valid pulse, together with parity_err (parity enabled and
// wrong) and frame_err (stop bit not 1). Data bits above the programmed
// count read as 0. A second stop bit is not checked, which lets the receiver
// accept frames with one or two stop bits.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick16,
  input  logic       rxd,
  input  uart_cfg_t  cfg,
  output logic [7:0] data,
  output logic       valid,
  output logic       parity_err,
  output logic       frame_err
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_t;

  state_t     state;
  logic [2:0] sync;
  logic       rx;
  logic [3:0] tcnt;
  logic [2:0] bcnt;
  logic [7:0] shreg;
  logic       par;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= 3'b111;
      state      <= S_IDLE;
      tcnt       <= '0;
      bcnt       <= '0;
      shreg      <= '0;
      par        <= 1'b0;
      data       <= '0;
      valid      <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      sync  <= {sync[1:0], rxd};
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (sync[2] && !rx) begin
          tcnt  <= '0;
          state <= S_START;
        end
        default: if (tick16) begin
          tcnt <= tcnt + 1'b1;
          unique case (state)
            S_START: if (tcnt == 4'd7) begin
              if (rx) state <= S_IDLE;            // glitch
              else begin
                tcnt  <= '0;
                bcnt  <= '0;
                shreg <= '0;
                par   <= cfg.parity_odd;
                state <= S_DATA;
              end
            end
            S_DATA: if (tcnt == 4'd15) begin
              // middle of data bit bcnt: bits fill from the top, then align
              shreg <= {rx, shreg[7:1]};
              par   <= par ^ rx;
              bcnt  <= bcnt + 1'b1;
              if (bcnt == {1'b1, cfg.data_bits})
                state <= cfg.parity_en ? S_PARITY : S_STOP;
            end
            S_PARITY: if (tcnt == 4'd15) begin
              par   <= par ^ rx;          // 0 when the parity matches
              state <= S_STOP;
            end
            S_STOP: if (tcnt == 4'd15) begin
              data       <= shreg >> (2'd3 - cfg.data_bits);
              valid      <= 1'b1;
              parity_err <= cfg.parity_en && par;
              frame_err  <= !rx;
              state      <= S_IDLE;
            end
            default: state <= S_IDLE;
          endcase
        end
      endcase
    end
  end

endmodule
