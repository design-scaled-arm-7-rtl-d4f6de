// uart_tx: UART transmitter. On start (while not busy) it latches the data
// byte and the frame format and sends, LSB first, one start bit (0), 5 to 8
// data bits, an optional even/odd parity bit and one or two stop bits (1),
// each bit lasting 16 ticks of the baud generator. txd idles high. busy is
// high from the cycle after start until the last stop bit has been sent.
module uart_tx
  import uart_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tick16,
  input  logic      start,
  input  logic [7:0] data,
  input  uart_cfg_t cfg,
  output logic      txd,
  output logic      busy
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_t;

  state_t     state;
  logic [7:0] shreg;
  uart_cfg_t  fmt;
  logic [3:0] tcnt;       // ticks within a bit
  logic [2:0] bcnt;       // data or stop bit index
  logic       par;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      txd   <= 1'b1;
      shreg <= '0;
      fmt   <= UART_CFG_8N1;
      tcnt  <= '0;
      bcnt  <= '0;
      par   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          txd <= 1'b1;
          if (start) begin
            shreg <= data;
            fmt   <= cfg;
            par   <= cfg.parity_odd;
            tcnt  <= '0;
            bcnt  <= '0;
            txd   <= 1'b0;
            state <= S_START;
          end
        end
        default: if (tick16) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            unique case (state)
              S_START, S_DATA: begin
                if (state == S_DATA && bcnt == {1'b1, fmt.data_bits}) begin
                  // all data bits sent
                  bcnt <= '0;
                  if (fmt.parity_en) begin
                    txd <= par;
                    state <= S_PARITY;
                  end else begin
                    txd <= 1'b1;
                    state <= S_STOP;
                  end
                end else begin
                  if (state == S_DATA) bcnt <= bcnt + 1'b1;
                  txd   <= shreg[0];
                  par   <= par ^ shreg[0];
                  shreg <= shreg >> 1;
                  state <= S_DATA;
                end
              end
              S_PARITY: begin
                txd   <= 1'b1;
                state <= S_STOP;
              end
              S_STOP: begin
                if (fmt.stop2 && bcnt == 0) begin
                  bcnt <= 3'd1;
                end else begin
                  state <= S_IDLE;
                end
              end
              default: state <= S_IDLE;
            endcase
          end
        end
      endcase
    end
  end

endmodule
