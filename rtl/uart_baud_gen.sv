// uart_baud_gen: baud rate generator of the UART. It divides the system
// clock by (divisor + 1) and emits a one-cycle tick at 16 times the baud
// rate; the transmitter advances one bit every 16 ticks and the receiver
// samples each bit in the middle of its 16 ticks. The divisor comes from the
// UART's baud register and may be changed at any time; the counter restarts
// when it is written. Baud = f_clk / (16 * (divisor + 1)).
// The oversampling scheme is this design's choice.
module uart_baud_gen #(
  parameter int DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] divisor,
  input  logic             restart,
  output logic             tick16
);

  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      tick16 <= 1'b0;
    end else if (restart) begin
      cnt    <= '0;
      tick16 <= 1'b0;
    end else if (cnt >= divisor) begin
      cnt    <= '0;
      tick16 <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      tick16 <= 1'b0;
    end
  end

endmodule
