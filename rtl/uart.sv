// uart: memory-mapped UART, made of a CPU bus controller (register map), a
// baud rate generator, a transmitter and a receiver. The CPU programs the
// frame format (symbol bits, parity, stop bits) and the baud divisor through
// the control registers and moves data a byte at a time.
// Register map (word offsets, addr[3:2]):
//   0 DATA   write: send the byte wdata[7:0] (ignored while the transmitter
//                   is busy); read: last received byte, clears rx_full
//   1 STATUS read: [0] tx_busy [1] rx_full [2] overrun [3] parity_err
//                  [4] frame_err; a write clears overrun/parity_err/frame_err
//   2 CTRL   [1:0] data bits - 5, [2] parity enable, [3] odd parity,
//            [4] two stop bits (reset: 8 data bits, no parity, 1 stop bit)
//   3 BAUD   [15:0] divisor: baud = f_clk / (16 * (divisor + 1))
// Bus timing: sel/we/re are qualified by the caller; writes take effect on
// the rising edge, read data is combinational in the same cycle.
// The register layout is this design's choice.
module uart
  import uart_pkg::*;
#(
  parameter logic [15:0] BAUD_DIV_RESET = 16'd26   // 115200 baud at 50 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic [1:0]  addr,
  input  logic        we,
  input  logic        re,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        rxd,
  output logic        txd
);

  uart_cfg_t   cfg;
  logic [15:0] baud_div;
  logic        tick16, baud_restart;
  logic        tx_start, tx_busy;
  logic [7:0]  rx_data, rx_byte;
  logic        rx_valid, rx_perr, rx_ferr;
  logic        rx_full, overrun, parity_err, frame_err;

  assign tx_start     = sel && we && addr == 2'd0 && !tx_busy;
  assign baud_restart = sel && we && addr == 2'd3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= UART_CFG_8N1;
      baud_div   <= BAUD_DIV_RESET;
      rx_byte    <= '0;
      rx_full    <= 1'b0;
      overrun    <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      if (sel && we) begin
        unique case (addr)
          2'd1: begin overrun <= 1'b0; parity_err <= 1'b0; frame_err <= 1'b0; end
          2'd2: cfg <= uart_cfg_t'(wdata[4:0]);
          2'd3: baud_div <= wdata[15:0];
          default: ;
        endcase
      end
      if (sel && re && addr == 2'd0) rx_full <= 1'b0;
      if (rx_valid) begin
        rx_byte <= rx_data;
        rx_full <= 1'b1;
        if (rx_full && !(sel && re && addr == 2'd0)) overrun <= 1'b1;
        if (rx_perr) parity_err <= 1'b1;
        if (rx_ferr) frame_err <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (addr)
      2'd0: rdata = {24'd0, rx_byte};
      2'd1: rdata = {27'd0, frame_err, parity_err, overrun, rx_full, tx_busy};
      2'd2: rdata = {27'd0, cfg};
      default: rdata = {16'd0, baud_div};
    endcase
  end

  uart_baud_gen #(.DIV_W(16)) u_baud (
    .clk, .rst_n, .divisor(baud_div), .restart(baud_restart), .tick16
  );

  uart_tx u_tx (
    .clk, .rst_n, .tick16, .start(tx_start), .data(wdata[7:0]), .cfg,
    .txd, .busy(tx_busy)
  );

  uart_rx u_rx (
    .clk, .rst_n, .tick16, .rxd, .cfg, .data(rx_data), .valid(rx_valid),
    .parity_err(rx_perr), .frame_err(rx_ferr)
  );

endmodule
