// arm7_top: ARM7 soft core with UART and SPI. The core is a controller
// (random-logic decoder), a multiplexer-based single-cycle datapath and an
// instruction ROM; the UART and SPI master sit on the data bus as memory-
// mapped peripherals.
// The ROM is read with the word address of the PC. The datapath drives a
// word-wide peripheral bus in the second cycle of a load, store or swap:
// address bits [15:12] select the peripheral (1 = UART at 0x0000_1000,
// 2 = SPI at 0x0000_2000) and bits [3:2] the register; other addresses read
// as 0 and ignore writes. The peripherals answer reads in the same cycle.
// The debug outputs show the PC, the current instruction and the CPSR.
// The bus decode and the addresses are this design's choice.
module arm7_top
  import arm7_pkg::*;
#(
  parameter int    ROM_DEPTH     = 256,
  parameter string ROM_FILE      = "rtl/arm7_program.hex",
  parameter logic [15:0] UART_DIV = 16'd26,   // 115200 baud at 50 MHz
  parameter logic [7:0]  SPI_DIV  = 8'd3
) (
  input  logic        clk,
  input  logic        rst_n,
  // UART
  input  logic        uart_rxd,
  output logic        uart_txd,
  // SPI
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        spi_ss_n,
  // debug
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic [31:0] cpsr
);

  ctrl_t       ctrl;
  logic        phase;
  logic [31:0] addr_buf, data_buf, data_in, uart_rdata, spi_rdata;
  bus_req_t    bus;
  logic        uart_sel, spi_sel;

  rom #(.DEPTH(ROM_DEPTH), .INIT_FILE(ROM_FILE)) u_rom (
    .addr(pc[$clog2(ROM_DEPTH)+1:2]), .data(inst)
  );

  controller u_ctrl (
    .clk, .rst_n, .inst, .nzcv(cpsr[31:28]), .ctrl, .phase
  );

  datapath u_dp (
    .clk, .rst_n, .ctrl, .inst, .data_in, .pc_out(pc), .addr_buf, .data_buf, .cpsr
  );

  assign bus = '{addr: addr_buf, wdata: data_buf, we: ctrl.bus_we, re: ctrl.bus_re};
  assign uart_sel = (bus.we || bus.re) && bus.addr[15:12] == UART_PAGE;
  assign spi_sel  = (bus.we || bus.re) && bus.addr[15:12] == SPI_PAGE;

  uart #(.BAUD_DIV_RESET(UART_DIV)) u_uart (
    .clk, .rst_n, .sel(uart_sel), .addr(bus.addr[3:2]), .we(bus.we), .re(bus.re),
    .wdata(bus.wdata), .rdata(uart_rdata), .rxd(uart_rxd), .txd(uart_txd)
  );

  spi_master #(.DATA_BITS(8), .DIV_RESET(SPI_DIV)) u_spi (
    .clk, .rst_n, .sel(spi_sel), .addr(bus.addr[3:2]), .we(bus.we), .re(bus.re),
    .wdata(bus.wdata), .rdata(spi_rdata), .sclk(spi_sclk), .mosi(spi_mosi),
    .miso(spi_miso), .ss_n(spi_ss_n)
  );

  always_comb begin
    if (uart_sel)     data_in = uart_rdata;
    else if (spi_sel) data_in = spi_rdata;
    else              data_in = '0;
  end

  // A load/store/swap bus access happens only in the second cycle.
  a_bus_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (bus.we || bus.re) |-> phase);

endmodule
