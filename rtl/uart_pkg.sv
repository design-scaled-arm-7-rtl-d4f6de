// uart_pkg: the frame format shared by the UART transmitter, receiver and
// bus controller. The format is what the UART control register programs:
// number of data (symbol) bits, parity enable and sense, and number of stop
// bits. The field layout is this design's own.
package uart_pkg;

  typedef struct packed {
    logic       stop2;       // 1 = two stop bits, 0 = one
    logic       parity_odd;  // 1 = odd parity, 0 = even
    logic       parity_en;   // 1 = parity bit after the data bits
    logic [1:0] data_bits;   // number of data bits minus 5 (5..8)
  } uart_cfg_t;

  localparam uart_cfg_t UART_CFG_8N1 = '{stop2: 1'b0, parity_odd: 1'b0,
                                         parity_en: 1'b0, data_bits: 2'd3};

endpackage
