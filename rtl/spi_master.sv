// spi_master: memory-mapped SPI master (mode 0: SCLK idles low, MOSI changes
// on the falling edge, MISO is sampled on the rising edge), MSB first,
// DATA_BITS bits per transfer. Writing DATA starts a transfer; SCLK runs at
// f_clk / (2 * (divider + 1)). The received word replaces DATA when the
// transfer ends. The slave select line is a plain register bit so software
// can frame multi-word transactions.
// Register map (word offsets, addr[3:2]):
//   0 DATA   write: start a transfer of wdata (ignored while busy);
//            read: last received word
//   1 STATUS read: [0] busy [1] done (set at the end of a transfer, cleared
//            by reading DATA)
//   2 CTRL   [0] ss_n (reset 1), [15:8] clock divider (reset DIV_RESET)
// Bus timing as for the UART: writes on the rising edge, reads
// combinational. Mode, bit order, word size and register map are this
// design's choices.
module spi_master #(
  parameter int          DATA_BITS = 8,
  parameter logic [7:0]  DIV_RESET = 8'd3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic [1:0]  addr,
  input  logic        we,
  input  logic        re,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso,
  output logic        ss_n
);

  localparam int CW = $clog2(DATA_BITS + 1);

  logic [DATA_BITS-1:0] shreg, rx_word;
  logic [7:0]           div, dcnt;
  logic [CW-1:0]        bits_left;
  logic                 busy, done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      rx_word   <= '0;
      div       <= DIV_RESET;
      dcnt      <= '0;
      bits_left <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      sclk      <= 1'b0;
      mosi      <= 1'b0;
      ss_n      <= 1'b1;
    end else begin
      if (sel && re && addr == 2'd0) done <= 1'b0;
      if (sel && we && addr == 2'd2) begin
        ss_n <= wdata[0];
        div  <= wdata[15:8];
      end
      if (!busy) begin
        if (sel && we && addr == 2'd0) begin
          shreg     <= wdata[DATA_BITS-1:0];
          mosi      <= wdata[DATA_BITS-1];
          bits_left <= CW'(DATA_BITS);
          dcnt      <= '0;
          busy      <= 1'b1;
          done      <= 1'b0;
        end
      end else if (dcnt == div) begin
        dcnt <= '0;
        sclk <= !sclk;
        if (!sclk) begin
          // rising edge: shift MISO in at the LSB
          shreg     <= {shreg[DATA_BITS-2:0], miso};
          bits_left <= bits_left - 1'b1;
        end else begin
          // falling edge: next bit out, or finish
          if (bits_left == 0) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            rx_word <= shreg;
          end else begin
            mosi <= shreg[DATA_BITS-1];
          end
        end
      end else begin
        dcnt <= dcnt + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (addr)
      2'd0:    rdata = 32'(rx_word);
      2'd1:    rdata = {30'd0, done, busy};
      2'd2:    rdata = {16'd0, div, 7'd0, ss_n};
      default: rdata = '0;
    endcase
  end

endmodule
