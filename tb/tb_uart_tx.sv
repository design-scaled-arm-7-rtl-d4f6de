// tb_uart_tx: sends random bytes in every frame format (5..8 data bits,
// no/even/odd parity, 1 or 2 stop bits) with a tick every TICKDIV cycles, and
// decodes txd in the testbench by sampling the middle of each bit. Checks
// the start bit, data bits, parity bit, stop bits, the bit time
// (16 ticks) and that busy covers exactly the whole frame.
module tb_uart_tx;
  import uart_pkg::*;
  localparam int TICKDIV = 2;
  localparam int BIT = 16 * TICKDIV;   // clock cycles per bit
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick16, start, txd, busy;
  logic [7:0] data;
  uart_cfg_t cfg;
  int checks = 0, failures = 0, tcount = 0;

  always #5 clk = !clk;
  always @(posedge clk) begin
    tcount <= (tcount == TICKDIV - 1) ? 0 : tcount + 1;
  end
  assign tick16 = (tcount == TICKDIV - 1);

  uart_tx dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic frame(input logic [7:0] d, input uart_cfg_t f);
    int nb, t0, t1;
    logic [7:0] got;
    logic par;
    nb = 5 + f.data_bits;
    @(negedge clk); data = d; cfg = f; start = 1'b1;
    @(negedge clk); start = 1'b0; data = ~d; cfg = '0;   // must have been latched
    wait (txd == 1'b0);
    t0 = $time;
    // middle of the start bit (the start bit may be up to one tick longer)
    #(BIT * 10 / 2);
    check("start bit", txd, 0);
    got = '0;
    for (int i = 0; i < nb; i++) begin
      #(BIT * 10);
      got[i] = txd;
    end
    check("data", got, d & 8'((1 << nb) - 1));
    if (f.parity_en) begin
      #(BIT * 10);
      par = ^got ^ f.parity_odd;
      check("parity", txd, par);
    end
    #(BIT * 10);
    check("stop 1", txd, 1);
    if (f.stop2) begin #(BIT * 10); check("stop 2", txd, 1); end
    wait (!busy);
    t1 = $time;
    // frame length: start + data + parity + stop bits, each BIT cycles
    checks++;
    if ((t1 - t0) / 10 < (1 + nb + f.parity_en + 1 + f.stop2) * BIT - TICKDIV ||
        (t1 - t0) / 10 > (1 + nb + f.parity_en + 1 + f.stop2) * BIT + TICKDIV) begin
      failures++;
      $display("FAIL frame length %0d cycles", (t1 - t0) / 10);
    end
  endtask

  initial begin
    start = 1'b0; data = '0; cfg = UART_CFG_8N1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    check("idle high", txd, 1);
    for (int f = 0; f < 32; f++) begin
      if (f[3] && !f[2]) continue;   // odd flag without parity: same as no parity
      frame(8'($urandom), uart_cfg_t'(f[4:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
