// tb_uart_rx: drives rxd with frames generated in the testbench (all frame
// formats, random bytes), with a tick every TICKDIV cycles, and checks the
// received byte, the valid pulse, and the parity and framing error flags,
// including frames sent on purpose with a wrong parity bit or a 0 stop bit,
// and a start-bit glitch that must be ignored.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int TICKDIV = 3;
  localparam int BIT = 16 * TICKDIV;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick16, rxd, valid, parity_err, frame_err;
  logic [7:0] data;
  uart_cfg_t cfg;
  int checks = 0, failures = 0, tcount = 0, nvalid = 0;

  always #5 clk = !clk;
  always @(posedge clk) tcount <= (tcount == TICKDIV - 1) ? 0 : tcount + 1;
  assign tick16 = (tcount == TICKDIV - 1);
  always @(posedge clk) if (valid) nvalid++;

  uart_rx dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic send(input logic [7:0] d, input uart_cfg_t f, input bit bad_par, input bit bad_stop);
    int nb = 5 + f.data_bits;
    int n0 = nvalid;
    rxd = 1'b0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < nb; i++) begin rxd = d[i]; repeat (BIT) @(posedge clk); end
    if (f.parity_en) begin
      rxd = (^(d & 8'((1 << nb) - 1))) ^ f.parity_odd ^ bad_par;
      repeat (BIT) @(posedge clk);
    end
    rxd = !bad_stop; repeat (BIT) @(posedge clk);
    rxd = 1'b1; repeat (BIT) @(posedge clk);
    check("one valid pulse", nvalid - n0, 1);
    check("data", data, d & 8'((1 << nb) - 1));
    check("parity_err", parity_err, f.parity_en && bad_par);
    check("frame_err", frame_err, bad_stop);
  endtask

  initial begin
    rxd = 1'b1; cfg = UART_CFG_8N1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (BIT) @(posedge clk);
    for (int f = 0; f < 32; f++) begin
      cfg = uart_cfg_t'(f[4:0]);
      send(8'($urandom), cfg, 0, 0);
    end
    cfg = uart_cfg_t'(5'b00111);                 // 8 data bits, even parity
    send(8'h5A, cfg, 1, 0);
    cfg = uart_cfg_t'(5'b01110);                 // 7 data bits, odd parity
    send(8'h13, cfg, 1, 0);
    send(8'h3C, cfg, 0, 1);
    // glitch shorter than half a bit: no frame
    begin
      int n0;
      n0 = nvalid;
      rxd = 1'b0; repeat (BIT / 4) @(posedge clk); rxd = 1'b1;
      repeat (12 * BIT) @(posedge clk);
      check("glitch ignored", nvalid - n0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
