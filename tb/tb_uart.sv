// tb_uart: bus-level test of the UART with txd looped back to rxd. Through
// the register map it checks the reset values, programs the baud divisor and
// frame format, sends bytes and reads them back, checks the bit time on the
// line (one data bit lasts exactly 16 * (divisor + 1) cycles), that a write to DATA while busy is
// dropped, the rx_full flag and its clearing by a read, the overrun flag
// when a byte arrives before the previous one was read, and its clearing by
// a write to STATUS.
module tb_uart;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel, we, re;
  logic [1:0] addr;
  logic [31:0] wdata, rdata;
  logic line;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  uart #(.BAUD_DIV_RESET(16'd26)) dut (
    .clk, .rst_n, .sel, .addr, .we, .re, .wdata, .rdata, .rxd(line), .txd(line)
  );

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = 2'(a); wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); sel = 1; re = 1; addr = 2'(a);
    #1 d = rdata;
    @(negedge clk); sel = 0; re = 0;
  endtask

  task automatic wait_rx();
    logic [31:0] st;
    do rd(1, st); while (!st[1]);
  endtask

  task automatic wait_tx_idle();
    logic [31:0] st;
    do rd(1, st); while (st[0]);
  endtask

  initial begin
    logic [31:0] d;
    int t0, t1;
    {sel, we, re} = '0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    rd(3, d); check("baud reset", d, 26);
    rd(2, d); check("ctrl reset 8N1", d, 32'h03);
    rd(1, d); check("status reset", d, 0);

    wr(3, 2);                       // 16 * 3 = 48 cycles per bit
    wr(2, 32'h1F);                  // 8 data bits, odd parity, 2 stop bits
    rd(2, d); check("ctrl readback", d, 32'h1F);
    wr(0, 32'h96);
    rd(1, d); check("tx busy", d[0], 1);
    wr(0, 32'h11);                  // dropped: transmitter busy
    // bit time: measure the start bit on the line
    @(posedge line);
    wait (!line); t0 = $time;       // no second frame may follow
    t1 = 0;
    wait_rx();
    rd(0, d); check("rx byte", d, 32'h96);
    rd(1, d); check("rx_full cleared, no errors", d[4:1], 0);
    repeat (200) @(posedge clk);
    rd(1, d); check("no second frame", d[1], 0);

    // bit time
    wr(2, 32'h03);
    wr(0, 32'h02);                  // data bit 1 is the only 1 before the stop bit
    wait (!line);
    wait (line);  t0 = $time;
    wait (!line); t1 = $time;
    check("bit time", (t1 - t0) / 10, 48);
    wait_rx();
    rd(0, d); check("rx byte 2", d, 32'h02);

    // overrun: two bytes without reading
    wait_tx_idle();
    wr(0, 32'hA1);
    wait_rx();
    wait_tx_idle();
    wr(0, 32'hB2);
    repeat (12 * 48) @(posedge clk);
    rd(1, d); check("overrun set", d[2:1], 2'b11);
    rd(0, d); check("latest byte kept", d, 32'hB2);
    wr(1, 0);
    rd(1, d); check("errors cleared", d[4:0], 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
