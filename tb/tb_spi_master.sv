// tb_spi_master: bus-level test of the SPI master against a mode-0 slave
// model in the testbench (shifts MISO out on the falling edge, samples MOSI on
// the rising edge, MSB first). It checks that the slave receives the written
// word, that the master's DATA register then holds the slave's word, the
// busy/done flags, the slave select register, the SCLK period
// (2 * (divider + 1) cycles) and exactly DATA_BITS clock pulses per transfer.
module tb_spi_master;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel, we, re;
  logic [1:0] addr;
  logic [31:0] wdata, rdata;
  logic sclk, mosi, miso, ss_n;
  logic [7:0] slave_tx, slave_rx;
  int checks = 0, failures = 0, pulses = 0;

  always #5 clk = !clk;

  spi_master #(.DATA_BITS(8), .DIV_RESET(8'd3)) dut (.*);

  // mode-0 slave
  always @(posedge sclk) begin slave_rx <= {slave_rx[6:0], mosi}; pulses++; end
  always @(negedge sclk) slave_tx <= {slave_tx[6:0], 1'b0};
  assign miso = slave_tx[7];

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

  task automatic xfer(input logic [7:0] m, input logic [7:0] s, input int div);
    logic [31:0] d;
    int t0, t1;
    slave_tx = s; pulses = 0;
    wr(2, {16'd0, 8'(div), 8'd0});         // ss_n = 0
    check("ss_n low", ss_n, 0);
    wr(0, m);
    rd(1, d); check("busy", d[1:0], 2'b01);
    @(posedge sclk); t0 = $time;
    @(posedge sclk); t1 = $time;
    check("sclk period", (t1 - t0) / 10, 2 * (div + 1));
    do rd(1, d); while (d[0]);
    check("done", d[1:0], 2'b10);
    check("slave received", slave_rx, m);
    check("pulses", pulses, 8);
    check("sclk idles low", sclk, 0);
    rd(0, d); check("master received", d, s);
    rd(1, d); check("done cleared by read", d[1], 0);
    wr(2, {16'd0, 8'(div), 8'd1});
    check("ss_n high", ss_n, 1);
  endtask

  initial begin
    logic [31:0] d;
    {sel, we, re} = '0; addr = '0; wdata = '0; slave_rx = '0; slave_tx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    rd(2, d); check("ctrl reset", d, 32'h0301);
    check("sclk reset", sclk, 0);
    xfer(8'hA5, 8'h3C, 3);
    xfer(8'h01, 8'h80, 0);
    for (int i = 0; i < 6; i++) xfer(8'($urandom), 8'($urandom), i % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
