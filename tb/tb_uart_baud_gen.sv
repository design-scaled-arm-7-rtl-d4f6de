// tb_uart_baud_gen: checks that the baud generator emits one-cycle ticks
// exactly (divisor + 1) clock cycles apart for several divisors, and that a
// restart re-aligns the tick train.
module tb_uart_baud_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] divisor;
  logic restart, tick16;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  uart_baud_gen #(.DIV_W(16)) dut (.*);

  task automatic measure(input int div);
    int last, cyc;
    @(negedge clk); divisor = 16'(div); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    cyc = 0; last = -1;
    while (cyc < 10 * (div + 1) + 2) begin
      @(posedge clk); #1; cyc++;
      if (tick16) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != div + 1) begin
            failures++;
            $display("FAIL div=%0d: period %0d", div, cyc - last);
          end
        end else begin
          // first tick after a restart comes div + 1 cycles after it
          checks++;
          if (cyc != div + 1) begin failures++; $display("FAIL div=%0d: first tick at %0d", div, cyc); end
        end
        last = cyc;
      end
    end
  endtask

  initial begin
    divisor = 16'd3; restart = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    measure(0); measure(1); measure(5); measure(26); measure(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
