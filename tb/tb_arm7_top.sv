// tb_arm7_top: end-to-end test of the ARM7 core with its UART and SPI.
// Runs the default ROM program (rtl/arm7_program.hex) with every parameter of
// arm7_top at its default. The UART is looped back (txd -> rxd) and so is the
// SPI (mosi -> miso). Each time the PC reaches a checkpoint address for the
// first time, the listed register must hold the listed value; the expected
// values were worked out by hand from the ARM architecture definition of
// each instruction. At the halt loop the test also checks that each
// mechanism of the design occurred: condition-failed instructions, taken
// branches, branch-with-link, jump by writing R15, flag updates, register-
// specified shifts, 32- and 64-bit multiplies, two-cycle loads and stores,
// swap, base write-back, UART frames sent and received, SPI transfers, and
// that the core ran one instruction per cycle except for loads, stores and
// swaps (two cycles each).
module tb_arm7_top;
  import arm7_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic txd, sclk, mosi, ss_n;
  logic [31:0] pc, inst, cpsr;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  arm7_top dut (
    .clk, .rst_n, .uart_rxd(txd), .uart_txd(txd),
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(mosi), .spi_ss_n(ss_n),
    .pc, .inst, .cpsr
  );

  typedef struct { logic [31:0] pc; logic [3:0] r; logic [31:0] val; } chk_t;
  localparam int NCHK = 39;
  chk_t table_q [NCHK] = '{
    '{pc: 32'h0024, r: 4'd0, val: 32'h00000002},
    '{pc: 32'h0024, r: 4'd1, val: 32'h00000001},
    '{pc: 32'h0024, r: 4'd2, val: 32'h00000015},
    '{pc: 32'h0024, r: 4'd3, val: 32'hFFFFFFFB},
    '{pc: 32'h0024, r: 4'd4, val: 32'h0000001D},
    '{pc: 32'h0024, r: 4'd5, val: 32'h0000003B},
    '{pc: 32'h0024, r: 4'd6, val: 32'h00000026},
    '{pc: 32'h0024, r: 4'd7, val: 32'h000000FE},
    '{pc: 32'h0024, r: 4'd8, val: 32'h0000000B},
    '{pc: 32'h002C, r: 4'd8, val: 32'h0000150B},
    '{pc: 32'h002C, r: 4'd9, val: 32'hFFFFEAF0},
    '{pc: 32'h003C, r: 4'd9, val: 32'h00FFEAF0},
    '{pc: 32'h003C, r: 4'd10, val: 32'hFFFFFFFD},
    '{pc: 32'h003C, r: 4'd11, val: 32'hC000000E},
    '{pc: 32'h003C, r: 4'd12, val: 32'h00000000},
    '{pc: 32'h0044, r: 4'd12, val: 32'h8000001D},
    '{pc: 32'h0054, r: 4'd13, val: 32'h00000003},
    '{pc: 32'h0054, r: 4'd14, val: 32'hFFFFFFFE},
    '{pc: 32'h0074, r: 4'd13, val: 32'h00000013},
    '{pc: 32'h0074, r: 4'd14, val: 32'hFFFFFFFF},
    '{pc: 32'h0084, r: 4'd6, val: 32'h000004D7},
    '{pc: 32'h0084, r: 4'd7, val: 32'h000004D8},
    '{pc: 32'h0084, r: 4'd8, val: 32'hFFFFFFF6},
    '{pc: 32'h0084, r: 4'd9, val: 32'h00000001},
    '{pc: 32'h0084, r: 4'd10, val: 32'hFFFFFFF6},
    '{pc: 32'h0084, r: 4'd11, val: 32'hFFFFFFFF},
    '{pc: 32'h00A4, r: 4'd4, val: 32'h0000000F},
    '{pc: 32'h00A4, r: 4'd12, val: 32'h00000000},
    '{pc: 32'h00A4, r: 4'd14, val: 32'h00000090},
    '{pc: 32'h00D8, r: 4'd3, val: 32'h000000A5},
    '{pc: 32'h00D8, r: 4'd2, val: 32'h00000001},
    '{pc: 32'h0104, r: 4'd7, val: 32'h0000003C},
    '{pc: 32'h0104, r: 4'd14, val: 32'h00000000},
    '{pc: 32'h0120, r: 4'd8, val: 32'h0000100C},
    '{pc: 32'h0120, r: 4'd9, val: 32'h000000A5},
    '{pc: 32'h0120, r: 4'd10, val: 32'h00000001},
    '{pc: 32'h0120, r: 4'd11, val: 32'h00000001},
    '{pc: 32'h0120, r: 4'd12, val: 32'h00000011},
    '{pc: 32'h0120, r: 4'd13, val: 32'h00000007}
  };
  localparam logic [31:0] HALT_PC = 32'h120;

  function automatic logic [31:0] rreg(input logic [3:0] r);
    return dut.u_dp.u_regfile.regs[r];
  endfunction

  // mechanism counters
  int n_condfail, n_branch, n_link, n_pcwrite, n_flags, n_regshift, n_mul32, n_mul64;
  int n_load, n_store, n_swap, n_wb, n_uart_tx, n_uart_rx, n_spi, n_instr, n_cycles, n_two;
  logic prev_busy_tx, prev_spi_busy;
  bit seen [logic [31:0]];

  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (!dut.phase) n_instr++;
    if (dut.phase) n_two++;
    if (dut.ctrl.pc_inc && inst[27:25] == 3'b101 && pc != HALT_PC) n_branch++;
    if (dut.ctrl.pc_inc && inst[27:25] == 3'b101 && inst[24]) n_link++;
    if (dut.ctrl.pc_inc && inst[27:26] == 2'b00) n_pcwrite++;
    if (dut.ctrl.s) n_flags++;
    if (dut.ctrl.shift_size_type == SHSZ_C && !dut.ctrl.bp_bs && inst[27:26] == 2'b00) n_regshift++;
    if (dut.ctrl.op3_type == OP3_MUL_L && !dut.ctrl.mul_type) n_mul32++;
    if (dut.ctrl.mul_type) n_mul64++;
    if (dut.ctrl.bus_re && !dut.ctrl.bus_we) n_load++;
    if (dut.ctrl.bus_we && !dut.ctrl.bus_re) n_store++;
    if (dut.ctrl.bus_we && dut.ctrl.bus_re) n_swap++;
    if (dut.ctrl.temp_en && dut.ctrl.rd_en) n_wb++;
    if (dut.u_uart.u_rx.valid) n_uart_rx++;
    if (prev_busy_tx && !dut.u_uart.tx_busy) n_uart_tx++;
    if (prev_spi_busy && !dut.u_spi.busy) n_spi++;
    prev_busy_tx <= dut.u_uart.tx_busy;
    prev_spi_busy <= dut.u_spi.busy;
  end

  // condition-failed instructions: no register, flag, PC-jump or bus effect
  always @(posedge clk) if (rst_n && inst[31:28] != 4'hE &&
      !dut.ctrl.rd_en && !dut.ctrl.pc_inc && !dut.ctrl.s && !dut.ctrl.bus_we && !dut.ctrl.bus_re)
    n_condfail++;

  // checkpoints: first arrival at an address, before it executes
  always @(negedge clk) if (rst_n && !dut.phase && !seen.exists(pc)) begin
    seen[pc] = 1'b1;
    foreach (table_q[i]) if (table_q[i].pc == pc) begin
      checks++;
      if (rreg(table_q[i].r) !== table_q[i].val) begin
        failures++;
        $display("FAIL pc=%h R%0d=%h expected %h", pc, table_q[i].r, rreg(table_q[i].r), table_q[i].val);
      end
    end
  end

  task automatic expect_seen(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    {n_condfail, n_branch, n_link, n_pcwrite, n_flags, n_regshift, n_mul32, n_mul64} = '0;
    {n_load, n_store, n_swap, n_wb, n_uart_tx, n_uart_rx, n_spi, n_instr, n_cycles, n_two} = '0;
    prev_busy_tx = 1'b0; prev_spi_busy = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (pc == HALT_PC);
    repeat (4) @(posedge clk);
    expect_seen("condition failed (skipped)", n_condfail);
    expect_seen("branch taken", n_branch);
    expect_seen("branch with link", n_link);
    expect_seen("jump by writing R15", n_pcwrite);
    expect_seen("CPSR flag update", n_flags);
    expect_seen("register-specified shift", n_regshift);
    expect_seen("32-bit multiply", n_mul32);
    expect_seen("64-bit multiply", n_mul64);
    expect_seen("load (two cycles)", n_load);
    expect_seen("store (two cycles)", n_store);
    expect_seen("swap", n_swap);
    expect_seen("base write-back", n_wb);
    expect_seen("UART frame sent", n_uart_tx);
    expect_seen("UART frame received", n_uart_rx);
    expect_seen("SPI transfer", n_spi);
    // every checkpoint reached
    checks++;
    foreach (table_q[i]) if (!seen.exists(table_q[i].pc)) begin
      failures++;
      $display("FAIL checkpoint %h never reached", table_q[i].pc);
      break;
    end
    // cycle accounting: each load/store/swap costs exactly one extra cycle
    checks++;
    if (n_two != n_load + n_store + n_swap || n_cycles != n_instr + n_two) begin
      failures++;
      $display("FAIL cycles=%0d instr=%0d second-cycles=%0d mem ops=%0d", n_cycles, n_instr, n_two,
               n_load + n_store + n_swap);
    end
    $display("  %-28s %0d (%0d instructions)", "cycles to halt", n_cycles, n_instr);
    // the SPI slave select was released and the UART line is idle
    checks++;
    if (!ss_n || !txd) begin failures++; $display("FAIL ss_n=%b txd=%b", ss_n, txd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: halt not reached, pc=%h", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
