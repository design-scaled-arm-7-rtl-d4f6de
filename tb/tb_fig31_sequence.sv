// tb_fig31_sequence: a short data-processing sequence whose register results
// are R0 = 2, R1 = 1, R2 = 0x15, R3 = 0xFFFFFFFB, R4 = 0x22 then 0x3C,
// R5 = 0x3B, R6 = 1, R7 = 4 and R11 = 0x3C, the values of the reference
// top-level waveform of this core; MOV R5,#0x3B (E3A0503B) is one of its
// instruction words. The program (tb/fig31_program.hex):
//   MOV R0,#2; MOV R1,#1; MOV R2,#0x15; MVN R3,#4; MOV R4,#0x22; MOV R5,#0x3B;
//   MOV R6,#1; MOV R7,#4; ADD R4,R5,R6; MOV R11,R4; B .
// Checks every register after every instruction against a model that
// applies each instruction's effect by hand, that the next PC is always the
// current PC + 4 until the halt branch, and that each instruction takes one
// cycle.
module tb_fig31_sequence;
  logic clk = 1'b0, rst_n = 1'b0;
  logic txd, sclk, mosi, ss_n;
  logic [31:0] pc, inst, cpsr;
  logic [31:0] model [15];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  arm7_top #(.ROM_FILE("tb/fig31_program.hex")) dut (
    .clk, .rst_n, .uart_rxd(1'b1), .uart_txd(txd),
    .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(1'b0), .spi_ss_n(ss_n),
    .pc, .inst, .cpsr
  );

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // register effect of word i of the program
  task automatic apply(input int i);
    case (i)
      0: model[0] = 2;
      1: model[1] = 1;
      2: model[2] = 32'h15;
      3: model[3] = ~32'd4;
      4: model[4] = 32'h22;
      5: model[5] = 32'h3B;
      6: model[6] = 1;
      7: model[7] = 4;
      8: model[4] = model[5] + model[6];
      9: model[11] = model[4];
      default: ;
    endcase
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      if (i > 0) @(negedge clk);
      check($sformatf("pc of word %0d", i), pc, 32'(4 * i));
      if (i == 5) check("instruction word", inst, 32'hE3A0_503B);
      check("pc_in = pc_out + 4", dut.u_dp.pc_in, pc + 32'd4);
      apply(i);
      @(posedge clk); #1;
      for (int r = 0; r < 15; r++) check($sformatf("R%0d after word %0d", r, i), dut.u_dp.u_regfile.regs[r], model[r]);
    end
    repeat (3) @(posedge clk);
    check("halted", pc, 32'h28);
    check("R4 final", dut.u_dp.u_regfile.regs[4], 32'h3C);
    check("R11 final", dut.u_dp.u_regfile.regs[11], 32'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
