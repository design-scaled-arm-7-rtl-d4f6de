// tb_datapath: directed test of the multiplexer-based datapath, driving its
// control word by hand (no controller). Each step sets up one operation the
// way the controller would for an ARM instruction and checks the result
// through the datapath's own outputs: registers are read back through the
// Rn2 read port onto data_buf (Swap = 0), the CPSR, PC and address buffer are
// outputs. Covered: rotated immediates, immediate and register shifts, ALU
// with flag update, 32/64-bit multiply with accumulate via Ulta, Temp_reg with
// both Load_store inputs, Addr_buf select, Op4 = Temp_reg and K, Op5 data-in
// and link, Op6 selects, Swap, PC increment and branch.
module tb_datapath;
  import arm7_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl;
  logic [31:0] inst, data_in, pc_out, addr_buf, data_buf, cpsr;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  datapath dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic ctrl_t idle();
    ctrl_t c = '0;
    c.alu_fun = ALU_ADD;
    return c;
  endfunction

  // apply a control word for one clock cycle
  task automatic step(input ctrl_t c, input logic [31:0] i = 32'h0);
    @(negedge clk);
    ctrl = c; inst = i;
    @(posedge clk);
    #1 ctrl = idle();
  endtask

  task automatic reg_is(input int r, input logic [31:0] exp);
    @(negedge clk);
    ctrl = idle(); ctrl.ran2 = 4'(r);
    #1 check($sformatf("R%0d", r), data_buf, exp);
  endtask

  // MOV rd, #imm8 ROR 2*rot
  task automatic mov_imm(input int rd, input logic [3:0] rot, input logic [7:0] imm8);
    ctrl_t c = idle();
    c.op2_type = OP2_IMM8; c.shift_size_type = SHSZ_A; c.shift = SH_ROR;
    c.alu_fun = ALU_MOV; c.rad = 4'(rd); c.rd_en = 1'b1; c.op5_type = OP5_ALU;
    step(c, {20'd0, rot, imm8});
  endtask

  initial begin
    ctrl_t c;
    ctrl = idle(); inst = '0; data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check("cpsr reset", cpsr, 32'h0000_00D3);
    check("pc reset", pc_out, 32'h0);

    mov_imm(1, 4'd0, 8'h12);                 // R1 = 0x12
    mov_imm(2, 4'd4, 8'hFF);                 // R2 = 0xFF000000
    mov_imm(3, 4'd15, 8'h03);                // R3 = 0x0000000C (ror 30)
    reg_is(1, 32'h12); reg_is(2, 32'hFF00_0000); reg_is(3, 32'hC);

    // ADD R4, R1, R3, LSL #4  -> 0x12 + 0xC0 = 0xD2
    c = idle(); c.ran = 1; c.ram = 3; c.op2_type = OP2_RM; c.shift_size_type = SHSZ_B;
    c.shift = SH_LSL; c.alu_fun = ALU_ADD; c.rad = 4; c.rd_en = 1;
    step(c, {20'd0, 5'd4, 2'b00, 1'b0, 4'd3});
    reg_is(4, 32'hD2);

    // SUBS R5, R1, R2, LSR R3  (R2 >> 12 = 0xFF000) -> 0x12 - 0xFF000, N=1 C=0
    c = idle(); c.ran = 1; c.ram = 2; c.ras = 3; c.shift_size_type = SHSZ_C; c.shift = SH_LSR;
    c.alu_fun = ALU_SUB; c.rad = 5; c.rd_en = 1; c.s = 1;
    step(c);
    reg_is(5, 32'h12 - 32'hFF000);
    check("flags after SUBS", cpsr, 32'h8000_00D3);

    // CMP R1, R1 with S: Z=1 C=1; no write
    c = idle(); c.ran = 1; c.ram = 1; c.bp_bs = 1; c.alu_fun = ALU_CMP; c.s = 1;
    step(c);
    check("flags after CMP", cpsr, 32'h6000_00D3);

    // UMULL R6(lo), R7(hi) = R2 * R4 ; SMULL R8, R9 = R2 * R4
    for (int sgn = 0; sgn < 2; sgn++) begin
      c = idle(); c.ras = 2; c.ram = 4; c.mul_type = 1; c.unsigned_signed = sgn[0];
      c.op3_type = OP3_MUL_L; c.bp_bs = 1; c.op4_type = OP4_K; c.alu_fun = ALU_ADD;
      c.rad = 4'(6 + 2 * sgn); c.rd_en = 1; c.radh = 4'(7 + 2 * sgn); c.rdh_en = 1; c.op6_type = OP6_MUL_H;
      step(c);
    end
    reg_is(6, 32'h2E00_0000);                           // 0xFF000000 * 0xD2 = 0xD1_2E000000
    reg_is(7, 32'h0000_00D1);                           // 0xD1_2E000000 (unsigned)
    reg_is(8, 32'h2E00_0000);
    reg_is(9, 32'hFFFF_FFFF);                           // -0x1000000*0xD2 = -0xD2000000

    // MLA R10 = R1 * R3 + R4 (accumulator through Ulta = Rn2)
    c = idle(); c.ras = 3; c.ram = 1; c.op3_type = OP3_MUL_L; c.bp_bs = 1;
    c.ulta = 1; c.ran2 = 4; c.op4_type = OP4_A_BUS; c.alu_fun = ALU_ADD; c.rad = 10; c.rd_en = 1;
    step(c);
    reg_is(10, 32'h12 * 32'hC + 32'hD2);

    // Temp_reg <= Rn (Load_store = A_bus); then Temp_reg <= Rn + imm12
    c = idle(); c.ran = 4; c.temp_en = 1; c.load_store = 0;
    step(c);
    @(negedge clk); ctrl = idle(); ctrl.addr_buf_sel = 1; #1 check("addr_buf=temp(A_bus)", addr_buf, 32'hD2);
    c = idle(); c.ran = 4; c.op2_type = OP2_IMM12; c.bp_bs = 1; c.alu_fun = ALU_SUB;
    c.temp_en = 1; c.load_store = 1;
    step(c, 32'h0000_0002);
    @(negedge clk); ctrl = idle(); ctrl.addr_buf_sel = 1; #1 check("addr_buf=temp(Alu_out)", addr_buf, 32'hD0);
    @(negedge clk); ctrl = idle(); ctrl.addr_buf_sel = 0; #1 check("addr_buf=pc", addr_buf, pc_out);

    // Op4 = Temp_reg: R11 = Temp_reg + R1
    c = idle(); c.op4_type = OP4_TEMP; c.ram = 1; c.bp_bs = 1; c.alu_fun = ALU_ADD; c.rad = 11; c.rd_en = 1;
    step(c);
    reg_is(11, 32'hD0 + 32'h12);

    // Op5 = data in; Op6 = Rn2 and Rd
    data_in = 32'hCAFE_F00D;
    c = idle(); c.op5_type = OP5_DATA_IN; c.rad = 12; c.rd_en = 1;
    c.op6_type = OP6_RN2; c.ran2 = 1; c.radh = 13; c.rdh_en = 1;
    step(c);
    reg_is(12, 32'hCAFE_F00D); reg_is(13, 32'h12);
    c = idle(); c.op5_type = OP5_DATA_IN; c.rad = 0; c.rd_en = 1; c.op6_type = OP6_RD; c.radh = 14; c.rdh_en = 1;
    step(c);
    reg_is(14, 32'hCAFE_F00D);

    // Swap: data_buf = Rm
    @(negedge clk); ctrl = idle(); ctrl.swap = 1; ctrl.ram = 10; #1 check("swap", data_buf, 32'h12 * 32'hC + 32'hD2);

    // PC: three increments, then branch -2 words with link into R14
    c = idle(); c.pc_en = 1;
    step(c); step(c); step(c);
    check("pc+4 x3", pc_out, 32'hC);
    c = idle(); c.pc_en = 1; c.pc_inc = 1; c.ran = 15; c.op2_type = OP2_SIMM24; c.bp_bs = 1;
    c.alu_fun = ALU_ADD; c.rad = 14; c.rd_en = 1; c.op5_type = OP5_LINK;
    step(c, 32'hEBFF_FFFE);
    check("branch target", pc_out, 32'hC + 32'd8 - 32'd8);
    reg_is(14, 32'h10);
    reg_is(15, 32'hC + 32'd8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
