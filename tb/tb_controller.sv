// tb_controller: test of the instruction decoder.
// 1. Condition codes: for every condition field and every NZCV value, a
//    data-processing instruction must write its register exactly when the
//    ARM condition (written out here as a truth table) holds.
// 2. Decoding: for one instruction of each supported class the main control
//    fields (addresses, enables, mux selects, ALU function, shift type,
//    flag update, bus strobes) are compared with values derived by hand from
//    the ARM encoding.
// 3. Two-cycle sequencing: LDR, STR and SWP hold the PC in the first cycle
//    and strobe the bus in the second; a data-processing instruction never
//    enters the second phase.
module tb_controller;
  import arm7_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] inst;
  logic [3:0] nzcv;
  ctrl_t ctrl;
  logic phase;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  controller dut (.*);

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (inst %h)", what, got, exp, inst);
    end
  endtask

  function automatic bit cond_ref(input logic [3:0] c, input logic [3:0] f);
    bit n = f[3], z = f[2], cf = f[1], v = f[0];
    case (c)
      0: return z;          1: return !z;
      2: return cf;         3: return !cf;
      4: return n;          5: return !n;
      6: return v;          7: return !v;
      8: return cf & !z;    9: return !cf | z;
      10: return n == v;    11: return n != v;
      12: return !z & (n == v); 13: return z | (n != v);
      14: return 1;         default: return 0;
    endcase
  endfunction

  initial begin
    inst = 32'hE1A0_0000; nzcv = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. condition codes with ADD R1, R2, R3
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        @(negedge clk);
        inst = {4'(c), 28'h0821003}; nzcv = 4'(f);
        #1 check($sformatf("cond %0d flags %b", c, f[3:0]), ctrl.rd_en, cond_ref(4'(c), 4'(f)));
      end

    // 2. decoding (all unconditional)
    @(negedge clk); nzcv = 4'b0000;
    inst = 32'hE2945C3F;   // ADDS R5, R4, #0x3F00 (0x3F ror 24)
    #1;
    check("adds rad", ctrl.rad, 5); check("adds ran", ctrl.ran, 4);
    check("adds op2", ctrl.op2_type, OP2_IMM8); check("adds shsz", ctrl.shift_size_type, SHSZ_A);
    check("adds shift", ctrl.shift, SH_ROR); check("adds alu", ctrl.alu_fun, ALU_ADD);
    check("adds s/rd_en/pc_en", {ctrl.s, ctrl.rd_en, ctrl.pc_en, ctrl.pc_inc}, 4'b1110);

    inst = 32'hE1520003; #1;   // CMP R2, R3
    check("cmp", {ctrl.alu_fun, ctrl.s, ctrl.rd_en}, {ALU_CMP, 2'b10});

    inst = 32'hE1A0B051; #1;   // MOV R11, R1, ASR R0
    check("mov asr reg", {ctrl.shift_size_type, ctrl.shift, ctrl.ras, ctrl.ram, ctrl.rad},
          {SHSZ_C, SH_ASR, 4'd0, 4'd1, 4'd11});
    inst = 32'hE1A02021; #1;   // MOV R2, R1, LSR #32 (encoded as LSR #0)
    check("lsr #32", ctrl.shift, SH_LSR32);
    inst = 32'hE1A02061; #1;   // MOV R2, R1, RRX
    check("rrx", ctrl.shift, SH_RRX);
    inst = 32'hE1A0F00E; #1;   // MOV PC, LR
    check("mov pc", {ctrl.rd_en, ctrl.pc_inc, ctrl.ram}, {2'b01, 4'd14});

    inst = 32'hE0270291; #1;   // MLA R7, R1, R2, R0
    check("mla", {ctrl.rad, ctrl.ram, ctrl.ras, ctrl.ran2, ctrl.ulta, ctrl.op3_type, ctrl.op4_type, ctrl.rd_en, ctrl.mul_type},
          {4'd7, 4'd1, 4'd2, 4'd0, 1'b1, OP3_MUL_L, OP4_A_BUS, 1'b1, 1'b0});
    inst = 32'hE0C98093; #1;   // SMULL R8, R9, R3, R0
    check("smull", {ctrl.rad, ctrl.radh, ctrl.rd_en, ctrl.rdh_en, ctrl.mul_type, ctrl.unsigned_signed, ctrl.op6_type},
          {4'd8, 4'd9, 4'b1111, OP6_MUL_H});

    inst = 32'hEB000010; #1;   // BL +0x10 words
    check("bl", {ctrl.ran, ctrl.op2_type, ctrl.pc_inc, ctrl.rd_en, ctrl.rad, ctrl.op5_type},
          {4'd15, OP2_SIMM24, 2'b11, 4'd14, OP5_LINK});
    inst = 32'hEA000010; #1;   // B
    check("b", {ctrl.pc_inc, ctrl.rd_en}, 2'b10);

    inst = 32'hEF000000; #1;   // SWI: not supported -> no-op
    check("swi nop", {ctrl.rd_en, ctrl.rdh_en, ctrl.s, ctrl.pc_inc, ctrl.bus_re, ctrl.bus_we, ctrl.pc_en}, 7'b0000001);

    // 3. two-cycle sequencing
    inst = 32'hE5912004;       // LDR R2, [R1, #4]
    #1;
    check("ldr c1", {phase, ctrl.pc_en, ctrl.temp_en, ctrl.load_store, ctrl.bus_re, ctrl.rd_en, ctrl.op2_type, ctrl.alu_fun},
          {6'b001100, OP2_IMM12, ALU_ADD});
    @(negedge clk); #1;
    check("ldr c2", {phase, ctrl.pc_en, ctrl.addr_buf_sel, ctrl.bus_re, ctrl.bus_we, ctrl.rd_en, ctrl.rad, ctrl.op5_type},
          {6'b111101, 4'd2, OP5_DATA_IN});
    @(negedge clk); inst = 32'hE4012008; #1;   // STR R2, [R1], #-8 (post-index)
    check("str c1", {phase, ctrl.pc_en, ctrl.temp_en, ctrl.load_store, ctrl.rd_en, ctrl.rad, ctrl.alu_fun},
          {5'b00101, 4'd1, ALU_SUB});
    @(negedge clk); #1;
    check("str c2", {phase, ctrl.pc_en, ctrl.bus_we, ctrl.bus_re, ctrl.ran2, ctrl.swap, ctrl.rd_en}, {4'b1110, 4'd2, 2'b00});
    @(negedge clk); inst = 32'hE1013092; #1;   // SWP R3, R2, [R1]
    check("swp c1", {phase, ctrl.pc_en, ctrl.temp_en, ctrl.ran}, {3'b001, 4'd1});
    @(negedge clk); #1;
    check("swp c2", {phase, ctrl.bus_we, ctrl.bus_re, ctrl.swap, ctrl.ram, ctrl.rad, ctrl.op5_type},
          {4'b1111, 4'd2, 4'd3, OP5_DATA_IN});
    @(negedge clk); inst = 32'hE0821003; #1;
    check("dp single", phase, 0);
    @(negedge clk); #1;
    check("dp stays single", phase, 0);
    @(negedge clk); inst = 32'h05912004; nzcv = 4'b0000; #1;   // LDREQ, condition fails
    @(negedge clk); #1;
    check("ldr cond fail single cycle", {phase, ctrl.bus_re}, 2'b00);

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
