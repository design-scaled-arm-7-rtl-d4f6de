// controller: random-logic instruction decoder of the ARM7 core. From the
// 32-bit instruction and the CPSR flags it produces, by combinational logic,
// every control signal of the datapath (register addresses and enables, mux
// selects, shift type, ALU function, bypasses, CPSR update, bus strobes).
//
// Supported ARMv4 subset (everything conditional on inst[31:28]):
//   data processing, all 16 opcodes, immediate / immediate-shift / register-
//     shift operand 2, S bit; a write to R15 is a jump to the ALU result
//   MUL, MLA, UMULL, SMULL (with S)
//   B, BL (link = PC+4 into R14)
//   LDR, STR word, immediate or immediate-shifted register offset, up/down,
//     pre-indexed with optional write-back or post-indexed
//   SWP word
// Everything else (byte/halfword transfers, UMLAL/SMLAL, LDM/STM, SWI,
// coprocessor, MRS/MSR) and any instruction whose condition fails executes as
// a no-operation that only advances the PC.
//
// Timing: one cycle per instruction except LDR, STR and SWP, which take two.
// A single phase flip-flop, the only state in the controller, marks the
// second cycle: cycle 1 computes the address into Temp_reg (and performs the
// base write-back) with the PC held; cycle 2 drives Temp_reg onto the address
// bus, strobes bus_re/bus_we and advances the PC.
// The source design describes a random-logic (combinational) decoder for
// data-processing, arithmetic, logical, compare and branch instructions; the
// multiply, load/store and swap decoding, the phase flip-flop and the no-op
// treatment of unsupported instructions are this design's.
module controller
  import arm7_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] inst,
  input  logic [3:0]  nzcv,     // CPSR[31:28]
  output ctrl_t       ctrl,
  output logic        phase     // 1 in the second cycle of a load/store/swap
);

  logic n, z, c, v, cond_pass;
  logic is_mul, is_mull, is_swp, is_dp, is_ldst, is_b, two_cycle;
  logic [3:0] opc;

  assign {n, z, c, v} = nzcv;

  // Condition field
  always_comb begin
    unique case (inst[31:28])
      4'h0: cond_pass = z;
      4'h1: cond_pass = !z;
      4'h2: cond_pass = c;
      4'h3: cond_pass = !c;
      4'h4: cond_pass = n;
      4'h5: cond_pass = !n;
      4'h6: cond_pass = v;
      4'h7: cond_pass = !v;
      4'h8: cond_pass = c && !z;
      4'h9: cond_pass = !c || z;
      4'hA: cond_pass = (n == v);
      4'hB: cond_pass = (n != v);
      4'hC: cond_pass = !z && (n == v);
      4'hD: cond_pass = z || (n != v);
      4'hE: cond_pass = 1'b1;
      default: cond_pass = 1'b0;   // NV: never
    endcase
  end

  // Instruction classes
  assign opc     = inst[24:21];
  assign is_mul  = inst[27:22] == 6'b000000 && inst[7:4] == 4'b1001;
  assign is_mull = inst[27:23] == 5'b00001 && !inst[21] && inst[7:4] == 4'b1001;  // no accumulate
  assign is_swp  = inst[27:20] == 8'b00010000 && inst[11:4] == 8'b00001001;
  assign is_dp   = inst[27:26] == 2'b00 &&
                   (inst[25] || !(inst[7] && inst[4])) &&          // not mul/swp/halfword
                   !(opc[3:2] == 2'b10 && !inst[20]);             // not MRS/MSR
  assign is_ldst = inst[27:26] == 2'b01 && !(inst[25] && inst[4]) && !inst[22];
  assign is_b    = inst[27:25] == 3'b101;
  assign two_cycle = cond_pass && (is_ldst || is_swp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= two_cycle && !phase;
  end

  always_comb begin
    // Defaults: nothing written, PC advances by 4.
    ctrl = '0;
    ctrl.ran2 = inst[15:12];
    ctrl.ran  = inst[19:16];
    ctrl.ras  = inst[11:8];
    ctrl.ram  = inst[3:0];
    ctrl.rad  = inst[15:12];
    ctrl.radh = inst[19:16];
    ctrl.pc_en = 1'b1;
    ctrl.op2_type = OP2_RM;
    ctrl.op3_type = OP3_OP2;
    ctrl.shift_size_type = SHSZ_B;
    ctrl.shift = SH_LSL;
    ctrl.op4_type = OP4_A_BUS;
    ctrl.alu_fun = ALU_ADD;
    ctrl.op5_type = OP5_ALU;
    ctrl.op6_type = OP6_MUL_H;

    if (cond_pass) begin
      if (is_mul) begin
        // MUL/MLA: Rd = inst[19:16], Rn (accumulate) = inst[15:12]
        ctrl.rad  = inst[19:16];
        ctrl.ran2 = inst[15:12];
        ctrl.op3_type = OP3_MUL_L;
        ctrl.bp_bs = 1'b1;
        ctrl.ulta = 1'b1;
        ctrl.op4_type = inst[21] ? OP4_A_BUS : OP4_K;
        ctrl.alu_fun = ALU_ADD;
        ctrl.rd_en = (inst[19:16] != 4'd15);
        ctrl.s = inst[20];
      end else if (is_mull) begin
        // UMULL/SMULL: RdLo = inst[15:12], RdHi = inst[19:16]
        ctrl.mul_type = 1'b1;
        ctrl.unsigned_signed = inst[22];
        ctrl.op3_type = OP3_MUL_L;
        ctrl.bp_bs = 1'b1;
        ctrl.op4_type = OP4_K;
        ctrl.alu_fun = ALU_ADD;
        ctrl.rad  = inst[15:12];
        ctrl.radh = inst[19:16];
        ctrl.op6_type = OP6_MUL_H;
        ctrl.rd_en  = 1'b1;
        ctrl.rdh_en = 1'b1;
        ctrl.s = inst[20];
      end else if (is_swp) begin
        if (!phase) begin
          ctrl.temp_en = 1'b1;            // Temp_reg <= Rn (A_bus)
          ctrl.load_store = 1'b0;
          ctrl.pc_en = 1'b0;
        end else begin
          ctrl.addr_buf_sel = 1'b1;
          ctrl.swap = 1'b1;               // Data_buf <= Rm
          ctrl.bus_re = 1'b1;
          ctrl.bus_we = 1'b1;
          ctrl.op5_type = OP5_DATA_IN;
          ctrl.rd_en = (inst[15:12] != 4'd15);
        end
      end else if (is_dp) begin
        ctrl.alu_fun = alu_fun_t'(opc);
        ctrl.s = inst[20];
        ctrl.rd_en = !(opc[3:2] == 2'b10) && (inst[15:12] != 4'd15);
        ctrl.pc_inc = !(opc[3:2] == 2'b10) && (inst[15:12] == 4'd15);
        if (inst[25]) begin
          // 8-bit immediate rotated right by 2 * inst[11:8]
          ctrl.op2_type = OP2_IMM8;
          ctrl.shift_size_type = SHSZ_A;
          ctrl.shift = SH_ROR;
        end else if (!inst[4]) begin
          // register shifted by immediate inst[11:7]
          ctrl.shift_size_type = SHSZ_B;
          unique case (inst[6:5])
            2'b00: ctrl.shift = SH_LSL;
            2'b01: ctrl.shift = (inst[11:7] == 0) ? SH_LSR32 : SH_LSR;
            2'b10: ctrl.shift = (inst[11:7] == 0) ? SH_ASR32 : SH_ASR;
            default: ctrl.shift = (inst[11:7] == 0) ? SH_RRX : SH_ROR;
          endcase
        end else begin
          // register shifted by Rs[4:0]
          ctrl.shift_size_type = SHSZ_C;
          ctrl.shift = shift_t'({1'b0, inst[6:5]});
        end
      end else if (is_ldst) begin
        if (!phase) begin
          // address = Rn +/- offset; optional base write-back
          if (inst[25]) begin
            ctrl.op2_type = OP2_RM;
            ctrl.shift_size_type = SHSZ_B;
            unique case (inst[6:5])
              2'b00: ctrl.shift = SH_LSL;
              2'b01: ctrl.shift = (inst[11:7] == 0) ? SH_LSR32 : SH_LSR;
              2'b10: ctrl.shift = (inst[11:7] == 0) ? SH_ASR32 : SH_ASR;
              default: ctrl.shift = (inst[11:7] == 0) ? SH_RRX : SH_ROR;
            endcase
          end else begin
            ctrl.op2_type = OP2_IMM12;
            ctrl.bp_bs = 1'b1;
          end
          ctrl.alu_fun = inst[23] ? ALU_ADD : ALU_SUB;
          ctrl.temp_en = 1'b1;
          ctrl.load_store = inst[24];     // pre-index: Alu_out, post-index: Rn
          ctrl.rad = inst[19:16];
          ctrl.rd_en = (!inst[24] || inst[21]) && (inst[19:16] != 4'd15);
          ctrl.pc_en = 1'b0;
        end else begin
          ctrl.addr_buf_sel = 1'b1;
          if (inst[20]) begin
            ctrl.bus_re = 1'b1;
            ctrl.op5_type = OP5_DATA_IN;
            ctrl.rd_en = (inst[15:12] != 4'd15);
          end else begin
            ctrl.bus_we = 1'b1;             // Data_buf <= Rn2 (= Rd)
          end
        end
      end else if (is_b) begin
        // target = PC+8 + sign_extend(imm24) * 4
        ctrl.ran = 4'd15;
        ctrl.op2_type = OP2_SIMM24;
        ctrl.bp_bs = 1'b1;
        ctrl.alu_fun = ALU_ADD;
        ctrl.pc_inc = 1'b1;
        ctrl.rad = 4'd14;
        ctrl.op5_type = OP5_LINK;
        ctrl.rd_en = inst[24];
      end
    end
  end

endmodule
