// datapath: the multiplexer-based ARM7 datapath. Every operation is steered
// by the controller's control word (ctrl_t) through a set of muxes around
// the register file, multiplier, barrel shifter and ALU:
//   Op2   : Rm | zero-extended inst[7:0] | Sign_inst (sign-extended inst[23:0],
//           word-aligned) | zero-extended inst[11:0]      -> MUL, Op3
//   Op3   : Op2 | MUL_L | MUL_H                          -> B_bus
//   Shift_size_type : A = inst[11:8]*2 | B = inst[11:7] | C = Rs[4:0]
//   Ulta  : Rn | Rn2                                     -> A_bus
//   Op4   : A_bus | Temp_reg | constant K                -> Alu_in1
//   Op5   : Alu_out | MUL_L | Data_in_reg | PC+4 (link)  -> Rd write data
//   Op6   : MUL_H | Rn2 | Rd                             -> Rdh write data
//   Load_store : A_bus | Alu_out                         -> Temp_reg
//   Addr_buf_sel : Pc_out | Temp_reg                     -> address bus
//   Swap  : Rn2 | Rm                                     -> data bus (Data_buf)
//   Pc_inc: PC+4 | Branch_address (= Alu_out)            -> Pc_in
//   S     : keep CPSR | {NZCV, Q, CPSR[26:0]}            -> CPSR
// Temp_reg carries a value between the two cycles of a load, store or swap:
// the first cycle computes the address into it, the second drives it onto the
// address bus. The CPSR resets to 0x000000D3 (supervisor mode, interrupts
// masked) as an ARM7 does; mode bits are held but have no effect here.
// Timing: single-cycle for data processing, multiply and branch; the
// register file, Temp_reg, CPSR and PC update on the rising edge. data_in is
// the bus read data and must be valid in the cycle bus_re is high.
// The mux names and their inputs follow the source design's datapath diagram;
// the input order of each mux, the load/store offset input of Op2, the PC+4
// link input of Op5 (in place of an interrupt vector input) and K = 0 are this
// design's choices.
module datapath
  import arm7_pkg::*;
#(
  parameter logic [31:0] K = 32'd0            // constant input of the Op4 mux
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  input  logic [31:0] inst,
  input  logic [31:0] data_in,                // Data_in_reg: bus read data
  output logic [31:0] pc_out,
  output logic [31:0] addr_buf,
  output logic [31:0] data_buf,
  output logic [31:0] cpsr
);

  logic [31:0] rn2, rn, rs, rm;
  logic [31:0] op2_out, b_bus, a_bus, alu_in1, alu_in2, alu_out;
  logic [31:0] mul_l, mul_h, rd_data, rdh_data, pc_in, pc_plus4;
  logic [31:0] temp_reg_in, temp_reg_out, cpsr_reg_in;
  logic [4:0]  shift_size;
  logic        sh_c;
  logic [3:0]  nzcv;

  regfile u_regfile (
    .clk, .rst_n,
    .ran2(ctrl.ran2), .ran(ctrl.ran), .ras(ctrl.ras), .ram(ctrl.ram),
    .rn2, .rn, .rs, .rm,
    .rad(ctrl.rad), .rd_en(ctrl.rd_en), .rd(rd_data),
    .radh(ctrl.radh), .rdh_en(ctrl.rdh_en), .rdh(rdh_data),
    .pc_en(ctrl.pc_en), .pc_in, .pc_out
  );

  // Op2 mux
  always_comb begin
    unique case (ctrl.op2_type)
      OP2_RM:     op2_out = rm;
      OP2_IMM8:   op2_out = {24'd0, inst[7:0]};
      OP2_SIMM24: op2_out = {{6{inst[23]}}, inst[23:0], 2'b00};
      default:    op2_out = {20'd0, inst[11:0]};
    endcase
  end

  multiplier u_mul (
    .rs, .op2(op2_out), .mul_type(ctrl.mul_type),
    .unsigned_signed(ctrl.unsigned_signed), .mul_l, .mul_h
  );

  // Op3 mux
  always_comb begin
    unique case (ctrl.op3_type)
      OP3_MUL_L: b_bus = mul_l;
      OP3_MUL_H: b_bus = mul_h;
      default:   b_bus = op2_out;
    endcase
  end

  // Shift_size_type mux
  always_comb begin
    unique case (ctrl.shift_size_type)
      SHSZ_A:  shift_size = {inst[11:8], 1'b0};
      SHSZ_B:  shift_size = inst[11:7];
      default: shift_size = rs[4:0];
    endcase
  end

  barrel_shifter u_bs (
    .b_bus, .shift_size, .shift(ctrl.shift), .bp_bs(ctrl.bp_bs),
    .c_in(cpsr[CPSR_C]), .alu_in2, .c_out(sh_c)
  );

  // Ulta and Op4 muxes
  assign a_bus = ctrl.ulta ? rn2 : rn;
  always_comb begin
    unique case (ctrl.op4_type)
      OP4_TEMP: alu_in1 = temp_reg_out;
      OP4_K:    alu_in1 = K;
      default:  alu_in1 = a_bus;
    endcase
  end

  alu u_alu (
    .alu_in1, .alu_in2, .alu_fun(ctrl.alu_fun), .bp_alu(ctrl.bp_alu),
    .c_in(cpsr[CPSR_C]), .sh_c, .v_in(cpsr[CPSR_V]), .alu_out, .nzcv
  );

  // Op5 / Op6 muxes (register file write data)
  assign pc_plus4 = pc_out + 32'd4;
  always_comb begin
    unique case (ctrl.op5_type)
      OP5_MUL_L:   rd_data = mul_l;
      OP5_DATA_IN: rd_data = data_in;
      OP5_LINK:    rd_data = pc_plus4;
      default:     rd_data = alu_out;
    endcase
    unique case (ctrl.op6_type)
      OP6_RN2: rdh_data = rn2;
      OP6_RD:  rdh_data = rd_data;
      default: rdh_data = mul_h;
    endcase
  end

  // PC increment / branch mux
  assign pc_in = ctrl.pc_inc ? alu_out : pc_plus4;

  // Temp_reg with its Load_store input mux
  assign temp_reg_in = ctrl.load_store ? alu_out : a_bus;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            temp_reg_out <= '0;
    else if (ctrl.temp_en) temp_reg_out <= temp_reg_in;
  end

  // CPSR with its S mux
  assign cpsr_reg_in = ctrl.s ? {nzcv, cpsr[CPSR_Q], cpsr[26:0]} : cpsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cpsr <= 32'h0000_00D3;
    else        cpsr <= cpsr_reg_in;
  end

  // Bus buffers
  assign addr_buf = ctrl.addr_buf_sel ? temp_reg_out : pc_out;
  assign data_buf = ctrl.swap ? rm : rn2;

endmodule
