// alu: the ARM arithmetic and logic unit. Alu_fun selects one of the sixteen
// ARM data-processing functions (AND, EOR, SUB, RSB, ADD, ADC, SBC, RSC, TST,
// TEQ, CMP, CMN, ORR, MOV, BIC, MVN); the compare/test functions compute the
// same result as their AND/EOR/SUB/ADD counterparts, and the controller simply
// does not write it back. Bp_alu bypasses the unit: Alu_out = Alu_in2.
// Alu_in1 comes from the Op4 mux (Rn, Rn2, Temp_reg or the constant K) and
// Alu_in2 from the barrel shifter.
// Flags: N and Z from the result; C is the adder carry (NOT borrow for
// subtraction, as ARM defines it) for arithmetic functions and the shifter
// carry for logical ones and for the bypass; V is the signed overflow of
// arithmetic functions and is left at v_in otherwise. Q is not produced here
// (ARMv4 has no saturating arithmetic); the CPSR keeps its Q bit.
// Purely combinational.
// The source design names the unit, its Alu_fun and Bp_alu controls and its
// NZCVQ output; the opcode encoding and flag rules are taken from the ARM
// architecture.
module alu
  import arm7_pkg::*;
(
  input  logic [31:0] alu_in1,
  input  logic [31:0] alu_in2,
  input  alu_fun_t    alu_fun,
  input  logic        bp_alu,
  input  logic        c_in,      // CPSR C, used by ADC/SBC/RSC
  input  logic        sh_c,      // barrel shifter carry-out
  input  logic        v_in,      // CPSR V, kept by logical functions
  output logic [31:0] alu_out,
  output logic [3:0]  nzcv
);

  logic [32:0] sum;
  logic [31:0] a, b;
  logic        arith, cin;

  always_comb begin
    // Operand set-up for the adder: a + b + cin.
    arith = 1'b1;
    a = alu_in1;
    b = alu_in2;
    cin = 1'b0;
    unique case (alu_fun)
      ALU_SUB, ALU_CMP: begin b = ~alu_in2; cin = 1'b1; end
      ALU_RSB:          begin a = ~alu_in1; cin = 1'b1; end
      ALU_ADD, ALU_CMN: cin = 1'b0;
      ALU_ADC:          cin = c_in;
      ALU_SBC:          begin b = ~alu_in2; cin = c_in; end
      ALU_RSC:          begin a = ~alu_in1; cin = c_in; end
      default:          arith = 1'b0;
    endcase
    sum = {1'b0, a} + {1'b0, b} + {32'd0, cin};

    unique case (alu_fun)
      ALU_AND, ALU_TST: alu_out = alu_in1 & alu_in2;
      ALU_EOR, ALU_TEQ: alu_out = alu_in1 ^ alu_in2;
      ALU_ORR:          alu_out = alu_in1 | alu_in2;
      ALU_MOV:          alu_out = alu_in2;
      ALU_BIC:          alu_out = alu_in1 & ~alu_in2;
      ALU_MVN:          alu_out = ~alu_in2;
      default:          alu_out = sum[31:0];
    endcase
    if (bp_alu) begin
      alu_out = alu_in2;
      arith = 1'b0;
    end

    nzcv[3] = alu_out[31];
    nzcv[2] = (alu_out == 32'd0);
    nzcv[1] = arith ? sum[32] : sh_c;
    nzcv[0] = arith ? ((a[31] == b[31]) && (sum[31] != a[31])) : v_in;
  end

endmodule
