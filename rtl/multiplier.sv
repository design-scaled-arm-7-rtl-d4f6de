// multiplier: the MUL block of the datapath. It multiplies Rs by the output
// of the Op2 mux (normally Rm). Mul_type selects a 32-bit result (MUL/MLA:
// only MUL_L is meaningful) or a 64-bit result (UMULL/SMULL: MUL_H:MUL_L);
// Unsigned_signed selects unsigned (0) or two's-complement signed (1)
// operands for the 64-bit product. Both halves feed the Op3 mux and MUL_H also
// feeds the Op6 mux for the high-word write port.
// Combinational (single cycle); the document gives the function, the
// implementation as one wide product is this design's choice.
module multiplier (
  input  logic [31:0] rs,
  input  logic [31:0] op2,
  input  logic        mul_type,         // 0 = 32-bit, 1 = 64-bit
  input  logic        unsigned_signed,  // 0 = unsigned, 1 = signed
  output logic [31:0] mul_l,
  output logic [31:0] mul_h
);

  logic signed [65:0] prod;
  logic sgn;

  always_comb begin
    sgn  = mul_type & unsigned_signed;
    prod = $signed({sgn & rs[31], sgn & rs[31], rs}) *
           $signed({sgn & op2[31], sgn & op2[31], op2});
    mul_l = prod[31:0];
    mul_h = mul_type ? prod[63:32] : 32'd0;
  end

endmodule
