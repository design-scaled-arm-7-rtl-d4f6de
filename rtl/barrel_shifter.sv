// barrel_shifter: single-cycle 32-bit shifter between B_bus and Alu_in2.
// It shifts or rotates the data by any amount 0..31 in one clock cycle, as the
// ARM operand-2 shifter does, and also produces the shifter carry-out used
// for the C flag of logical instructions. Bp_bs bypasses it (data passes
// unchanged, carry-out = carry-in).
// Shift types: LSL, LSR, ASR, ROR by shift_size; LSR32 / ASR32 are ARM's
// immediate "LSR #0" / "ASR #0" (shift by 32); RRX rotates right by one
// through the carry. A shift_size of 0 with LSL/LSR/ASR/ROR leaves the data
// unchanged and passes the carry, as ARM does for register-specified shifts.
// The shifter itself is combinational; the shift-size source (immediate
// rotate, inst[11:7] or Rs[4:0]) is chosen outside by the datapath.
// The source design gives the ports (Shift_size, B_bus, Shift, Bp_bs,
// Alu_in2); the shift semantics follow the ARM architecture, and the separate
// LSR32/ASR32/RRX codes are this design's way of encoding the immediate forms.
module barrel_shifter
  import arm7_pkg::*;
(
  input  logic [31:0] b_bus,
  input  logic [4:0]  shift_size,
  input  shift_t      shift,
  input  logic        bp_bs,
  input  logic        c_in,
  output logic [31:0] alu_in2,
  output logic        c_out
);

  always_comb begin
    alu_in2 = b_bus;
    c_out   = c_in;
    if (!bp_bs) begin
      unique case (shift)
        SH_LSL: if (shift_size != 0) begin
          alu_in2 = b_bus << shift_size;
          c_out   = b_bus[5'd0 - shift_size];   // bit 32 - shift_size
        end
        SH_LSR: if (shift_size != 0) begin
          alu_in2 = b_bus >> shift_size;
          c_out   = b_bus[shift_size - 5'd1];
        end
        SH_ASR: if (shift_size != 0) begin
          alu_in2 = $unsigned($signed(b_bus) >>> shift_size);
          c_out   = b_bus[shift_size - 5'd1];
        end
        SH_ROR: if (shift_size != 0) begin
          alu_in2 = (b_bus >> shift_size) | (b_bus << (6'd32 - {1'b0, shift_size}));
          c_out   = b_bus[shift_size - 5'd1];
        end
        SH_RRX: begin
          alu_in2 = {c_in, b_bus[31:1]};
          c_out   = b_bus[0];
        end
        SH_LSR32: begin
          alu_in2 = '0;
          c_out   = b_bus[31];
        end
        SH_ASR32: begin
          alu_in2 = {32{b_bus[31]}};
          c_out   = b_bus[31];
        end
        default: ;
      endcase
    end
  end

endmodule
