// tb_barrel_shifter: exhaustive-amount, random-data test of the barrel
// shifter. The reference shifts one bit at a time in a loop, tracking the
// last bit shifted out as the carry, which is how ARM defines each shift;
// it checks all shift types, amounts 0..31, the 32-bit special forms, RRX
// and the bypass.
module tb_barrel_shifter;
  import arm7_pkg::*;
  logic [31:0] b_bus, alu_in2;
  logic [4:0] shift_size;
  shift_t shift;
  logic bp_bs, c_in, c_out;
  int checks = 0, failures = 0;

  barrel_shifter dut (.*);

  task automatic ref_shift(input shift_t t, input int n, input logic [31:0] d, input logic ci,
                           output logic [31:0] r, output logic co);
    r = d; co = ci;
    unique case (t)
      SH_LSL: for (int i = 0; i < n; i++) begin co = r[31]; r = {r[30:0], 1'b0}; end
      SH_LSR: for (int i = 0; i < n; i++) begin co = r[0]; r = {1'b0, r[31:1]}; end
      SH_ASR: for (int i = 0; i < n; i++) begin co = r[0]; r = {r[31], r[31:1]}; end
      SH_ROR: for (int i = 0; i < n; i++) begin co = r[0]; r = {r[0], r[31:1]}; end
      SH_RRX: begin co = r[0]; r = {ci, r[31:1]}; end
      SH_LSR32: for (int i = 0; i < 32; i++) begin co = r[0]; r = {1'b0, r[31:1]}; end
      SH_ASR32: for (int i = 0; i < 32; i++) begin co = r[0]; r = {r[31], r[31:1]}; end
      default: ;
    endcase
  endtask

  initial begin
    logic [31:0] er; logic ec;
    for (int it = 0; it < 40; it++) begin
      for (int t = 0; t < 7; t++) begin
        for (int n = 0; n < 32; n++) begin
          b_bus = $urandom; c_in = 1'($urandom); shift = shift_t'(t);
          shift_size = 5'(n); bp_bs = (it % 8) == 7;
          #1;
          if (bp_bs) begin er = b_bus; ec = c_in; end
          else ref_shift(shift, n, b_bus, c_in, er, ec);
          checks++;
          if (alu_in2 !== er || c_out !== ec) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0d n=%0d d=%h ci=%b: got %h/%b exp %h/%b", t, n, b_bus, c_in, alu_in2, c_out, er, ec);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
