// tb_alu: random test of all sixteen ALU functions and the bypass. The
// reference computes each function with 64-bit integer arithmetic and
// derives the flags the way ARM defines them (C = carry out of the unsigned
// sum, or NOT borrow for subtraction; V = signed result out of range; logical
// functions take C from the shifter and keep V). Corner operands (0,
// 0x7FFFFFFF, 0x80000000, 0xFFFFFFFF) are mixed in.
module tb_alu;
  import arm7_pkg::*;
  logic [31:0] alu_in1, alu_in2, alu_out;
  alu_fun_t alu_fun;
  logic bp_alu, c_in, sh_c, v_in;
  logic [3:0] nzcv;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic logic [31:0] pick();
    unique case ($urandom % 6)
      0: return 32'h0;
      1: return 32'h7FFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'hFFFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    longint unsigned ua, ub, us;
    longint sa, sb, ss;
    logic [31:0] er; logic ec, ev, arith;
    for (int it = 0; it < 20000; it++) begin
      alu_in1 = pick(); alu_in2 = pick();
      alu_fun = alu_fun_t'(it % 16);
      bp_alu = ($urandom % 10) == 0;
      {c_in, sh_c, v_in} = 3'($urandom);
      #1;
      ua = alu_in1; ub = alu_in2;
      sa = longint'($signed(alu_in1)); sb = longint'($signed(alu_in2));
      arith = 1'b1;
      unique case (alu_fun)
        ALU_ADD, ALU_CMN: begin us = ua + ub;          ss = sa + sb; end
        ALU_ADC:          begin us = ua + ub + c_in;   ss = sa + sb + c_in; end
        ALU_SUB, ALU_CMP: begin us = ua + (ub ^ 64'hFFFF_FFFF) + 1;   ss = sa - sb; end
        ALU_SBC:          begin us = ua + (ub ^ 64'hFFFF_FFFF) + c_in; ss = sa - sb - 1 + c_in; end
        ALU_RSB:          begin us = ub + (ua ^ 64'hFFFF_FFFF) + 1;   ss = sb - sa; end
        ALU_RSC:          begin us = ub + (ua ^ 64'hFFFF_FFFF) + c_in; ss = sb - sa - 1 + c_in; end
        default:          begin arith = 1'b0; us = 0; ss = 0; end
      endcase
      unique case (alu_fun)
        ALU_AND, ALU_TST: er = alu_in1 & alu_in2;
        ALU_EOR, ALU_TEQ: er = alu_in1 ^ alu_in2;
        ALU_ORR: er = alu_in1 | alu_in2;
        ALU_MOV: er = alu_in2;
        ALU_BIC: er = alu_in1 & ~alu_in2;
        ALU_MVN: er = ~alu_in2;
        default: er = us[31:0];
      endcase
      ec = us[32];
      ev = (ss > 64'sh7FFF_FFFF) || (ss < -64'sh8000_0000);
      if (bp_alu) begin er = alu_in2; arith = 1'b0; end
      if (!arith) begin ec = sh_c; ev = v_in; end
      checks++;
      if (alu_out !== er || nzcv !== {er[31], er == 0, ec, ev}) begin
        failures++;
        if (failures < 10)
          $display("FAIL fun=%s a=%h b=%h bp=%b: got %h %b exp %h %b", alu_fun.name(), alu_in1, alu_in2,
                   bp_alu, alu_out, nzcv, er, {er[31], er == 0, ec, ev});
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
