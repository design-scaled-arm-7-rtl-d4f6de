// tb_rom: checks that the instruction ROM returns the default program: the
// first words are compared with their ARM encodings worked out by hand
// (MOV R0,#2 = E3A00002, MOV R1,#1 = E3A01001, MOV R2,#0x15 = E3A02015,
// MVN R3,#4 = E3E03004, MOV R5,#0x3B = E3A0503B, ADD R4,R2,R1,LSL #3 =
// E0824181), the last word is the halt loop "B ." (EAFFFFFE) and unused
// words read as the MOV R0,R0 no-op.
module tb_rom;
  logic [7:0] addr;
  logic [31:0] data;
  int checks = 0, failures = 0;

  rom #(.DEPTH(256)) dut (.*);

  task automatic check(input int a, input logic [31:0] exp);
    addr = 8'(a);
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL word %0d: got %h expected %h", a, data, exp);
    end
  endtask

  initial begin
    check(0, 32'hE3A0_0002);
    check(1, 32'hE3A0_1001);
    check(2, 32'hE3A0_2015);
    check(3, 32'hE3E0_3004);
    check(4, 32'hE3A0_503B);
    check(5, 32'hE082_4181);
    check(72, 32'hEAFF_FFFE);
    for (int a = 73; a < 256; a += 17) check(a, 32'hE1A0_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
