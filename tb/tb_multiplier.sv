// tb_multiplier: random and corner-value test of the multiplier in its three
// uses: 32-bit product (low word only), 64-bit unsigned and 64-bit signed.
// The reference uses 64-bit integer multiplication.
module tb_multiplier;
  logic [31:0] rs, op2, mul_l, mul_h;
  logic mul_type, unsigned_signed;
  int checks = 0, failures = 0;

  multiplier dut (.*);

  initial begin
    longint unsigned up; longint sp; logic [63:0] e;
    for (int it = 0; it < 6000; it++) begin
      rs  = (it % 7 == 0) ? 32'hFFFF_FFFF : (it % 11 == 0) ? 32'h8000_0000 : $urandom;
      op2 = (it % 5 == 0) ? 32'hFFFF_FFFB : $urandom;
      mul_type = 1'($urandom); unsigned_signed = 1'($urandom);
      #1;
      up = longint'(rs) * longint'(op2);
      sp = longint'($signed(rs)) * longint'($signed(op2));
      if (!mul_type) e = {32'd0, up[31:0]};
      else if (unsigned_signed) e = sp;
      else e = up;
      checks++;
      if ({mul_h, mul_l} !== e) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h*%h type=%b s=%b: got %h%h exp %h", rs, op2, mul_type, unsigned_signed, mul_h, mul_l, e);
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
