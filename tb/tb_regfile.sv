// tb_regfile: self-checking test of the six-port register file. Writes random
// values through both write ports (including simultaneous writes and a
// same-address collision, where the Rd port must win), reads all four read
// ports against a shadow copy, checks that disabled ports and writes to R15
// through the data ports change nothing, and that R15 reads back as PC + 8
// while pc_out shows the PC itself.
module tb_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] ran2, ran, ras, ram, rad, radh;
  logic [31:0] rn2, rn, rs, rm, rd, rdh, pc_in, pc_out;
  logic rd_en, rdh_en, pc_en;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  regfile dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] mread(input logic [3:0] a);
    return (a == 15) ? model[15] + 32'd8 : model[a];
  endfunction

  initial begin
    {rd_en, rdh_en, pc_en} = '0;
    {ran2, ran, ras, ram, rad, radh} = '0;
    {rd, rdh, pc_in} = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      rad = 4'($urandom); radh = 4'($urandom);
      rd = $urandom; rdh = $urandom; pc_in = $urandom & 32'hFFFF_FFFC;
      rd_en = 1'($urandom); rdh_en = 1'($urandom); pc_en = ($urandom % 4) == 0;
      if (it == 5) begin rad = 4'd3; radh = 4'd3; rd_en = 1'b1; rdh_en = 1'b1; end
      {ran2, ran, ras, ram} = 16'($urandom);
      #1;
      check("rn2", rn2, mread(ran2));
      check("rn", rn, mread(ran));
      check("rs", rs, mread(ras));
      check("rm", rm, mread(ram));
      check("pc_out", pc_out, model[15]);
      @(posedge clk);
      if (rdh_en && radh != 15) model[radh] = rdh;
      if (rd_en && rad != 15) model[rad] = rd;
      if (pc_en) model[15] = pc_in;
    end
    @(negedge clk);
    rd_en = 0; rdh_en = 0; pc_en = 0;
    for (int a = 0; a < 16; a++) begin
      ran = 4'(a); #1; check("final", rn, mread(4'(a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
