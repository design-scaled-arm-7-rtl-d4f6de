// regfile: the sixteen 32-bit ARM registers R0..R15 with four read ports
// (Rn2, Rn, Rs, Rm) and two write ports (Rd, Rdh), as in the six-port register
// file of the core. Each port has a 4-bit address; each write port has its
// own enable and writes on the rising clock edge. R15 is the program counter:
// it is loaded from pc_in when pc_en is high and is always visible on pc_out.
// There are no banked (shadow) registers, so 4 address bits cover the file.
//
// Reads are combinational. A read of R15 returns the PC plus 8, the value
// an ARM7 program sees for R15 because of its three-stage pipeline; this
// offset is this design's choice for keeping ARM code (branches, PC-relative
// operands) correct in a single-cycle datapath. A write to R15 through the
// Rd/Rdh ports is ignored: the PC changes only through pc_in. If both write
// ports address the same register, the Rd port wins.
// Timing: one cycle; writes take effect at the next rising edge.
module regfile (
  input  logic        clk,
  input  logic        rst_n,
  // read ports
  input  logic [3:0]  ran2, ran, ras, ram,
  output logic [31:0] rn2, rn, rs, rm,
  // write port Rd
  input  logic [3:0]  rad,
  input  logic        rd_en,
  input  logic [31:0] rd,
  // write port Rdh
  input  logic [3:0]  radh,
  input  logic        rdh_en,
  input  logic [31:0] rdh,
  // program counter (R15)
  input  logic        pc_en,
  input  logic [31:0] pc_in,
  output logic [31:0] pc_out
);

  logic [31:0] regs [15];   // R0..R14
  logic [31:0] pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
      pc_q <= '0;
    end else begin
      if (rdh_en && radh != 4'd15) regs[radh] <= rdh;
      if (rd_en && rad != 4'd15) regs[rad] <= rd;
      if (pc_en) pc_q <= pc_in;
    end
  end

  function automatic logic [31:0] rd_port(input logic [3:0] a);
    return (a == 4'd15) ? pc_q + 32'd8 : regs[a];
  endfunction

  always_comb begin
    rn2 = rd_port(ran2);
    rn  = rd_port(ran);
    rs  = rd_port(ras);
    rm  = rd_port(ram);
  end

  assign pc_out = pc_q;

endmodule
