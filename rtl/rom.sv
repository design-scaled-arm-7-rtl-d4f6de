// rom: instruction ROM of the ARM7 core. DEPTH 32-bit words, addressed by
// word (the byte address with its two low bits dropped), read
// asynchronously so that the instruction of the current PC is available in
// the same cycle (single-cycle core). The contents are loaded from a hex
// file, one 32-bit word per line, at elaboration; on an FPGA this maps to a
// distributed or block ROM. Locations beyond the file read as 0xE1A00000
// (MOV R0,R0, a no-operation) when the file is shorter than the ROM.
// The depth and the program are this design's choice.
module rom #(
  parameter int    DEPTH     = 256,
  parameter string INIT_FILE = "rtl/arm7_program.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,   // word address
  output logic [31:0]              data
);

  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'hE1A0_0000;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

endmodule
