// arm7_pkg: types and constants shared by the ARM7 (ARMv4 subset) soft core.
// It holds the ALU function and shift-type encodings, the select codes of
// the datapath multiplexers (named after the Op2..Op6, Ulta, Load_store,
// Addr_buf_sel, Swap and Pc_inc muxes of the datapath), the control word the
// controller hands to the datapath, the peripheral bus bundle, and the
// memory map of the UART and SPI peripherals. The ALU function codes are the
// ARM data-processing opcodes so the controller can pass inst[24:21] as is.
// The memory map addresses are this design's own choice.
package arm7_pkg;

  // ARM data-processing opcodes, used directly as Alu_fun.
  typedef enum logic [3:0] {
    ALU_AND = 4'h0, ALU_EOR = 4'h1, ALU_SUB = 4'h2, ALU_RSB = 4'h3,
    ALU_ADD = 4'h4, ALU_ADC = 4'h5, ALU_SBC = 4'h6, ALU_RSC = 4'h7,
    ALU_TST = 4'h8, ALU_TEQ = 4'h9, ALU_CMP = 4'hA, ALU_CMN = 4'hB,
    ALU_ORR = 4'hC, ALU_MOV = 4'hD, ALU_BIC = 4'hE, ALU_MVN = 4'hF
  } alu_fun_t;

  // Shift types. LSR32/ASR32 are the immediate encodings "LSR #0"/"ASR #0",
  // which ARM defines as shifts by 32; RRX is "ROR #0".
  typedef enum logic [2:0] {
    SH_LSL = 3'd0, SH_LSR = 3'd1, SH_ASR = 3'd2, SH_ROR = 3'd3,
    SH_RRX = 3'd4, SH_LSR32 = 3'd5, SH_ASR32 = 3'd6
  } shift_t;

  // Op2 mux: second operand source before the multiplier / Op3 mux.
  typedef enum logic [1:0] {
    OP2_RM = 2'd0,       // register Rm
    OP2_IMM8 = 2'd1,     // Zero(31:8) & inst(7:0)
    OP2_SIMM24 = 2'd2,   // Sign_inst(23:0): sign-extended word offset, x4
    OP2_IMM12 = 2'd3     // Zero(31:12) & inst(11:0), load/store offset
  } op2_sel_t;

  // Op3 mux: drives B_bus into the barrel shifter.
  typedef enum logic [1:0] {
    OP3_OP2 = 2'd0, OP3_MUL_L = 2'd1, OP3_MUL_H = 2'd2
  } op3_sel_t;

  // Shift_size_type mux: A = rotate of an immediate, B = inst(11:7), C = Rs(4:0).
  typedef enum logic [1:0] {
    SHSZ_A = 2'd0, SHSZ_B = 2'd1, SHSZ_C = 2'd2
  } shsz_sel_t;

  // Op4 mux: Alu_in1 source.
  typedef enum logic [1:0] {
    OP4_A_BUS = 2'd0, OP4_TEMP = 2'd1, OP4_K = 2'd2
  } op4_sel_t;

  // Op5 mux: data for the Rd write port.
  typedef enum logic [1:0] {
    OP5_ALU = 2'd0, OP5_MUL_L = 2'd1, OP5_DATA_IN = 2'd2, OP5_LINK = 2'd3
  } op5_sel_t;

  // Op6 mux: data for the Rdh write port.
  typedef enum logic [1:0] {
    OP6_MUL_H = 2'd0, OP6_RN2 = 2'd1, OP6_RD = 2'd2
  } op6_sel_t;

  // Control word from the controller to the datapath.
  typedef struct packed {
    logic [3:0] rad, radh, ran2, ran, ras, ram;  // register file addresses
    logic       rd_en, rdh_en, pc_en;            // register file write enables
    op2_sel_t   op2_type;
    op3_sel_t   op3_type;
    shsz_sel_t  shift_size_type;
    shift_t     shift;
    logic       bp_bs;                           // bypass barrel shifter
    op4_sel_t   op4_type;
    alu_fun_t   alu_fun;
    logic       bp_alu;                          // bypass ALU (Alu_out = Alu_in2)
    op5_sel_t   op5_type;
    op6_sel_t   op6_type;
    logic       ulta;                            // A_bus: 0 = Rn, 1 = Rn2
    logic       mul_type;                        // 0 = 32-bit, 1 = 64-bit
    logic       unsigned_signed;                 // 1 = signed operands
    logic       load_store;                      // Temp_reg_in: 0 = A_bus, 1 = Alu_out
    logic       temp_en;                         // load Temp_reg
    logic       addr_buf_sel;                    // Addr_buf: 0 = Pc_out, 1 = Temp_reg_out
    logic       swap;                            // Data_buf: 0 = Rn2, 1 = Rm
    logic       pc_inc;                          // next PC: 0 = PC+4, 1 = Branch_address
    logic       s;                               // write NZCV into CPSR
    logic       bus_re, bus_we;                  // peripheral bus strobes
  } ctrl_t;

  // Peripheral bus request (word accesses, single cycle).
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        we;
    logic        re;
  } bus_req_t;

  // Memory map: bits [15:12] select the peripheral, bits [3:2] the register.
  localparam logic [3:0] UART_PAGE = 4'h1;   // 0x0000_1000
  localparam logic [3:0] SPI_PAGE  = 4'h2;   // 0x0000_2000

  // CPSR flag bit positions.
  localparam int CPSR_N = 31, CPSR_Z = 30, CPSR_C = 29, CPSR_V = 28, CPSR_Q = 27;

endpackage
