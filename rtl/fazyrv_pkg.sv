// fazyrv_pkg -- types and constants shared by the chunk-serial RV32I core.
//
// The core processes every 32-bit operand as 32/CHUNKSIZE chunks, least
// significant chunk first. The decoder condenses an instruction into the
// dec_t struct below; the controller in fazyrv_core sequences the passes
// over the chunks from the instruction class (ins_e). The encodings of the
// enums are this design's own choice.
// The opcode constants are used by fazyrv_decoder; linted on its own, the
// package reports them as unused.
package fazyrv_pkg;

  // Instruction classes: each class has its own sequence of passes.
  typedef enum logic [3:0] {
    INS_ALU,     // OP / OP-IMM without shifts, LUI, AUIPC: one pass
    INS_SHIFT,   // SLL/SRL/SRA(I): macro steps, then one pass
    INS_JAL,     // JAL / JALR: one pass computes the target
    INS_BRANCH,  // compare pass, plus target pass when taken
    INS_LOAD,    // address pass, bus access, load pass
    INS_STORE,   // address pass, bus access
    INS_NOP      // FENCE, SYSTEM and unknown opcodes: one empty pass
  } ins_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_SLTU
  } alu_op_e;

  typedef enum logic [1:0] {
    SEL_A_RS1, SEL_A_PC, SEL_A_ZERO
  } sel_a_e;

  typedef struct packed {
    ins_e        cls;
    alu_op_e     alu_op;
    sel_a_e      sel_a;
    logic        sel_b_imm;  // operand b: 1 = immediate, 0 = rs2
    logic        rd_we;      // instruction writes rd
    logic        jalr;       // JALR: clear bit 0 of the target
    logic        shift_left; // SLL(I)
    logic        shift_arith;// SRA(I)
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] imm;
  } dec_t;

  // RV32I major opcodes (instr[6:0]).
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;

  // Cycles spent in the decode phase, equation (4) of the design notes:
  // 3 with one read port, 2 with one read port plus bypass or with two
  // read ports, 1 with two read ports plus bypass.
  function automatic int unsigned n_id(input bit dualport, input bit bypass);
    return 3 - int'(dualport) - int'(bypass);
  endfunction

endpackage
