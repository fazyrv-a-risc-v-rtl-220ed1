// fazyrv_decoder -- combinational RV32I decoder of the FazyRV core.
//
// Turns a 32-bit instruction word into the dec_t control struct: the
// instruction class that selects the controller's pass sequence, the ALU
// operation, the operand sources, register addresses and the sign-extended
// immediate (I, S, B, U and J formats). The core presents the registered
// instruction word; the register addresses are also taken straight from
// the instruction bus by the core when the bypass is enabled.
// Only the base ISA of the smallest ("MIN") variant is decoded: FENCE,
// ECALL, EBREAK, CSR accesses and unknown opcodes decode as INS_NOP, which
// is this design's choice. Purely combinational, no clock.
module fazyrv_decoder
  import fazyrv_pkg::*;
(
  input  logic [31:0] instr_i,
  output dec_t        dec_o
);

  logic [6:0] opc;
  logic [2:0] f3;
  logic       f7b5;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc  = instr_i[6:0];
  assign f3   = instr_i[14:12];
  assign f7b5 = instr_i[30];

  assign imm_i = {{20{instr_i[31]}}, instr_i[31:20]};
  assign imm_s = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
  assign imm_b = {{19{instr_i[31]}}, instr_i[31], instr_i[7], instr_i[30:25], instr_i[11:8], 1'b0};
  assign imm_u = {instr_i[31:12], 12'b0};
  assign imm_j = {{11{instr_i[31]}}, instr_i[31], instr_i[19:12], instr_i[20], instr_i[30:21], 1'b0};

  always_comb begin
    dec_o             = '0;
    dec_o.cls         = INS_NOP;
    dec_o.alu_op      = ALU_ADD;
    dec_o.sel_a       = SEL_A_RS1;
    dec_o.funct3      = f3;
    dec_o.rd          = instr_i[11:7];
    dec_o.rs1         = instr_i[19:15];
    dec_o.rs2         = instr_i[24:20];
    unique case (opc)
      OPC_LUI: begin
        dec_o.cls = INS_ALU; dec_o.sel_a = SEL_A_ZERO; dec_o.sel_b_imm = 1'b1;
        dec_o.imm = imm_u;   dec_o.rd_we = 1'b1;
      end
      OPC_AUIPC: begin
        dec_o.cls = INS_ALU; dec_o.sel_a = SEL_A_PC; dec_o.sel_b_imm = 1'b1;
        dec_o.imm = imm_u;   dec_o.rd_we = 1'b1;
      end
      OPC_JAL: begin
        dec_o.cls = INS_JAL; dec_o.sel_a = SEL_A_PC; dec_o.sel_b_imm = 1'b1;
        dec_o.imm = imm_j;   dec_o.rd_we = 1'b1;
      end
      OPC_JALR: begin
        dec_o.cls = INS_JAL; dec_o.sel_b_imm = 1'b1; dec_o.jalr = 1'b1;
        dec_o.imm = imm_i;   dec_o.rd_we = 1'b1;
      end
      OPC_BRANCH: begin
        dec_o.cls = INS_BRANCH; dec_o.alu_op = ALU_SUB; dec_o.imm = imm_b;
      end
      OPC_LOAD: begin
        dec_o.cls = INS_LOAD; dec_o.sel_b_imm = 1'b1; dec_o.imm = imm_i;
        dec_o.rd_we = 1'b1;
      end
      OPC_STORE: begin
        dec_o.cls = INS_STORE; dec_o.sel_b_imm = 1'b1; dec_o.imm = imm_s;
      end
      OPC_OPIMM, OPC_OP: begin
        dec_o.rd_we     = 1'b1;
        dec_o.sel_b_imm = (opc == OPC_OPIMM);
        dec_o.imm       = imm_i;
        dec_o.cls       = INS_ALU;
        unique case (f3)
          3'b000: dec_o.alu_op = (opc == OPC_OP && f7b5) ? ALU_SUB : ALU_ADD;
          3'b010: dec_o.alu_op = ALU_SLT;
          3'b011: dec_o.alu_op = ALU_SLTU;
          3'b100: dec_o.alu_op = ALU_XOR;
          3'b110: dec_o.alu_op = ALU_OR;
          3'b111: dec_o.alu_op = ALU_AND;
          3'b001: begin
            dec_o.cls = INS_SHIFT; dec_o.shift_left = 1'b1;
          end
          3'b101: begin
            dec_o.cls = INS_SHIFT; dec_o.shift_arith = f7b5;
          end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

endmodule
