// tb_fazyrv_decoder -- self-checking test of the RV32I decoder.
// Encodes random instructions of every format with known fields and
// immediates and compares the decoded struct with the chosen values.
module tb_fazyrv_decoder
  import fazyrv_pkg::*;
  import tb_rv_pkg::*;
;

  logic [31:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;

  fazyrv_decoder dut (.instr_i(instr), .dec_o(dec));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (instr %08h)", what, instr); end
  endtask

  logic [4:0]  rd, rs1, rs2;
  logic [11:0] i12;
  logic [12:0] b13;
  logic [19:0] u20;
  logic [20:0] j21;
  logic [2:0]  f3;

  initial begin
    for (int it = 0; it < 500; it++) begin
      rd = 5'($urandom()); rs1 = 5'($urandom()); rs2 = 5'($urandom());
      i12 = 12'($urandom()); u20 = 20'($urandom());
      b13 = {13'($urandom())} & ~13'd1; j21 = 21'($urandom()) & ~21'd1;
      f3 = 3'($urandom());
      // I-type ALU
      instr = enc_i(i12, rs1, 3'b000, rd, 7'b0010011); #1;
      chk(dec.cls == INS_ALU && dec.alu_op == ALU_ADD && dec.sel_b_imm && dec.rd_we, "addi class");
      chk(dec.imm == {{20{i12[11]}}, i12} && dec.rd == rd && dec.rs1 == rs1, "addi fields");
      // R-type
      instr = enc_r(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011); #1;
      chk(dec.cls == INS_ALU && dec.alu_op == ALU_SUB && !dec.sel_b_imm && dec.rs2 == rs2, "sub");
      instr = enc_r(7'b0000000, rs2, rs1, 3'b011, rd, 7'b0110011); #1;
      chk(dec.alu_op == ALU_SLTU, "sltu");
      instr = enc_r(7'b0000000, rs2, rs1, 3'b010, rd, 7'b0110011); #1;
      chk(dec.alu_op == ALU_SLT, "slt");
      instr = enc_r(7'b0000000, rs2, rs1, 3'b100, rd, 7'b0110011); #1;
      chk(dec.alu_op == ALU_XOR, "xor");
      instr = enc_r(7'b0000000, rs2, rs1, 3'b110, rd, 7'b0110011); #1;
      chk(dec.alu_op == ALU_OR, "or");
      instr = enc_r(7'b0000000, rs2, rs1, 3'b111, rd, 7'b0110011); #1;
      chk(dec.alu_op == ALU_AND, "and");
      // shifts
      instr = enc_r(7'b0100000, rs2, rs1, 3'b101, rd, 7'b0110011); #1;
      chk(dec.cls == INS_SHIFT && dec.shift_arith && !dec.shift_left, "sra");
      instr = enc_i({7'd0, rs2}, rs1, 3'b001, rd, 7'b0010011); #1;
      chk(dec.cls == INS_SHIFT && dec.shift_left && dec.imm[4:0] == rs2 && dec.sel_b_imm, "slli");
      instr = enc_i({7'd0, rs2}, rs1, 3'b101, rd, 7'b0010011); #1;
      chk(dec.cls == INS_SHIFT && !dec.shift_left && !dec.shift_arith, "srli");
      // U, J, B, S, loads, jalr
      instr = enc_u(u20, rd, 7'b0110111); #1;
      chk(dec.cls == INS_ALU && dec.sel_a == SEL_A_ZERO && dec.imm == {u20, 12'd0}, "lui");
      instr = enc_u(u20, rd, 7'b0010111); #1;
      chk(dec.cls == INS_ALU && dec.sel_a == SEL_A_PC && dec.imm == {u20, 12'd0}, "auipc");
      instr = enc_j(j21, rd); #1;
      chk(dec.cls == INS_JAL && dec.sel_a == SEL_A_PC && !dec.jalr && dec.imm == {{11{j21[20]}}, j21}, "jal");
      instr = enc_i(i12, rs1, 3'b000, rd, 7'b1100111); #1;
      chk(dec.cls == INS_JAL && dec.jalr && dec.sel_a == SEL_A_RS1 && dec.imm == {{20{i12[11]}}, i12}, "jalr");
      instr = enc_b(b13, rs2, rs1, f3); #1;
      chk(dec.cls == INS_BRANCH && dec.alu_op == ALU_SUB && !dec.rd_we && dec.funct3 == f3 &&
          dec.imm == {{19{b13[12]}}, b13}, "branch");
      instr = enc_s(i12, rs2, rs1, f3); #1;
      chk(dec.cls == INS_STORE && !dec.rd_we && dec.imm == {{20{i12[11]}}, i12} && dec.rs2 == rs2, "store");
      instr = enc_i(i12, rs1, f3, rd, 7'b0000011); #1;
      chk(dec.cls == INS_LOAD && dec.rd_we && dec.funct3 == f3 && dec.imm == {{20{i12[11]}}, i12}, "load");
      instr = 32'h0000_0073; #1;
      chk(dec.cls == INS_NOP && !dec.rd_we, "ecall as no-op");
    end
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
