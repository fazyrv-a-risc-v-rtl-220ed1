// tb_rv_pkg -- testbench helpers: RV32I instruction encoders and a small
// instruction-set reference model (rv_iss) used to predict register and
// memory contents independently of the RTL.
package tb_rv_pkg;

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] enc_i(input logic [11:0] imm, input logic [4:0] rs1,
      input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
    return {imm, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] enc_s(input logic [11:0] imm, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input logic [12:0] imm, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [19:0] imm, input logic [4:0] rd,
      input logic [6:0] opc);
    return {imm, rd, opc};
  endfunction
  function automatic logic [31:0] enc_j(input logic [20:0] imm, input logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(input logic [4:0] rd, input logic [4:0] rs1,
                                       input logic [11:0] imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] lui(input logic [4:0] rd, input logic [19:0] imm);
    return enc_u(imm, rd, 7'b0110111);
  endfunction

  // Expected cycles of one instruction in the FazyRV pass scheme.
  // n_if: fetch cycles, n_id: decode cycles, c: chunk size.
  function automatic int unsigned exp_cycles(input logic [31:0] ins, input bit taken,
      input logic [4:0] shamt, input int unsigned n_if, input int unsigned n_id,
      input int unsigned c);
    int unsigned n = 32 / c;
    int unsigned base = n_if + n_id + n;
    case (ins[6:0])
      7'b1100011: return taken ? base + n : base;
      7'b0000011: return base + 2 + n;   // bus access of 2 cycles + load pass
      7'b0100011: return base + 2;
      7'b0010011, 7'b0110011:
        return (ins[13:12] == 2'b01) ? base + shamt / c : base;
      default: return base;
    endcase
  endfunction

  // ------------------------------------------------------------ reference model
  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] mem [2048];   // word array, byte address = 4*index
    bit          last_taken;
    logic [4:0]  last_shamt;

    function new();
      foreach (x[i]) x[i] = '0;
      foreach (mem[i]) mem[i] = '0;
      pc = '0;
    endfunction

    function logic [31:0] ld(input logic [31:0] a, input logic [2:0] f3);
      logic [31:0] w = mem[a[12:2]];
      logic [31:0] s = w >> (8 * a[1:0]);
      case (f3)
        3'b000:  return {{24{s[7]}}, s[7:0]};
        3'b001:  return {{16{s[15]}}, s[15:0]};
        3'b100:  return {24'd0, s[7:0]};
        3'b101:  return {16'd0, s[15:0]};
        default: return w;
      endcase
    endfunction

    function void st(input logic [31:0] a, input logic [2:0] f3, input logic [31:0] v);
      logic [31:0] w = mem[a[12:2]];
      case (f3[1:0])
        2'b00:   w[8*a[1:0] +: 8]  = v[7:0];
        2'b01:   w[16*a[1] +: 16]  = v[15:0];
        default: w = v;
      endcase
      mem[a[12:2]] = w;
    endfunction

    function void step();
      logic [31:0] ins = mem[pc[12:2]];
      logic [6:0]  opc = ins[6:0];
      logic [2:0]  f3  = ins[14:12];
      logic [4:0]  rd  = ins[11:7];
      logic [31:0] a   = x[ins[19:15]];
      logic [31:0] b   = x[ins[24:20]];
      logic [31:0] ii  = {{20{ins[31]}}, ins[31:20]};
      logic [31:0] is_ = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      logic [31:0] ib  = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      logic [31:0] iu  = {ins[31:12], 12'd0};
      logic [31:0] ij  = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      logic [31:0] npc = pc + 4;
      logic [31:0] r   = '0;
      logic [31:0] op2;
      bit          wr  = 1'b0;
      last_taken = 1'b0;
      last_shamt = '0;
      case (opc)
        7'b0110111: begin r = iu; wr = 1; end
        7'b0010111: begin r = pc + iu; wr = 1; end
        7'b1101111: begin r = npc; wr = 1; npc = pc + ij; end
        7'b1100111: begin r = npc; wr = 1; npc = (a + ii) & ~32'd1; end
        7'b1100011: begin
          case (f3)
            3'b000: last_taken = (a == b);
            3'b001: last_taken = (a != b);
            3'b100: last_taken = ($signed(a) < $signed(b));
            3'b101: last_taken = ($signed(a) >= $signed(b));
            3'b110: last_taken = (a < b);
            3'b111: last_taken = (a >= b);
            default: last_taken = 0;
          endcase
          if (last_taken) npc = pc + ib;
        end
        7'b0000011: begin r = ld(a + ii, f3); wr = 1; end
        7'b0100011: st(a + is_, f3, b);
        7'b0010011, 7'b0110011: begin
          op2 = (opc == 7'b0010011) ? ii : b;
          wr  = 1;
          last_shamt = op2[4:0];
          case (f3)
            3'b000: r = (opc == 7'b0110011 && ins[30]) ? a - op2 : a + op2;
            3'b001: r = a << op2[4:0];
            3'b010: r = {31'd0, $signed(a) < $signed(op2)};
            3'b011: r = {31'd0, a < op2};
            3'b100: r = a ^ op2;
            3'b101: r = ins[30] ? 32'($signed(a) >>> op2[4:0]) : a >> op2[4:0];
            3'b110: r = a | op2;
            default: r = a & op2;
          endcase
        end
        default: ;  // FENCE / SYSTEM: no effect
      endcase
      if (wr && rd != 0) x[rd] = r;
      pc = npc;
    endfunction
  endclass

endpackage
