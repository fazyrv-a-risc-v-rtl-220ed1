// fazyrv_core -- FazyRV: RV32I core with a 1, 2, 4 or 8-bit data path.
//
// The core trades cycles for area: every 32-bit operation is carried out as
// 32/CHUNKSIZE passes of a CHUNKSIZE-bit ALU over chunks of the operands,
// least significant chunk first. The instruction flow is sequential and
// never overlaps two instructions:
//   FETCH  : instruction-bus request until acknowledge (N_IF cycles; 2 for
//            a Wishbone slave that answers after one cycle).
//   DECODE : register-file reads (N_ID = 1..3 cycles, see fazyrv_pkg::n_id).
//            With RF_BYPASS the rs1/rs2 fields are taken straight from the
//            instruction bus in the acknowledge cycle, which saves a cycle.
//   SHIFT  : shifts only, q = shamt / CHUNKSIZE macro steps.
//   EXEC   : one pass of 32/CHUNKSIZE cycles through the ALU; the result
//            chunks collect in a shift register and the last cycle writes
//            rd and the PC. Loads and stores capture the address (spm_a).
//   MEM    : data-bus access (loads/stores only).
//   EXEC2  : second pass: taken branches compute PC+imm, loads stream the
//            aligned, extended bus data into rd.
// So an ALU instruction takes CPI_min = N_IF + N_ID + 32/CHUNKSIZE cycles;
// a taken branch adds a second pass, a load a bus access and a pass, a
// shift its macro steps. Operand a comes from rs1 (fazyrv_shifter), the PC
// or zero; operand b from rs2 or the immediate. Left shifts reuse the right
// shifter by bit-reversing operand and result (fazyrv_reverser).
// Buses: instruction and data bus are simple Wishbone-style request /
// acknowledge handshakes (stb held until ack, one word per request). The
// core never requests both at once, which lets a SoC OR them onto one
// memory port. Register file: external, synchronous read (fazyrv_regfile).
// Only the base RV32I instructions of the smallest ("MIN") variant are
// executed: no CSRs, interrupts or traps; SYSTEM, FENCE and unknown opcodes
// are executed as no-ops and misaligned accesses are not detected.
// The pass sequence, the reverser placement and these omissions are this
// design's own; chunk width, bypass, register-file variants, macro-step
// shifts and the CPI bounds follow the FazyRV description.
// rst_n_i also disables the bus assertion at the end of this file, which
// lint reports as a signal used both synchronously and asynchronously.
module fazyrv_core
  import fazyrv_pkg::*;
#(
  parameter int unsigned CHUNKSIZE   = 2,
  parameter bit          RF_DUALPORT = 1'b1,
  parameter bit          RF_BYPASS   = 1'b1,
  parameter logic [31:0] BOOTADR     = 32'h0000_0000
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  // instruction bus
  output logic        imem_stb_o,
  output logic [31:0] imem_adr_o,
  input  logic        imem_ack_i,
  input  logic [31:0] imem_rdat_i,
  // data bus
  output logic        dmem_stb_o,
  output logic        dmem_we_o,
  output logic [31:0] dmem_adr_o,
  output logic [3:0]  dmem_sel_o,
  output logic [31:0] dmem_wdat_o,
  input  logic        dmem_ack_i,
  input  logic [31:0] dmem_rdat_i,
  // register file
  output logic [4:0]  rf_raddr0_o,
  input  logic [31:0] rf_rdata0_i,
  output logic [4:0]  rf_raddr1_o,
  input  logic [31:0] rf_rdata1_i,
  output logic        rf_we_o,
  output logic [4:0]  rf_waddr_o,
  output logic [31:0] rf_wdata_o
);

  localparam int unsigned NCHUNK = 32 / CHUNKSIZE;
  localparam int unsigned LOGC   = $clog2(CHUNKSIZE);           // 0 for 1-bit chunks
  localparam int unsigned FW     = (CHUNKSIZE > 1) ? LOGC : 1;  // fine-shift width
  // decode cycle in which rs1 data (and rs2 with two ports) arrives
  localparam int unsigned ID_OFF  = RF_BYPASS ? 0 : 1;
  localparam int unsigned ID_RS2  = RF_DUALPORT ? ID_OFF : ID_OFF + 1;
  localparam int unsigned ID_LAST = ID_RS2;

  typedef enum logic [2:0] {S_FETCH, S_DECODE, S_SHIFT, S_EXEC, S_MEM, S_EXEC2} state_e;

  state_e      state_q;
  logic [31:0] pc_q, ir_q, spm_a_q;
  logic [31:0] rs_b_q, imm_sr_q, pc_sr_q;
  logic [31-CHUNKSIZE:0] res_sr_q;  // result chunks collected so far
  logic [1:0]  id_cnt_q;
  logic [4:0]  cnt_q, macro_q;
  logic [FW-1:0] fine_q;

  dec_t        dec;
  logic [31:0] pc_plus4;
  logic        pass, first, last;
  logic [31:0] rs1_val, rs2_val, rs1_shift_in, full, full_rev;
  logic [4:0]  shamt;
  logic        id_rs1, id_rs2, id_last;
  logic        branch_taken;

  logic [CHUNKSIZE-1:0] op_a, op_b, alu_res, sh_out, ld_out, res_chunk;
  logic                 alu_eq, alu_lt, alu_ltu;
  alu_op_e              alu_op;

  fazyrv_decoder u_dec (.instr_i(ir_q), .dec_o(dec));

  assign pc_plus4 = pc_q + 32'd4;
  assign pass     = (state_q == S_EXEC) || (state_q == S_EXEC2);
  assign first    = pass && (cnt_q == 5'd0);
  assign last     = pass && (cnt_q == 5'(NCHUNK - 1));

  // ---------------------------------------------------------------- fetch
  assign imem_stb_o = (state_q == S_FETCH);
  assign imem_adr_o = pc_q;

  // ---------------------------------------------------------------- decode
  assign id_rs1  = (state_q == S_DECODE) && (id_cnt_q == 2'(ID_OFF));
  assign id_rs2  = (state_q == S_DECODE) && (id_cnt_q == 2'(ID_RS2));
  assign id_last = (state_q == S_DECODE) && (id_cnt_q == 2'(ID_LAST));

  always_comb begin
    if (state_q == S_FETCH) begin
      // bypass: register addresses straight from the instruction bus
      rf_raddr0_o = imem_rdat_i[19:15];
      rf_raddr1_o = imem_rdat_i[24:20];
    end else if (RF_DUALPORT) begin
      rf_raddr0_o = dec.rs1;
      rf_raddr1_o = dec.rs2;
    end else begin
      rf_raddr0_o = (id_cnt_q == 2'(ID_OFF)) ? dec.rs2 : dec.rs1;
      rf_raddr1_o = dec.rs2;
    end
  end

  assign rs1_val = rf_rdata0_i;
  assign rs2_val = RF_DUALPORT ? rf_rdata1_i : rf_rdata0_i;
  assign shamt   = dec.sel_b_imm ? dec.imm[4:0] : rs2_val[4:0];

  fazyrv_reverser #(.W(32)) u_rev_in (
    .en_i(dec.cls == INS_SHIFT && dec.shift_left), .d_i(rs1_val), .q_o(rs1_shift_in)
  );

  // ---------------------------------------------------------------- operands
  fazyrv_shifter #(.CHUNKSIZE(CHUNKSIZE)) u_shift (
    .clk_i   (clk_i),
    .load_i  (id_rs1),
    .d_i     (rs1_shift_in),
    .arith_i (dec.shift_arith),
    .step_i  ((state_q == S_SHIFT) || pass),
    .fine_i  ((dec.cls == INS_SHIFT) ? fine_q : '0),
    .out_o   (sh_out)
  );

  always_comb begin
    if (state_q == S_EXEC2) begin
      op_a   = pc_sr_q[CHUNKSIZE-1:0];
      op_b   = imm_sr_q[CHUNKSIZE-1:0];
      alu_op = ALU_ADD;
    end else begin
      unique case (dec.sel_a)
        SEL_A_PC:   op_a = pc_sr_q[CHUNKSIZE-1:0];
        SEL_A_ZERO: op_a = '0;
        default:    op_a = sh_out;
      endcase
      op_b   = dec.sel_b_imm ? imm_sr_q[CHUNKSIZE-1:0] : rs_b_q[CHUNKSIZE-1:0];
      alu_op = dec.alu_op;
    end
  end

  fazyrv_alu #(.CHUNKSIZE(CHUNKSIZE)) u_alu (
    .clk_i(clk_i), .en_i(pass), .first_i(first), .op_i(alu_op),
    .a_i(op_a), .b_i(op_b), .res_o(alu_res),
    .eq_o(alu_eq), .lt_o(alu_lt), .ltu_o(alu_ltu)
  );

  always_comb begin
    if (state_q == S_EXEC2 && dec.cls == INS_LOAD) res_chunk = ld_out;
    else if (dec.cls == INS_SHIFT)                  res_chunk = sh_out;
    else                                            res_chunk = alu_res;
  end

  // the complete result word in the last cycle of a pass
  assign full = {res_chunk, res_sr_q};

  fazyrv_reverser #(.W(32)) u_rev_out (
    .en_i(dec.cls == INS_SHIFT && dec.shift_left), .d_i(full), .q_o(full_rev)
  );

  always_comb begin
    unique case (dec.funct3)
      3'b000:  branch_taken = alu_eq;
      3'b001:  branch_taken = ~alu_eq;
      3'b100:  branch_taken = alu_lt;
      3'b101:  branch_taken = ~alu_lt;
      3'b110:  branch_taken = alu_ltu;
      3'b111:  branch_taken = ~alu_ltu;
      default: branch_taken = 1'b0;
    endcase
  end

  // ---------------------------------------------------------------- data bus
  fazyrv_spm_d #(.CHUNKSIZE(CHUNKSIZE)) u_spm_d (
    .clk_i        (clk_i),
    .funct3_i     (dec.funct3),
    .addr_lo_i    (spm_a_q[1:0]),
    .st_load_i    (id_rs2),
    .st_data_i    (rs2_val),
    .wdat_o       (dmem_wdat_o),
    .sel_o        (dmem_sel_o),
    .ld_capture_i ((state_q == S_MEM) && dmem_ack_i && dec.cls == INS_LOAD),
    .rdat_i       (dmem_rdat_i),
    .step_i       ((state_q == S_EXEC2) && dec.cls == INS_LOAD),
    .out_o        (ld_out)
  );

  assign dmem_stb_o = (state_q == S_MEM);
  assign dmem_we_o  = (dec.cls == INS_STORE);
  assign dmem_adr_o = {spm_a_q[31:2], 2'b00};

  // ---------------------------------------------------------------- write-back
  always_comb begin
    rf_we_o    = 1'b0;
    rf_waddr_o = dec.rd;
    rf_wdata_o = full;
    if (last && dec.rd_we) begin
      if (state_q == S_EXEC) begin
        unique case (dec.cls)
          INS_ALU: begin
            rf_we_o = 1'b1;
            if (dec.alu_op == ALU_SLT)       rf_wdata_o = {31'd0, alu_lt};
            else if (dec.alu_op == ALU_SLTU) rf_wdata_o = {31'd0, alu_ltu};
          end
          INS_SHIFT: begin rf_we_o = 1'b1; rf_wdata_o = full_rev; end
          INS_JAL:   begin rf_we_o = 1'b1; rf_wdata_o = pc_plus4; end
          default: ;
        endcase
      end else if (dec.cls == INS_LOAD) begin
        rf_we_o = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk_i or negedge rst_n_i) begin
    if (!rst_n_i) begin
      state_q  <= S_FETCH;
      pc_q     <= BOOTADR;
      id_cnt_q <= '0;
      cnt_q    <= '0;
    end else begin
      unique case (state_q)
        S_FETCH: if (imem_ack_i) begin
          state_q  <= S_DECODE;
          id_cnt_q <= '0;
        end
        S_DECODE: begin
          id_cnt_q <= id_cnt_q + 2'd1;
          if (id_last) begin
            cnt_q   <= '0;
            state_q <= (dec.cls == INS_SHIFT && (shamt >> LOGC) != 0) ? S_SHIFT : S_EXEC;
          end
        end
        S_SHIFT: begin
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == macro_q - 5'd1) begin
            cnt_q   <= '0;
            state_q <= S_EXEC;
          end
        end
        S_EXEC: begin
          cnt_q <= cnt_q + 5'd1;
          if (last) begin
            cnt_q   <= '0;
            state_q <= S_FETCH;
            pc_q    <= pc_plus4;
            unique case (dec.cls)
              INS_JAL: pc_q <= {full[31:1], full[0] & ~dec.jalr};
              INS_BRANCH: if (branch_taken) begin
                state_q <= S_EXEC2;
                pc_q    <= pc_q;
              end
              INS_LOAD, INS_STORE: begin
                state_q <= S_MEM;
                pc_q    <= pc_q;
              end
              default: ;
            endcase
          end
        end
        S_MEM: if (dmem_ack_i) begin
          if (dec.cls == INS_LOAD) begin
            state_q <= S_EXEC2;
          end else begin
            state_q <= S_FETCH;
            pc_q    <= pc_plus4;
          end
        end
        S_EXEC2: begin
          cnt_q <= cnt_q + 5'd1;
          if (last) begin
            cnt_q   <= '0;
            state_q <= S_FETCH;
            pc_q    <= (dec.cls == INS_BRANCH) ? full : pc_plus4;
          end
        end
        default: state_q <= S_FETCH;
      endcase
    end
  end

  // datapath registers (no reset needed: always loaded before use)
  always_ff @(posedge clk_i) begin
    if (state_q == S_FETCH && imem_ack_i) ir_q <= imem_rdat_i;
    if (id_rs2) rs_b_q <= rs2_val;
    if (id_last) begin
      imm_sr_q <= dec.imm;
      pc_sr_q  <= pc_q;
      macro_q  <= shamt >> LOGC;
      fine_q   <= (CHUNKSIZE > 1) ? FW'(shamt) : '0;
    end
    if (pass) begin
      rs_b_q   <= {rs_b_q[CHUNKSIZE-1:0],   rs_b_q[31:CHUNKSIZE]};
      imm_sr_q <= {imm_sr_q[CHUNKSIZE-1:0], imm_sr_q[31:CHUNKSIZE]};
      pc_sr_q  <= {pc_sr_q[CHUNKSIZE-1:0],  pc_sr_q[31:CHUNKSIZE]};
      res_sr_q <= full[31:CHUNKSIZE];
    end
    if (state_q == S_EXEC && last) spm_a_q <= full;
  end

  // The instruction and data bus are never requested together.
  a_one_bus: assert property (@(posedge clk_i) disable iff (!rst_n_i)
                              !(imem_stb_o && dmem_stb_o));

endmodule
