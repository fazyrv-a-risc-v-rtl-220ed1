// tb_core_run -- one randomized run of fazyrv_core with its register file.
//
// Generates a random RV32I program (ALU, shifts, LUI/AUIPC, loads, stores,
// forward branches, JAL, JALR, FENCE) ending in a jump-to-self, runs it on
// the reference model tb_rv_pkg::rv_iss and on the core, and compares all
// registers and the data area. Every instruction's cycle count is checked
// against the pass scheme (N_IF = 2 with this one-cycle-delay memory) and
// against the CPI_min/CPI_max bounds. Reports through checks/failures and
// raises done at the end. The program (at most ~900 words for NBODY = 800)
// must stay below the data area at 0x1000.
module tb_core_run
  import tb_rv_pkg::*;
#(
  parameter int unsigned C      = 2,
  parameter bit          DP     = 1'b1,
  parameter bit          BP     = 1'b1,
  parameter int unsigned SEED   = 1,
  parameter int unsigned NBODY  = 800
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned N_IF = 2;
  localparam int unsigned N_ID = 3 - int'(DP) - int'(BP);
  localparam int unsigned N    = 32 / C;
  localparam logic [31:0] DATA = 32'h1000;

  logic        rst_n;
  logic        i_stb, i_ack, d_stb, d_we, d_ack, rf_we;
  logic [31:0] i_adr, i_rdat, d_adr, d_wdat, d_rdat, rd0, rd1, wd;
  logic [3:0]  d_sel;
  logic [4:0]  ra0, ra1, wa;
  logic [31:0] mem [2048];

  fazyrv_core #(.CHUNKSIZE(C), .RF_DUALPORT(DP), .RF_BYPASS(BP)) dut (
    .clk_i(clk), .rst_n_i(rst_n),
    .imem_stb_o(i_stb), .imem_adr_o(i_adr), .imem_ack_i(i_ack), .imem_rdat_i(i_rdat),
    .dmem_stb_o(d_stb), .dmem_we_o(d_we), .dmem_adr_o(d_adr), .dmem_sel_o(d_sel),
    .dmem_wdat_o(d_wdat), .dmem_ack_i(d_ack), .dmem_rdat_i(d_rdat),
    .rf_raddr0_o(ra0), .rf_rdata0_i(rd0), .rf_raddr1_o(ra1), .rf_rdata1_i(rd1),
    .rf_we_o(rf_we), .rf_waddr_o(wa), .rf_wdata_o(wd)
  );

  fazyrv_regfile #(.DUALPORT(DP)) rf (
    .clk_i(clk), .raddr0_i(ra0), .rdata0_o(rd0), .raddr1_i(ra1), .rdata1_o(rd1),
    .we_i(rf_we), .waddr_i(wa), .wdata_i(wd)
  );

  // memory with one cycle of delay on both buses
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_ack <= 1'b0;
      d_ack <= 1'b0;
    end else begin
      i_ack <= i_stb & ~i_ack;
      d_ack <= d_stb & ~d_ack;
      if (i_stb && !i_ack) i_rdat <= mem[i_adr[12:2]];
      if (d_stb && !d_ack) begin
        d_rdat <= mem[d_adr[12:2]];
        if (d_we)
          for (int b = 0; b < 4; b++)
            if (d_sel[b]) mem[d_adr[12:2]][8*b +: 8] <= d_wdat[8*b +: 8];
      end
    end
  end

  rv_iss       iss;
  logic [31:0] prog [$];
  logic [31:0] end_pc;

  function automatic logic [4:0] rrd();  return 5'($urandom_range(1, 29)); endfunction
  function automatic logic [4:0] rrs();  return 5'($urandom_range(0, 31)); endfunction

  task automatic gen_program();
    logic [31:0] v;
    int k;
    prog.delete();
    prog.push_back(lui(5'd31, 20'(DATA >> 12)));
    for (int r = 1; r <= 30; r++) begin
      v = $urandom();
      prog.push_back(lui(5'(r), v[31:12]));
      prog.push_back(addi(5'(r), 5'(r), v[11:0]));
    end
    for (int i = 0; i < int'(NBODY); i++) begin
      k = $urandom_range(0, 99);
      if (k < 22) begin        // R-type
        logic [2:0] f3 = 3'($urandom());
        logic       alt = (f3 == 3'b000 || f3 == 3'b101) ? 1'($urandom()) : 1'b0;
        prog.push_back(enc_r({1'b0, alt, 5'd0}, rrs(), rrs(), f3, rrd(), 7'b0110011));
      end else if (k < 42) begin  // I-type ALU and shifts
        logic [2:0]  f3 = 3'($urandom());
        logic [11:0] im = 12'($urandom());
        if (f3 == 3'b001) im = {7'd0, im[4:0]};
        if (f3 == 3'b101) im = {1'b0, im[10], 5'd0, im[4:0]};
        prog.push_back(enc_i(im, rrs(), f3, rrd(), 7'b0010011));
      end else if (k < 46) begin
        prog.push_back(enc_u(20'($urandom()), rrd(), ($urandom_range(0, 1) != 0) ? 7'b0110111 : 7'b0010111));
      end else if (k < 60) begin  // loads
        logic [2:0] f3;
        logic [7:0] off = 8'($urandom());
        case ($urandom_range(0, 4))
          0: f3 = 3'b000; 1: f3 = 3'b001; 2: f3 = 3'b010; 3: f3 = 3'b100; default: f3 = 3'b101;
        endcase
        if (f3[0]) off[0] = 1'b0;
        if (f3[1]) off[1:0] = 2'b00;
        prog.push_back(enc_i({4'd0, off}, 5'd31, f3, rrd(), 7'b0000011));
      end else if (k < 72) begin  // stores
        logic [2:0] f3 = 3'($urandom_range(0, 2));
        logic [7:0] off = 8'($urandom());
        if (f3[0]) off[0] = 1'b0;
        if (f3[1]) off[1:0] = 2'b00;
        prog.push_back(enc_s({4'd0, off}, rrs(), 5'd31, f3));
      end else if (k < 88) begin  // forward branch over one or two instructions
        logic [2:0] f3;
        case ($urandom_range(0, 5))
          0: f3 = 3'b000; 1: f3 = 3'b001; 2: f3 = 3'b100; 3: f3 = 3'b101; 4: f3 = 3'b110; default: f3 = 3'b111;
        endcase
        prog.push_back(enc_b(($urandom_range(0, 1) != 0) ? 13'd8 : 13'd12, rrs(), rrs(), f3));
      end else if (k < 93) begin
        prog.push_back(enc_j(21'd8, rrd()));
      end else if (k < 97) begin  // JALR over one instruction
        // two fillers first, so no earlier branch can land between the pair
        prog.push_back(addi(rrd(), rrs(), 12'($urandom())));
        prog.push_back(addi(rrd(), rrs(), 12'($urandom())));
        prog.push_back(enc_u(20'd0, 5'd30, 7'b0010111));
        prog.push_back(enc_i(12'd12, 5'd30, 3'b000, rrd(), 7'b1100111));
      end else begin
        prog.push_back(32'h0000000F);  // FENCE
      end
    end
    // two harmless fillers so the last branch/jump targets exist, then halt
    prog.push_back(addi(5'd1, 5'd1, 12'd1));
    prog.push_back(addi(5'd2, 5'd2, 12'd1));
    end_pc = 32'(4 * prog.size());
    prog.push_back(enc_j(21'd0, 5'd0));
  endtask

  int unsigned cyc, start_cyc, ninstr;
  logic [31:0] cur_ins;
  bit          prev_stb;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0;
    void'($urandom(SEED));
    iss = new();
    gen_program();
    for (int i = 0; i < 2048; i++) begin
      v_init: begin
        logic [31:0] r = $urandom();
        mem[i] = (i < prog.size()) ? prog[i] : r;
        iss.mem[i] = mem[i];
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // Per-instruction cycle check: instruction k runs from its fetch request
  // to the next one; the model is stepped alongside to know the expected
  // branch outcome and shift amount.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; prev_stb <= 1'b0; ninstr <= 0;
    end else if (!done) begin
      cyc      <= cyc + 1;
      prev_stb <= i_stb;
      if (i_stb && !prev_stb) begin
        if (ninstr > 0) begin
          int unsigned exp_c, got, cmin, cmax;
          exp_c = exp_cycles(cur_ins, iss.last_taken, iss.last_shamt, N_IF, N_ID, C);
          got   = cyc - start_cyc;
          cmin  = N_IF + N_ID + N;
          cmax  = N_IF + N_ID + 2 * N + 1 + N;
          checks <= checks + 1;
          if (got != exp_c || got < cmin || got > cmax) begin
            failures <= failures + 1;
            $display("C=%0d DP=%0d BP=%0d: instr %08h at %08h took %0d cycles, expected %0d",
                     C, DP, BP, cur_ins, iss.pc, got, exp_c);
          end
        end
        if (i_adr == end_pc) begin
          done <= 1'b1;
        end else begin
          if (i_adr != iss.pc) begin
            failures <= failures + 1;
            $display("C=%0d: fetch from %08h, model expects %08h", C, i_adr, iss.pc);
          end
          cur_ins   <= iss.mem[iss.pc[12:2]];
          iss.step();
          start_cyc <= cyc;
          ninstr    <= ninstr + 1;
        end
      end
    end
  end

  // final comparison once done
  always @(posedge done) begin
    int f, n;
    f = 0; n = 0;
    for (int r = 1; r < 32; r++) begin
      n++;
      if (rf.regs[r] !== iss.x[r]) begin
        f++;
        $display("C=%0d DP=%0d BP=%0d: x%0d = %08h, expected %08h", C, DP, BP, r, rf.regs[r], iss.x[r]);
      end
    end
    for (int w = int'(DATA / 4); w < int'(DATA / 4) + 64; w++) begin
      n++;
      if (mem[w] !== iss.mem[w]) begin
        f++;
        $display("C=%0d: mem[%08h] = %08h, expected %08h", C, 4 * w, mem[w], iss.mem[w]);
      end
    end
    checks   = checks + n;
    failures = failures + f;
    $display("run C=%0d DP=%0d BP=%0d: %0d instructions", C, DP, BP, ninstr);
  end

endmodule
