// tb_fsoc -- end-to-end test of the reference SoC at its default size.
//
// Places a 13-instruction program plus data in the 64-byte memory and runs
// it: a loop counts x1 from 1 to 5, writes x1 & 1 to the output register,
// shifts x1 left by 13 (macro steps), stores the low halfword, loads it
// back sign-extended and branches back while x1 != 5; after the loop an
// arithmetic right shift and a word store, then a jump-to-self.
// Checks: the sequence of output values, final registers and memory, the
// cycle count of every instruction (ALU instructions exactly
// N_IF + N_ID + 32/CHUNKSIZE with N_IF = 2 for this memory and N_ID = 1 for
// the two-port register file with bypass), and that each mechanism
// (bypass decode, macro-step shift, taken and not-taken branch, load with
// sign extension, store to memory, output write, shared memory port for
// instruction and data, jump) occurred at least once.
module tb_fsoc
  import tb_rv_pkg::*;
;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic gpo;
  always #5 clk = ~clk;

  fsoc dut (.clk_i(clk), .rst_n_i(rst_n), .gpo_o(gpo));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] prog [16];
  initial begin
    prog[0]  = addi(5'd1, 5'd0, 12'd0);
    prog[1]  = addi(5'd2, 5'd0, 12'd5);
    prog[2]  = lui(5'd3, 20'h80000);
    prog[3]  = addi(5'd1, 5'd1, 12'd1);                         // loop:
    prog[4]  = enc_i(12'd1, 5'd1, 3'b111, 5'd4, 7'b0010011);    // andi x4,x1,1
    prog[5]  = enc_s(12'd0, 5'd4, 5'd3, 3'b010);                // sw x4,0(x3)
    prog[6]  = enc_i(12'd13, 5'd1, 3'b001, 5'd5, 7'b0010011);   // slli x5,x1,13
    prog[7]  = enc_s(12'd62, 5'd5, 5'd0, 3'b001);               // sh x5,62(x0)
    prog[8]  = enc_i(12'd62, 5'd0, 3'b001, 5'd6, 7'b0000011);   // lh x6,62(x0)
    prog[9]  = enc_b(-13'sd24, 5'd2, 5'd1, 3'b001);             // bne x1,x2,loop
    prog[10] = enc_i({7'b0100000, 5'd3}, 5'd6, 3'b101, 5'd7, 7'b0010011); // srai x7,x6,3
    prog[11] = enc_s(12'd56, 5'd7, 5'd0, 3'b010);               // sw x7,56(x0)
    prog[12] = enc_j(21'd0, 5'd0);                              // j .
    prog[13] = 32'd0;
    prog[14] = 32'd0;
    prog[15] = 32'd0;
    for (int i = 0; i < 16; i++) dut.u_mem.mem[i] = prog[i];
  end

  // ------------------------------------------------------------ monitors
  // controller states of fazyrv_core, by encoding: 1 DECODE, 2 SHIFT, 3 EXEC
  localparam int unsigned N_IF = 2, N_ID = 1, N = 32 / 2;
  int unsigned cyc = 0, start_cyc = 0, ninstr = 0;
  logic [31:0] cur_ins, cur_pc;
  bit          prev_stb = 1'b0, halted = 1'b0;
  int n_bypass = 0, n_macro = 0, n_taken = 0, n_ntaken = 0, n_sext = 0;
  int n_at_end = 0;
  int n_st_mem = 0, n_gpo_wr = 0, n_ifetch_mem = 0, n_dmem_mem = 0, n_jump = 0;
  int gpo_seq [$];
  logic gpo_q = 1'b0;

  always @(posedge clk) if (rst_n && !halted) begin
    cyc++;
    // instruction boundaries: rising instruction request
    if (dut.u_cpu.u_core.imem_stb_o && !prev_stb) begin
      if (ninstr > 0) begin
        int unsigned got;
        got = cyc - start_cyc;
        if (cur_ins[6:0] inside {7'b0010011, 7'b0110011, 7'b0110111} && cur_ins[13:12] != 2'b01)
          check(got == N_IF + N_ID + N, $sformatf("ALU instr %08h took %0d cycles", cur_ins, got));
        check(got >= N_IF + N_ID + N && got <= N_IF + N_ID + 3 * N + 1,
              $sformatf("instr %08h took %0d cycles, outside CPI bounds", cur_ins, got));
        if (cur_ins[6:0] == 7'b1100011)
          if (got > N_IF + N_ID + N) n_taken++; else n_ntaken++;
      end
      cur_pc    = dut.u_cpu.u_core.imem_adr_o;
      cur_ins   = prog[cur_pc[5:2]];
      start_cyc = cyc;
      ninstr++;
      if (cur_pc == 32'd48) n_at_end++;
      if (n_at_end == 2) halted = 1'b1;   // the jump-to-self has run once
    end
    prev_stb = dut.u_cpu.u_core.imem_stb_o;
    // mechanisms
    if (dut.u_cpu.u_core.state_q == 3'd1 &&
        dut.u_cpu.u_core.id_last && dut.u_cpu.u_core.id_cnt_q == 0) n_bypass++;
    if (dut.u_cpu.u_core.state_q == 3'd2) n_macro++;
    if (dut.u_cpu.u_core.u_spm_d.step_i && !dut.u_cpu.u_core.u_spm_d.in_data &&
        dut.u_cpu.u_core.u_spm_d.ext_q) n_sext++;
    if (dut.m_stb && dut.m_ack && dut.m_we) n_st_mem++;
    if (dut.g_stb && dut.g_ack && dut.g_we) n_gpo_wr++;
    if (dut.i_stb && dut.m_ack) n_ifetch_mem++;
    if (dut.d_stb && !dut.d_adr[31] && dut.m_ack) n_dmem_mem++;
    if (dut.u_cpu.u_core.state_q == 3'd3 && dut.u_cpu.u_core.last &&
        dut.u_cpu.u_core.dec.cls == fazyrv_pkg::INS_JAL) n_jump++;
    if (gpo !== gpo_q) gpo_seq.push_back(int'(gpo));
    gpo_q = gpo;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (halted);
    repeat (5) @(posedge clk);
    check(gpo == 1'b1, "final output value");
    check(gpo_seq.size() == 5, $sformatf("output changed %0d times, expected 5", gpo_seq.size()));
    check(dut.u_cpu.u_rf.regs[1] == 32'd5, "x1");
    check(dut.u_cpu.u_rf.regs[4] == 32'd1, "x4");
    check(dut.u_cpu.u_rf.regs[5] == 32'd5 << 13, "x5");
    check(dut.u_cpu.u_rf.regs[6] == 32'hFFFF_A000, "x6 (lh sign extension)");
    check(dut.u_cpu.u_rf.regs[7] == 32'hFFFF_F400, "x7 (srai)");
    check(dut.u_mem.mem[14] == 32'hFFFF_F400, "mem[56]");
    check(dut.u_mem.mem[15][31:16] == 16'hA000, "mem[62] halfword");
    check(dut.u_mem.mem[15][15:0] == 16'h0000, "mem[60] untouched");
    check(ninstr == 3 + 7 * 5 + 2 + 2, $sformatf("%0d instructions executed", ninstr));
    $display("mechanisms: bypass-decode=%0d macro-steps=%0d taken=%0d not-taken=%0d sign-ext=%0d",
             n_bypass, n_macro, n_taken, n_ntaken, n_sext);
    $display("            mem-stores=%0d output-writes=%0d fetch-via-OR=%0d data-via-OR=%0d jumps=%0d",
             n_st_mem, n_gpo_wr, n_ifetch_mem, n_dmem_mem, n_jump);
    check(n_bypass > 0, "bypass decode never happened");
    check(n_macro > 0, "macro steps never happened");
    check(n_taken == 4, "taken branches");
    check(n_ntaken == 1, "not-taken branches");
    check(n_sext > 0, "sign extension never happened");
    check(n_st_mem > 0, "no store to memory");
    check(n_gpo_wr == 5, "output writes");
    check(n_ifetch_mem > 0 && n_dmem_mem > 0, "shared memory port not used by both buses");
    check(n_jump > 0, "jump never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
