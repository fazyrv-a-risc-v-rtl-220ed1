// tb_fazyrv_top -- cycle-count test of fazyrv_top against the CPI equations.
//
// Four copies of the core with its register file, one per register-file
// variant (1R, 1R + bypass, 2R, 2R + bypass), each with a different chunk
// size, run the same short program: a loop summing 1..10, a store, a load
// and a shift. Each copy's memory answers after one cycle, so N_IF = 2.
// Checked: final registers and memory; every ALU instruction takes exactly
// CPI_min = N_IF + N_ID + 32/chunk with N_ID = 3, 2, 2, 1; and no
// instruction takes more than CPI_max = N_IF + N_ID + 3*32/chunk + 1.
module tb_fazyrv_top
  import tb_rv_pkg::*;
;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] done = '0;

  logic [31:0] prog [16];
  initial begin
    prog[0]  = addi(5'd1, 5'd0, 12'd0);                         // sum
    prog[1]  = addi(5'd2, 5'd0, 12'd10);                        // i
    prog[2]  = enc_r(7'd0, 5'd2, 5'd1, 3'b000, 5'd1, 7'b0110011); // add x1,x1,x2
    prog[3]  = addi(5'd2, 5'd2, 12'hFFF);                       // i--
    prog[4]  = enc_b(-13'sd8, 5'd0, 5'd2, 3'b001);              // bnez x2
    prog[5]  = enc_s(12'd128, 5'd1, 5'd0, 3'b010);              // sw x1,128(x0)
    prog[6]  = enc_i(12'd128, 5'd0, 3'b100, 5'd3, 7'b0000011);  // lbu x3,128(x0)
    prog[7]  = enc_i(12'd9, 5'd3, 3'b001, 5'd4, 7'b0010011);    // slli x4,x3,9
    prog[8]  = enc_j(21'd0, 5'd0);                              // j .
    for (int i = 9; i < 16; i++) prog[i] = 32'd0;
  end

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam bit DP = g[1];
    localparam bit BP = g[0];
    localparam int unsigned C = 1 << g;       // 1, 2, 4, 8
    localparam int unsigned N_IF = 2;
    localparam int unsigned N_ID = 3 - int'(DP) - int'(BP);
    localparam int unsigned N = 32 / C;

    logic        i_stb, i_ack, d_stb, d_we, d_ack;
    logic [31:0] i_adr, i_rdat, d_adr, d_wdat, d_rdat;
    logic [3:0]  d_sel;
    logic [31:0] mem [64];

    fazyrv_top #(.CHUNKSIZE(C), .RF_DUALPORT(DP), .RF_BYPASS(BP)) dut (
      .clk_i(clk), .rst_n_i(rst_n),
      .imem_stb_o(i_stb), .imem_adr_o(i_adr), .imem_ack_i(i_ack), .imem_rdat_i(i_rdat),
      .dmem_stb_o(d_stb), .dmem_we_o(d_we), .dmem_adr_o(d_adr), .dmem_sel_o(d_sel),
      .dmem_wdat_o(d_wdat), .dmem_ack_i(d_ack), .dmem_rdat_i(d_rdat)
    );

    initial for (int i = 0; i < 64; i++) mem[i] = (i < 16) ? prog[i] : 32'd0;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        i_ack <= 1'b0;
        d_ack <= 1'b0;
      end else begin
        i_ack <= i_stb & ~i_ack;
        d_ack <= d_stb & ~d_ack;
        if (i_stb && !i_ack) i_rdat <= mem[i_adr[7:2]];
        if (d_stb && !d_ack) begin
          d_rdat <= mem[d_adr[7:2]];
          if (d_we)
            for (int b = 0; b < 4; b++)
              if (d_sel[b]) mem[d_adr[7:2]][8*b +: 8] <= d_wdat[8*b +: 8];
        end
      end
    end

    int unsigned cyc = 0, start_cyc = 0, nins = 0, n_alu = 0;
    logic [31:0] cur_ins;
    bit prev_stb = 1'b0;

    always @(posedge clk) if (rst_n && !done[g]) begin
      cyc++;
      if (i_stb && !prev_stb) begin
        if (nins > 0) begin
          int unsigned got;
          got = cyc - start_cyc;
          checks++;
          if (got > N_IF + N_ID + 3 * N + 1 || got < N_IF + N_ID + N) begin
            failures++;
            $display("C=%0d DP=%0d BP=%0d: %08h took %0d cycles, outside CPI bounds", C, DP, BP, cur_ins, got);
          end
          if (cur_ins[6:0] inside {7'b0010011, 7'b0110011} && cur_ins[13:12] != 2'b01) begin
            n_alu++;
            checks++;
            if (got != N_IF + N_ID + N) begin
              failures++;
              $display("C=%0d DP=%0d BP=%0d: ALU %08h took %0d cycles, CPI_min is %0d",
                       C, DP, BP, cur_ins, got, N_IF + N_ID + N);
            end
          end
        end
        cur_ins   = mem[i_adr[7:2]];
        start_cyc = cyc;
        nins++;
        if (i_adr == 32'd32) done[g] <= 1'b1;
      end
      prev_stb = i_stb;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    repeat (3) @(posedge clk);
    chk(g_cfg[0].dut.u_rf.regs[1] == 55 && g_cfg[1].dut.u_rf.regs[1] == 55 &&
        g_cfg[2].dut.u_rf.regs[1] == 55 && g_cfg[3].dut.u_rf.regs[1] == 55, "sum 1..10");
    chk(g_cfg[0].mem[32] == 55 && g_cfg[3].mem[32] == 55, "stored word");
    chk(g_cfg[0].dut.u_rf.regs[4] == 55 << 9 && g_cfg[1].dut.u_rf.regs[4] == 55 << 9 &&
        g_cfg[2].dut.u_rf.regs[4] == 55 << 9 && g_cfg[3].dut.u_rf.regs[4] == 55 << 9, "lbu + slli");
    chk(g_cfg[0].n_alu == 22 && g_cfg[3].n_alu == 22, "number of ALU instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
