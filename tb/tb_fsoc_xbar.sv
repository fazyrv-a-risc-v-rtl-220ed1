// tb_fsoc_xbar -- self-checking test of the SoC interconnect. Random,
// never-overlapping instruction and data requests: the memory port must
// carry exactly the active request, the output-register port only data
// requests with address bit 31 set, and acknowledges and read data must
// return to the requesting master only.
module tb_fsoc_xbar;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        i_stb, i_ack, d_stb, d_we, d_ack, m_stb, m_we, m_ack, g_stb, g_we, g_ack;
  logic [31:0] i_adr, i_rdat, d_adr, d_wdat, d_rdat, m_adr, m_wdat, m_rdat, g_wdat, g_rdat;
  logic [3:0]  d_sel, m_sel, g_sel;
  int checks = 0, failures = 0;

  fsoc_xbar dut (.clk_i(clk), .rst_n_i(rst_n),
    .imem_stb_i(i_stb), .imem_adr_i(i_adr), .imem_ack_o(i_ack), .imem_rdat_o(i_rdat),
    .dmem_stb_i(d_stb), .dmem_we_i(d_we), .dmem_adr_i(d_adr), .dmem_sel_i(d_sel),
    .dmem_wdat_i(d_wdat), .dmem_ack_o(d_ack), .dmem_rdat_o(d_rdat),
    .mem_stb_o(m_stb), .mem_we_o(m_we), .mem_adr_o(m_adr), .mem_sel_o(m_sel),
    .mem_wdat_o(m_wdat), .mem_ack_i(m_ack), .mem_rdat_i(m_rdat),
    .gpo_stb_o(g_stb), .gpo_we_o(g_we), .gpo_sel_o(g_sel), .gpo_wdat_o(g_wdat),
    .gpo_ack_i(g_ack), .gpo_rdat_i(g_rdat));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int kind;
    i_stb = 0; d_stb = 0; d_we = 0; i_adr = '0; d_adr = '0; d_sel = '0; d_wdat = '0;
    m_ack = 0; g_ack = 0; m_rdat = '0; g_rdat = '0;
    @(posedge clk); rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      kind  = $urandom_range(0, 2);    // 0 idle, 1 instruction, 2 data
      i_stb = (kind == 1);
      d_stb = (kind == 2);
      i_adr = $urandom(); d_adr = $urandom(); d_we = 1'($urandom());
      d_sel = 4'($urandom()); d_wdat = $urandom();
      m_ack = 1'($urandom()); g_ack = 1'($urandom());
      m_rdat = $urandom(); g_rdat = $urandom();
      #1;
      if (kind == 1) begin
        chk(m_stb && !g_stb && m_adr == i_adr && !m_we, "instruction request to memory");
        chk(i_ack == m_ack && !d_ack && i_rdat == m_rdat, "instruction response");
      end else if (kind == 2 && d_adr[31]) begin
        chk(g_stb && !m_stb && g_we == d_we && g_wdat == d_wdat && g_sel == d_sel, "data to output");
        chk(d_ack == g_ack && !i_ack && d_rdat == g_rdat, "output response");
      end else if (kind == 2) begin
        chk(m_stb && !g_stb && m_adr == d_adr && m_we == d_we && m_sel == d_sel &&
            m_wdat == d_wdat, "data to memory");
        chk(d_ack == m_ack && !i_ack && d_rdat == m_rdat, "memory response");
      end else begin
        chk(!m_stb && !g_stb && !i_ack && !d_ack, "idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
