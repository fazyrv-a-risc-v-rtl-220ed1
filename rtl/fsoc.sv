// fsoc -- minimal reference SoC around the FazyRV core.
//
// The smallest system that runs software: the core with its register file
// (fazyrv_top), a MEM_BYTES memory (default 64 bytes) that holds both code
// and data, and one memory-mapped output bit gpo_o. The instruction bus and
// the memory-bound part of the data bus share the memory's single port
// through an OR (fsoc_xbar), which is safe because the core never fetches
// and accesses data at once. Data addresses with bit 31 set reach the
// output register; a store of value v to such an address drives gpo_o = v[0].
// Execution starts at address 0 after the asynchronous, active-low reset.
// The memory is not initialised by the hardware; the program is placed in
// it from outside (simulation) before reset is released.
// The 64-byte memory, the single output and the OR-shared memory port
// follow the FazyRV reference SoC; the address map (bit 31) and the reset
// address are this design's choice. rst_n_i is also used to disable the
// bus assertions, which lint reports as a signal used both synchronously
// and asynchronously.
module fsoc #(
  parameter int unsigned CHUNKSIZE   = 2,
  parameter bit          RF_DUALPORT = 1'b1,
  parameter bit          RF_BYPASS   = 1'b1,
  parameter int unsigned MEM_BYTES   = 64
) (
  input  logic clk_i,
  input  logic rst_n_i,
  output logic gpo_o
);

  logic        i_stb, i_ack;
  logic [31:0] i_adr, i_rdat;
  logic        d_stb, d_we, d_ack;
  logic [31:0] d_adr, d_wdat, d_rdat;
  logic [3:0]  d_sel;
  logic        m_stb, m_we, m_ack;
  logic [31:0] m_adr, m_wdat, m_rdat;
  logic [3:0]  m_sel;
  logic        g_stb, g_we, g_ack;
  logic [3:0]  g_sel;
  logic [31:0] g_wdat, g_rdat;

  fazyrv_top #(
    .CHUNKSIZE(CHUNKSIZE), .RF_DUALPORT(RF_DUALPORT), .RF_BYPASS(RF_BYPASS),
    .BOOTADR(32'h0)
  ) u_cpu (
    .clk_i, .rst_n_i,
    .imem_stb_o(i_stb), .imem_adr_o(i_adr), .imem_ack_i(i_ack), .imem_rdat_i(i_rdat),
    .dmem_stb_o(d_stb), .dmem_we_o(d_we), .dmem_adr_o(d_adr), .dmem_sel_o(d_sel),
    .dmem_wdat_o(d_wdat), .dmem_ack_i(d_ack), .dmem_rdat_i(d_rdat)
  );

  fsoc_xbar u_xbar (
    .clk_i, .rst_n_i,
    .imem_stb_i(i_stb), .imem_adr_i(i_adr), .imem_ack_o(i_ack), .imem_rdat_o(i_rdat),
    .dmem_stb_i(d_stb), .dmem_we_i(d_we), .dmem_adr_i(d_adr), .dmem_sel_i(d_sel),
    .dmem_wdat_i(d_wdat), .dmem_ack_o(d_ack), .dmem_rdat_o(d_rdat),
    .mem_stb_o(m_stb), .mem_we_o(m_we), .mem_adr_o(m_adr), .mem_sel_o(m_sel),
    .mem_wdat_o(m_wdat), .mem_ack_i(m_ack), .mem_rdat_i(m_rdat),
    .gpo_stb_o(g_stb), .gpo_we_o(g_we), .gpo_sel_o(g_sel), .gpo_wdat_o(g_wdat),
    .gpo_ack_i(g_ack), .gpo_rdat_i(g_rdat)
  );

  fsoc_bram #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk_i, .rst_n_i,
    .stb_i(m_stb), .we_i(m_we), .adr_i(m_adr), .sel_i(m_sel), .wdat_i(m_wdat),
    .ack_o(m_ack), .rdat_o(m_rdat)
  );

  fsoc_gpo u_gpo (
    .clk_i, .rst_n_i,
    .stb_i(g_stb), .we_i(g_we), .sel_i(g_sel), .wdat_i(g_wdat),
    .ack_o(g_ack), .rdat_o(g_rdat), .gpo_o
  );

endmodule
