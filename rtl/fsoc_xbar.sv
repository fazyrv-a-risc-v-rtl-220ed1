// fsoc_xbar -- bus interconnect of the reference SoC.
//
// Two parts, as in the SoC diagram with a MUX and an OR gate:
//   * MUX: the data bus goes either to the output register (address bit
//     GPO_ADR_BIT set) or to the memory;
//   * OR: the memory has a single port. Because the core never requests
//     instructions and data at the same time, the instruction request and
//     the memory-bound data request are simply ORed together (each gated
//     by its own strobe) instead of being arbitrated. The memory's
//     acknowledge is returned to whichever master is requesting.
// Purely combinational. The address bit that selects the output register
// is this design's choice. An assertion checks that the two requests to the
// memory never overlap, the condition the OR relies on.
module fsoc_xbar #(
  parameter int unsigned GPO_ADR_BIT = 31
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  // instruction bus from the core
  input  logic        imem_stb_i,
  input  logic [31:0] imem_adr_i,
  output logic        imem_ack_o,
  output logic [31:0] imem_rdat_o,
  // data bus from the core
  input  logic        dmem_stb_i,
  input  logic        dmem_we_i,
  input  logic [31:0] dmem_adr_i,
  input  logic [3:0]  dmem_sel_i,
  input  logic [31:0] dmem_wdat_i,
  output logic        dmem_ack_o,
  output logic [31:0] dmem_rdat_o,
  // memory port
  output logic        mem_stb_o,
  output logic        mem_we_o,
  output logic [31:0] mem_adr_o,
  output logic [3:0]  mem_sel_o,
  output logic [31:0] mem_wdat_o,
  input  logic        mem_ack_i,
  input  logic [31:0] mem_rdat_i,
  // output-register port
  output logic        gpo_stb_o,
  output logic        gpo_we_o,
  output logic [3:0]  gpo_sel_o,
  output logic [31:0] gpo_wdat_o,
  input  logic        gpo_ack_i,
  input  logic [31:0] gpo_rdat_i
);

  logic d_gpo, d_mem;

  // MUX
  assign d_gpo = dmem_stb_i &  dmem_adr_i[GPO_ADR_BIT];
  assign d_mem = dmem_stb_i & ~dmem_adr_i[GPO_ADR_BIT];

  assign gpo_stb_o  = d_gpo;
  assign gpo_we_o   = dmem_we_i;
  assign gpo_sel_o  = dmem_sel_i;
  assign gpo_wdat_o = dmem_wdat_i;

  // OR
  assign mem_stb_o  = imem_stb_i | d_mem;
  assign mem_we_o   = d_mem & dmem_we_i;
  assign mem_adr_o  = ({32{imem_stb_i}} & imem_adr_i) | ({32{d_mem}} & dmem_adr_i);
  assign mem_sel_o  = ({4{imem_stb_i}} & 4'hF) | ({4{d_mem}} & dmem_sel_i);
  assign mem_wdat_o = {32{d_mem}} & dmem_wdat_i;

  assign imem_ack_o  = imem_stb_i & mem_ack_i;
  assign imem_rdat_o = mem_rdat_i;
  assign dmem_ack_o  = d_gpo ? gpo_ack_i : (d_mem & mem_ack_i);
  assign dmem_rdat_o = d_gpo ? gpo_rdat_i : mem_rdat_i;

  a_no_overlap: assert property (@(posedge clk_i) disable iff (!rst_n_i)
                                 !(imem_stb_i && d_mem));

endmodule
