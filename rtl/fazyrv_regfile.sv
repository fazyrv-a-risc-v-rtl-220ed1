// fazyrv_regfile -- RV32I register file x0..x31 in block-RAM style.
//
// A 32 x 32-bit array with one write port and one (DUALPORT=0, "1R") or two
// (DUALPORT=1, "2R") synchronous read ports, i.e. what an FPGA block RAM
// provides. Read data appears one clock after the address, which is why
// the core needs one to three decode cycles depending on the number of read
// ports and on the instruction-bus bypass. x0 reads as zero and ignores
// writes. With DUALPORT=0 the second read port is not built and rdata1_o is
// held at zero. The core writes a whole 32-bit word in one clock at the end
// of an instruction; it never reads and writes in the same cycle, so no
// read-during-write ordering is defined here.
// The 1R/2R variants and the block-RAM read timing follow the FazyRV
// description; the zero-held second port of the 1R variant is this design's
// choice.
module fazyrv_regfile #(
  parameter bit DUALPORT = 1'b1
) (
  input  logic        clk_i,
  input  logic [4:0]  raddr0_i,
  output logic [31:0] rdata0_o,
  input  logic [4:0]  raddr1_i,
  output logic [31:0] rdata1_o,
  input  logic        we_i,
  input  logic [4:0]  waddr_i,
  input  logic [31:0] wdata_i
);

  logic [31:0] regs [32];

  always_ff @(posedge clk_i) begin
    if (we_i && waddr_i != 5'd0) regs[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk_i) begin
    rdata0_o <= (raddr0_i == 5'd0) ? 32'd0 : regs[raddr0_i];
  end

  if (DUALPORT) begin : g_2r
    always_ff @(posedge clk_i) begin
      rdata1_o <= (raddr1_i == 5'd0) ? 32'd0 : regs[raddr1_i];
    end
  end else begin : g_1r
    assign rdata1_o = 32'd0;
  end

endmodule
