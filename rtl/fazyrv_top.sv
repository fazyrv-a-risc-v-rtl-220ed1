// fazyrv_top -- FazyRV core together with its register file.
//
// Instantiates fazyrv_core and fazyrv_regfile and exposes the two buses:
// the instruction bus (read only) and the data bus, both as Wishbone-style
// stb/ack handshakes with 32-bit word addresses (adr[1:0] = 0) and byte
// selects on the data bus. A request is held until the slave acknowledges
// it; the core never drives both buses in the same cycle.
// Parameters: CHUNKSIZE (1, 2, 4 or 8 bits per ALU pass), RF_DUALPORT
// (register file with two read ports), RF_BYPASS (register addresses taken
// straight from the instruction bus) and the reset address BOOTADR.
// Reset rst_n_i is asynchronous, active low.
// The split into core and register file, and the module name, follow the
// FazyRV description; the bus details above are this design's choice.
// rst_n_i also disables the bus assertion in the core, which is why lint
// sees it used both as an asynchronous reset and as a plain signal.
module fazyrv_top #(
  parameter int unsigned CHUNKSIZE   = 2,
  parameter bit          RF_DUALPORT = 1'b1,
  parameter bit          RF_BYPASS   = 1'b1,
  parameter logic [31:0] BOOTADR     = 32'h0000_0000
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  output logic        imem_stb_o,
  output logic [31:0] imem_adr_o,
  input  logic        imem_ack_i,
  input  logic [31:0] imem_rdat_i,
  output logic        dmem_stb_o,
  output logic        dmem_we_o,
  output logic [31:0] dmem_adr_o,
  output logic [3:0]  dmem_sel_o,
  output logic [31:0] dmem_wdat_o,
  input  logic        dmem_ack_i,
  input  logic [31:0] dmem_rdat_i
);

  logic [4:0]  raddr0, raddr1, waddr;
  logic [31:0] rdata0, rdata1, wdata;
  logic        we;

  fazyrv_core #(
    .CHUNKSIZE(CHUNKSIZE), .RF_DUALPORT(RF_DUALPORT),
    .RF_BYPASS(RF_BYPASS), .BOOTADR(BOOTADR)
  ) u_core (
    .clk_i, .rst_n_i,
    .imem_stb_o, .imem_adr_o, .imem_ack_i, .imem_rdat_i,
    .dmem_stb_o, .dmem_we_o, .dmem_adr_o, .dmem_sel_o, .dmem_wdat_o,
    .dmem_ack_i, .dmem_rdat_i,
    .rf_raddr0_o(raddr0), .rf_rdata0_i(rdata0),
    .rf_raddr1_o(raddr1), .rf_rdata1_i(rdata1),
    .rf_we_o(we), .rf_waddr_o(waddr), .rf_wdata_o(wdata)
  );

  fazyrv_regfile #(.DUALPORT(RF_DUALPORT)) u_rf (
    .clk_i,
    .raddr0_i(raddr0), .rdata0_o(rdata0),
    .raddr1_i(raddr1), .rdata1_o(rdata1),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata)
  );

endmodule
