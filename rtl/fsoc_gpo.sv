// fsoc_gpo -- the single memory-mapped output of the reference SoC.
//
// A one-bit output register on a Wishbone-style slave port. A write with
// byte lane 0 selected stores wdat_i[0]; a read returns the bit in rdat_o[0].
// Every request is acknowledged one cycle later (same timing as fsoc_bram).
// The output resets to 0.
// The single output follows the FazyRV reference SoC; the register layout
// is this design's choice. Only byte lane 0 and data bit 0 are used, the
// other sel_i and wdat_i bits are unused on purpose.
module fsoc_gpo (
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  logic        stb_i,
  input  logic        we_i,
  input  logic [3:0]  sel_i,
  input  logic [31:0] wdat_i,
  output logic        ack_o,
  output logic [31:0] rdat_o,
  output logic        gpo_o
);

  always_ff @(posedge clk_i or negedge rst_n_i) begin
    if (!rst_n_i) begin
      ack_o <= 1'b0;
      gpo_o <= 1'b0;
    end else begin
      ack_o <= stb_i & ~ack_o;
      if (stb_i && !ack_o && we_i && sel_i[0]) gpo_o <= wdat_i[0];
    end
  end

  assign rdat_o = {31'd0, gpo_o};

endmodule
