// fsoc_bram -- word-organised Wishbone memory of the reference SoC.
//
// MEM_BYTES bytes (default 64, the size of the minimal reference SoC) as
// MEM_BYTES/4 words of 32 bits with byte-write enables. Classic Wishbone
// slave with one cycle of delay: a request (stb_i) is answered in the next
// cycle with ack_o high and, for reads, the word in rdat_o; ack_o then
// drops for one cycle, so back-to-back requests take two cycles each.
// Addresses wrap modulo the memory size. Contents are not initialised;
// software is loaded by writing the array from outside.
// The size and the one-cycle Wishbone delay follow the FazyRV reference
// SoC; byte writes and address wrapping are this design's choice. Only the
// word-index bits of adr_i are decoded, the other bits are unused on
// purpose.
module fsoc_bram #(
  parameter int unsigned MEM_BYTES = 64,
  localparam int unsigned WORDS = MEM_BYTES / 4,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  logic        stb_i,
  input  logic        we_i,
  input  logic [31:0] adr_i,
  input  logic [3:0]  sel_i,
  input  logic [31:0] wdat_i,
  output logic        ack_o,
  output logic [31:0] rdat_o
);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = adr_i[AW+1:2];

  always_ff @(posedge clk_i or negedge rst_n_i) begin
    if (!rst_n_i) ack_o <= 1'b0;
    else          ack_o <= stb_i & ~ack_o;
  end

  always_ff @(posedge clk_i) begin
    if (stb_i && !ack_o) begin
      rdat_o <= mem[widx];
      if (we_i) begin
        for (int b = 0; b < 4; b++)
          if (sel_i[b]) mem[widx][8*b +: 8] <= wdat_i[8*b +: 8];
      end
    end
  end

endmodule
