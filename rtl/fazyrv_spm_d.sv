// fazyrv_spm_d -- data scratch register between the core and the data bus.
//
// Store: at the end of decode the core loads the rs2 value (st_load_i);
// during the bus access the block presents it replicated across the bus
// word (byte x4, halfword x2, word) with the matching byte selects for the
// address bits addr_lo_i, so the bus slave only has to honour sel_o.
// Load: on the bus acknowledge (ld_capture_i) the read word is captured,
// shifted right so the addressed byte/halfword sits at bit 0. During the
// following pass each step_i shifts one CHUNKSIZE-bit chunk out (out_o,
// least significant first). Sign or zero extension follows the FazyRV
// observation that, for chunk sizes up to 8 bits, the bit to replicate
// (bit 7 or bit 15 of the loaded value) always leaves the register at the
// same place: bit CHUNKSIZE-1 of the last chunk that still carries data.
// The block latches that bit then and outputs it replicated for all
// remaining chunks (zero for LBU/LHU).
// funct3_i is the RV32I load/store width code; it and addr_lo_i must stay
// stable during the access and the load pass.
module fazyrv_spm_d #(
  parameter int unsigned CHUNKSIZE = 2
) (
  input  logic                 clk_i,
  input  logic [2:0]           funct3_i,
  input  logic [1:0]           addr_lo_i,
  // store path
  input  logic                 st_load_i,
  input  logic [31:0]          st_data_i,
  output logic [31:0]          wdat_o,
  output logic [3:0]           sel_o,
  // load path
  input  logic                 ld_capture_i,
  input  logic [31:0]          rdat_i,
  input  logic                 step_i,
  output logic [CHUNKSIZE-1:0] out_o
);

  localparam int unsigned NCHUNK = 32 / CHUNKSIZE;
  localparam int unsigned CW     = $clog2(NCHUNK + 1);

  logic [31:0]   d_q;
  logic [CW-1:0] cnt_q;
  logic          ext_q;
  logic [CW-1:0] last_data_chunk;  // index of the chunk holding bit 7 / 15
  logic          in_data;

  // Byte lanes and selects for stores.
  always_comb begin
    unique case (funct3_i[1:0])
      2'b00:   begin wdat_o = {4{d_q[7:0]}};  sel_o = 4'b0001 << addr_lo_i; end
      2'b01:   begin wdat_o = {2{d_q[15:0]}}; sel_o = addr_lo_i[1] ? 4'b1100 : 4'b0011; end
      default: begin wdat_o = d_q;            sel_o = 4'b1111; end
    endcase
  end

  always_comb begin
    unique case (funct3_i[1:0])
      2'b00:   last_data_chunk = CW'(8 / CHUNKSIZE - 1);
      2'b01:   last_data_chunk = CW'(16 / CHUNKSIZE - 1);
      default: last_data_chunk = CW'(NCHUNK - 1);
    endcase
  end

  assign in_data = (cnt_q <= last_data_chunk);
  assign out_o   = in_data ? d_q[CHUNKSIZE-1:0] : {CHUNKSIZE{ext_q}};

  always_ff @(posedge clk_i) begin
    if (st_load_i) begin
      d_q <= st_data_i;
    end else if (ld_capture_i) begin
      d_q   <= rdat_i >> {addr_lo_i, 3'b000};
      cnt_q <= '0;
      ext_q <= 1'b0;
    end else if (step_i) begin
      d_q   <= d_q >> CHUNKSIZE;
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == last_data_chunk) ext_q <= ~funct3_i[2] & d_q[CHUNKSIZE-1];
    end
  end

endmodule
