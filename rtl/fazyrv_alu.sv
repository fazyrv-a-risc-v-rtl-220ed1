// fazyrv_alu -- chunk-wide ALU of the FazyRV core.
//
// Processes one CHUNKSIZE-bit chunk of each operand per clock, least
// significant chunk first. A carry flip-flop links the chunks of an add or
// subtract; an equality flip-flop accumulates whether all chunks so far were
// equal. first_i marks the first chunk of a pass (carry-in 0 for ADD, 1 for
// SUB/SLT/SLTU), en_i advances the state. The comparison outputs are valid
// in the cycle that presents the last (most significant) chunk:
//   eq_o  : a == b over the whole word
//   lt_o  : a < b signed,   ltu_o : a < b unsigned
// computed from a - b. The set-less-than result itself is a single bit that
// is only known after the last chunk, so the core writes it back as a
// whole word; res_o is the difference for SLT/SLTU. Logic operations need
// no state. The structure is this design's own within the document's
// chunk-serial scheme.
module fazyrv_alu
  import fazyrv_pkg::*;
#(
  parameter int unsigned CHUNKSIZE = 2
) (
  input  logic                 clk_i,
  input  logic                 en_i,
  input  logic                 first_i,
  input  alu_op_e              op_i,
  input  logic [CHUNKSIZE-1:0] a_i,
  input  logic [CHUNKSIZE-1:0] b_i,
  output logic [CHUNKSIZE-1:0] res_o,
  output logic                 eq_o,
  output logic                 lt_o,
  output logic                 ltu_o
);

  logic                 carry_q, eq_q;
  logic                 sub, cin, eq_in;
  logic [CHUNKSIZE:0]   sum;
  logic [CHUNKSIZE-1:0] b_eff;

  assign sub   = (op_i == ALU_SUB) || (op_i == ALU_SLT) || (op_i == ALU_SLTU);
  assign cin   = first_i ? sub : carry_q;
  assign eq_in = first_i ? 1'b1 : eq_q;
  assign b_eff = sub ? ~b_i : b_i;
  assign sum   = {1'b0, a_i} + {1'b0, b_eff} + {{CHUNKSIZE{1'b0}}, cin};

  always_comb begin
    unique case (op_i)
      ALU_AND: res_o = a_i & b_i;
      ALU_OR:  res_o = a_i | b_i;
      ALU_XOR: res_o = a_i ^ b_i;
      default: res_o = sum[CHUNKSIZE-1:0];
    endcase
  end

  assign eq_o  = eq_in && (a_i == b_i);
  assign ltu_o = ~sum[CHUNKSIZE];
  assign lt_o  = (a_i[CHUNKSIZE-1] ^ b_i[CHUNKSIZE-1]) ? a_i[CHUNKSIZE-1] : sum[CHUNKSIZE-1];

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      carry_q <= sum[CHUNKSIZE];
      eq_q    <= eq_o;
    end
  end

endmodule
