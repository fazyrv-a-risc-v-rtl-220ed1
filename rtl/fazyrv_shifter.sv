// fazyrv_shifter -- operand-a shift register with macro-step shifting.
//
// Holds the first source operand and hands it to the ALU one CHUNKSIZE-bit
// chunk per clock (out_o, least significant chunk first); every step_i
// moves the register right by one chunk and fills the top with the fill
// bit (zero, or the sign bit for arithmetic right shifts).
// Shifts by s = q*CHUNKSIZE + r are split as in the FazyRV scheme:
//   * q "macro steps": the register is stepped q times before the output
//     pass, moving the word a whole chunk per clock;
//   * the remaining r < CHUNKSIZE bits are taken during the output pass by
//     a small 2*CHUNKSIZE-to-CHUNKSIZE funnel shifter that looks at the
//     current and the next chunk (fine_i = r).
// So the extra cost is q cycles and a CHUNKSIZE-wide funnel shifter, and
// both shrink or grow with the chunk size. Only right shifts exist here;
// the core bit-reverses operand and result for left shifts.
// Timing: load_i captures d_i (and the fill bit) at the clock edge;
// out_o is combinational from the register and fine_i.
module fazyrv_shifter #(
  parameter int unsigned CHUNKSIZE = 2,
  localparam int unsigned FW = (CHUNKSIZE > 1) ? $clog2(CHUNKSIZE) : 1
) (
  input  logic                 clk_i,
  input  logic                 load_i,
  input  logic [31:0]          d_i,
  input  logic                 arith_i,  // fill with d_i[31] instead of 0
  input  logic                 step_i,
  input  logic [FW-1:0]        fine_i,
  output logic [CHUNKSIZE-1:0] out_o
);

  logic [31:0]            sr_q;
  logic                   fill_q;

  always_ff @(posedge clk_i) begin
    if (load_i) begin
      sr_q   <= d_i;
      fill_q <= arith_i & d_i[31];
    end else if (step_i) begin
      sr_q   <= {{CHUNKSIZE{fill_q}}, sr_q[31:CHUNKSIZE]};
    end
  end

  // Fine shift: output bit i is bit i + fine_i of the register, i.e. a
  // window over the current and the next chunk.
  always_comb begin
    for (int i = 0; i < CHUNKSIZE; i++) out_o[i] = sr_q[i + int'(fine_i)];
  end

endmodule
