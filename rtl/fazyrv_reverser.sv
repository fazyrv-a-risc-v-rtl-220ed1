// fazyrv_reverser -- optional bit-order reversal of a word.
//
// The core has a single right-shifting shift unit. A left shift is done by
// reversing the bit order of the operand before it enters the shift
// register and reversing the result again before it is written back:
// reverse(reverse(x) >> s) == x << s. Combinational; with en_i low the word
// passes unchanged. Where the reversal sits (on whole words at the operand
// load and at the write-back) is this design's choice.
module fazyrv_reverser #(
  parameter int unsigned W = 32
) (
  input  logic         en_i,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);

  always_comb begin
    for (int i = 0; i < W; i++) q_o[i] = en_i ? d_i[W-1-i] : d_i[i];
  end

endmodule
