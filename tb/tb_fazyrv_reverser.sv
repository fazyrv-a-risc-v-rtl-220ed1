// tb_fazyrv_reverser -- self-checking test of the bit reverser: reversed
// words are compared with a bit-by-bit reference, and disabled reversal
// must pass the word unchanged.
module tb_fazyrv_reverser;

  logic        en;
  logic [31:0] d, q, ref_q;
  int checks = 0, failures = 0;

  fazyrv_reverser #(.W(32)) dut (.en_i(en), .d_i(d), .q_o(q));

  initial begin
    for (int it = 0; it < 1000; it++) begin
      d = $urandom(); en = 1'($urandom());
      #1;
      ref_q = d;
      if (en) for (int i = 0; i < 32; i++) ref_q[31-i] = d[i];
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL: en=%0b d=%08h q=%08h expected %08h", en, d, q, ref_q);
      end
    end
    d = 32'h0000_0001; en = 1'b1; #1;
    checks++;
    if (q !== 32'h8000_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
