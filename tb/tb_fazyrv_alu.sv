// tb_fazyrv_alu -- self-checking test of the chunk ALU for chunk sizes 1, 2,
// 4 and 8. Random 32-bit operands are streamed chunk by chunk, least
// significant first; the collected result and the comparison flags of the
// last chunk (for the subtracting operations, the only ones whose flags
// the core uses) are compared with 32-bit reference arithmetic.
module tb_fazyrv_alu
  import fazyrv_pkg::*;
;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks [4];
  int failures [4];
  logic [3:0] done = '0;

  for (genvar g = 0; g < 4; g++) begin : g_c
    localparam int unsigned C = 1 << g;
    localparam int unsigned N = 32 / C;
    logic         en, first;
    alu_op_e      op;
    logic [C-1:0] a, b, res;
    logic         eq, lt, ltu;

    fazyrv_alu #(.CHUNKSIZE(C)) dut (.clk_i(clk), .en_i(en), .first_i(first), .op_i(op),
      .a_i(a), .b_i(b), .res_o(res), .eq_o(eq), .lt_o(lt), .ltu_o(ltu));

    initial begin
      logic [31:0] va, vb, got, exp_r;
      checks[g] = 0; failures[g] = 0;
      en = 1'b0; first = 1'b0; op = ALU_ADD; a = '0; b = '0;
      for (int it = 0; it < 400; it++) begin
        va = $urandom(); vb = $urandom();
        if (it % 5 == 0) vb = va;                    // equal operands
        if (it % 7 == 0) vb = {va[31], 31'($urandom())};  // same sign
        op = alu_op_e'($urandom_range(0, 6));
        for (int k = 0; k < int'(N); k++) begin
          @(negedge clk);
          en = 1'b1; first = (k == 0);
          a = va[k*C +: C]; b = vb[k*C +: C];
          #1;
          got[k*C +: C] = res;
          if (k == int'(N) - 1 && op inside {ALU_SUB, ALU_SLT, ALU_SLTU}) begin
            checks[g] += 3;
            if (eq !== (va == vb)) failures[g]++;
            if (lt !== ($signed(va) < $signed(vb))) begin
              failures[g]++; $display("C=%0d lt wrong for %08h %08h", C, va, vb);
            end
            if (ltu !== (va < vb)) failures[g]++;
          end
        end
        case (op)
          ALU_ADD: exp_r = va + vb;
          ALU_AND: exp_r = va & vb;
          ALU_OR:  exp_r = va | vb;
          ALU_XOR: exp_r = va ^ vb;
          default: exp_r = va - vb;   // SUB, SLT, SLTU
        endcase
        checks[g]++;
        if (got !== exp_r) begin
          failures[g]++;
          $display("C=%0d op=%s %08h,%08h -> %08h expected %08h", C, op.name(), va, vb, got, exp_r);
        end
      end
      @(negedge clk); en = 1'b0;
      done[g] = 1'b1;
    end
  end

  initial begin
    int c, f;
    wait (&done);
    c = 0; f = 0;
    for (int i = 0; i < 4; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
