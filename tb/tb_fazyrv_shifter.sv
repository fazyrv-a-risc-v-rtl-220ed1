// tb_fazyrv_shifter -- self-checking test of the macro-step shifter for
// chunk sizes 1, 2, 4 and 8. For a random word and shift amount s the
// operand is loaded, stepped s / C times (macro steps) and then read out
// over 32 / C cycles with fine shift s % C; the collected word must equal
// the logical or arithmetic right shift. Without shifting (s = 0) the
// register must hand out the operand unchanged, chunk by chunk.
module tb_fazyrv_shifter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks [4];
  int failures [4];
  logic [3:0] done = '0;

  for (genvar g = 0; g < 4; g++) begin : g_c
    localparam int unsigned C  = 1 << g;
    localparam int unsigned N  = 32 / C;
    localparam int unsigned FW = (C > 1) ? $clog2(C) : 1;
    logic          load, arith, step;
    logic [31:0]   d;
    logic [FW-1:0] fine;
    logic [C-1:0]  out;

    fazyrv_shifter #(.CHUNKSIZE(C)) dut (.clk_i(clk), .load_i(load), .d_i(d), .arith_i(arith),
      .step_i(step), .fine_i(fine), .out_o(out));

    initial begin
      logic [31:0] v, got, exp_r;
      int s;
      checks[g] = 0; failures[g] = 0;
      load = 0; arith = 0; step = 0; d = '0; fine = '0;
      for (int it = 0; it < 300; it++) begin
        v = $urandom(); s = (it < 32) ? it : $urandom_range(0, 31);
        @(negedge clk);
        load = 1'b1; d = v; arith = 1'($urandom());
        @(negedge clk);
        load = 1'b0;
        for (int q = 0; q < s / int'(C); q++) begin
          step = 1'b1;
          @(negedge clk);
        end
        fine = FW'(s % int'(C));
        for (int k = 0; k < int'(N); k++) begin
          step = 1'b1;
          #1 got[k*C +: C] = out;
          @(negedge clk);
        end
        step = 1'b0;
        exp_r = arith ? 32'($signed(v) >>> s) : v >> s;
        checks[g]++;
        if (got !== exp_r) begin
          failures[g]++;
          $display("C=%0d %08h >>%s %0d = %08h, expected %08h", C, v, arith ? ">" : "", s, got, exp_r);
        end
      end
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
