// tb_fazyrv_regfile -- self-checking test of the register file, both with
// two read ports and with one. Random writes and reads are compared with a
// model array; read data must appear exactly one clock after the address,
// x0 must read as zero.
module tb_fazyrv_regfile;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  ra0, ra1, wa;
  logic [31:0] rd0_2r, rd1_2r, rd0_1r, rd1_1r, wd;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  fazyrv_regfile #(.DUALPORT(1'b1)) dut2 (.clk_i(clk), .raddr0_i(ra0), .rdata0_o(rd0_2r),
    .raddr1_i(ra1), .rdata1_o(rd1_2r), .we_i(we), .waddr_i(wa), .wdata_i(wd));
  fazyrv_regfile #(.DUALPORT(1'b0)) dut1 (.clk_i(clk), .raddr0_i(ra0), .rdata0_o(rd0_1r),
    .raddr1_i(ra1), .rdata1_o(rd1_1r), .we_i(we), .waddr_i(wa), .wdata_i(wd));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; ra0 = '0; ra1 = '0; wa = '0; wd = '0;
    // fill every register
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1'b1; wa = 5'(r); wd = $urandom();
      model[r] = (r == 0) ? 32'd0 : wd;
    end
    @(negedge clk); we = 1'b0;
    for (int it = 0; it < 2000; it++) begin
      logic [4:0] a0, a1;
      @(negedge clk);
      a0 = 5'($urandom()); a1 = 5'($urandom());
      ra0 = a0; ra1 = a1;
      we = 1'($urandom()); wa = 5'($urandom()); wd = $urandom();
      @(negedge clk);
      chk(rd0_2r == model[a0], $sformatf("2R port0 x%0d", a0));
      chk(rd1_2r == model[a1], $sformatf("2R port1 x%0d", a1));
      chk(rd0_1r == model[a0], $sformatf("1R port0 x%0d", a0));
      chk(rd1_1r == 32'd0, "1R has no second port");
      if (we && wa != 0) model[wa] = wd;
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
