// tb_fsoc_gpo -- self-checking test of the memory-mapped output bit:
// writes with and without byte lane 0 selected, read-back, reset value and
// one-cycle acknowledge.
module tb_fsoc_gpo;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        stb, we, ack, gpo;
  logic [3:0]  sel;
  logic [31:0] wdat, rdat;
  logic        model;
  int checks = 0, failures = 0;

  fsoc_gpo dut (.clk_i(clk), .rst_n_i(rst_n), .stb_i(stb), .we_i(we), .sel_i(sel),
    .wdat_i(wdat), .ack_o(ack), .rdat_o(rdat), .gpo_o(gpo));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    stb = 0; we = 0; sel = '0; wdat = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = 1'b0;
    chk(gpo == 1'b0, "reset value");
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      stb = 1'b1; we = 1'($urandom()); sel = 4'($urandom()); wdat = $urandom();
      @(posedge clk); #1;
      chk(ack == 1'b1, "ack after one cycle");
      if (we && sel[0]) model = wdat[0];
      chk(gpo == model, "output value");
      chk(rdat == {31'd0, model}, "read-back");
      @(negedge clk);
      stb = 1'b0;
      @(posedge clk); #1 chk(ack == 1'b0, "ack drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
