// tb_fsoc_bram -- self-checking test of the 64-byte Wishbone memory.
// Random byte-masked writes and reads against a model; every request must
// be acknowledged exactly one cycle after it is raised.
module tb_fsoc_bram;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        stb, we, ack;
  logic [31:0] adr, wdat, rdat;
  logic [3:0]  sel;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  fsoc_bram dut (.clk_i(clk), .rst_n_i(rst_n), .stb_i(stb), .we_i(we), .adr_i(adr),
    .sel_i(sel), .wdat_i(wdat), .ack_o(ack), .rdat_o(rdat));

  task automatic access(input bit w, input logic [3:0] idx, input logic [3:0] s,
                        input logic [31:0] d, output logic [31:0] q);
    int lat;
    @(negedge clk);
    stb = 1'b1; we = w; adr = {26'($urandom()) & 26'h0, idx, 2'b00}; sel = s; wdat = d;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!ack && lat < 10);
    checks++;
    if (lat != 1) begin failures++; $display("FAIL: ack after %0d cycles", lat); end
    q = rdat;
    @(negedge clk); stb = 1'b0;
  endtask

  initial begin
    logic [31:0] q, d;
    logic [3:0]  idx, s;
    stb = 0; we = 0; adr = '0; sel = '0; wdat = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      d = $urandom();
      access(1'b1, 4'(i), 4'hF, d, q);
      model[i] = d;
    end
    for (int it = 0; it < 500; it++) begin
      idx = 4'($urandom());
      if ($urandom_range(0, 1) != 0) begin
        s = 4'($urandom()); d = $urandom();
        access(1'b1, idx, s, d, q);
        for (int b = 0; b < 4; b++) if (s[b]) model[idx][8*b +: 8] = d[8*b +: 8];
      end else begin
        access(1'b0, idx, 4'hF, 32'd0, q);
        checks++;
        if (q !== model[idx]) begin
          failures++;
          $display("FAIL: word %0d read %08h expected %08h", idx, q, model[idx]);
        end
      end
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
