// tb_fazyrv_spm_d -- self-checking test of the data scratch register for
// chunk sizes 1, 2, 4 and 8.
// Stores: random data, width and address; the replicated write data and
// byte selects are checked. Loads: a random bus word is captured for every
// load width and address, shifted out over 32 / C steps, and the collected
// word must equal the RV32I sign- or zero-extended value.
module tb_fazyrv_spm_d;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks [4];
  int failures [4];
  logic [3:0] done = '0;

  for (genvar g = 0; g < 4; g++) begin : g_c
    localparam int unsigned C = 1 << g;
    localparam int unsigned N = 32 / C;
    logic [2:0]   f3;
    logic [1:0]   alo;
    logic         st_load, ld_cap, step;
    logic [31:0]  st_data, wdat, rdat;
    logic [3:0]   sel;
    logic [C-1:0] out;

    fazyrv_spm_d #(.CHUNKSIZE(C)) dut (.clk_i(clk), .funct3_i(f3), .addr_lo_i(alo),
      .st_load_i(st_load), .st_data_i(st_data), .wdat_o(wdat), .sel_o(sel),
      .ld_capture_i(ld_cap), .rdat_i(rdat), .step_i(step), .out_o(out));

    initial begin
      logic [31:0] v, got, exp_r, sh;
      logic [3:0]  exp_sel;
      checks[g] = 0; failures[g] = 0;
      st_load = 0; ld_cap = 0; step = 0; f3 = '0; alo = '0; st_data = '0; rdat = '0;
      for (int it = 0; it < 300; it++) begin
        // ---- store
        v = $urandom();
        f3 = 3'($urandom_range(0, 2));
        alo = 2'($urandom()) & ((f3 == 3'd2) ? 2'b00 : (f3 == 3'd1) ? 2'b10 : 2'b11);
        @(negedge clk);
        st_load = 1'b1; st_data = v;
        @(negedge clk);
        st_load = 1'b0;
        #1;
        case (f3)
          3'd0: exp_sel = 4'b0001 << alo;
          3'd1: exp_sel = 4'b0011 << alo;
          default: exp_sel = 4'b1111;
        endcase
        checks[g] += 2;
        if (sel !== exp_sel) failures[g]++;
        for (int b = 0; b < 4; b++)
          if (exp_sel[b] && wdat[8*b +: 8] !== v[8*(b - alo) +: 8]) begin
            failures[g]++;
            $display("C=%0d store f3=%0d a=%0d data %08h -> %08h", C, f3, alo, v, wdat);
            break;
          end
        // ---- load
        rdat = $urandom();
        case ($urandom_range(0, 4))
          0: f3 = 3'b000; 1: f3 = 3'b001; 2: f3 = 3'b010; 3: f3 = 3'b100; default: f3 = 3'b101;
        endcase
        alo = 2'($urandom()) & ((f3[1:0] == 2'd2) ? 2'b00 : (f3[1:0] == 2'd1) ? 2'b10 : 2'b11);
        @(negedge clk);
        ld_cap = 1'b1;
        @(negedge clk);
        ld_cap = 1'b0;
        for (int k = 0; k < int'(N); k++) begin
          step = 1'b1;
          #1 got[k*C +: C] = out;
          @(negedge clk);
        end
        step = 1'b0;
        sh = rdat >> (8 * alo);
        case (f3)
          3'b000: exp_r = {{24{sh[7]}}, sh[7:0]};
          3'b001: exp_r = {{16{sh[15]}}, sh[15:0]};
          3'b100: exp_r = {24'd0, sh[7:0]};
          3'b101: exp_r = {16'd0, sh[15:0]};
          default: exp_r = rdat;
        endcase
        checks[g]++;
        if (got !== exp_r) begin
          failures[g]++;
          $display("C=%0d load f3=%0d a=%0d word %08h -> %08h expected %08h", C, f3, alo, rdat, got, exp_r);
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
