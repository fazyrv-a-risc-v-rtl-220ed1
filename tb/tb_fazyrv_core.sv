// tb_fazyrv_core -- randomized self-checking test of the FazyRV core.
//
// Runs tb_core_run for every chunk size (1, 2, 4, 8) and every register
// file variant (one or two read ports, with and without bypass), each with
// its own random program, and sums up the checks.
module tb_fazyrv_core;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NRUN = 6;
  logic [NRUN-1:0] done;
  int checks [NRUN];
  int failures [NRUN];

  tb_core_run #(.C(1), .DP(1'b0), .BP(1'b0), .SEED(11)) r0 (.clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  tb_core_run #(.C(2), .DP(1'b1), .BP(1'b1), .SEED(12)) r1 (.clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  tb_core_run #(.C(4), .DP(1'b1), .BP(1'b0), .SEED(13)) r2 (.clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  tb_core_run #(.C(8), .DP(1'b0), .BP(1'b1), .SEED(14)) r3 (.clk, .done(done[3]), .checks(checks[3]), .failures(failures[3]));
  tb_core_run #(.C(2), .DP(1'b0), .BP(1'b0), .SEED(15)) r4 (.clk, .done(done[4]), .checks(checks[4]), .failures(failures[4]));
  tb_core_run #(.C(8), .DP(1'b1), .BP(1'b1), .SEED(16)) r5 (.clk, .done(done[5]), .checks(checks[5]), .failures(failures[5]));

  int total_c, total_f;

  task automatic report(input int extra_fail);
    total_c = 0; total_f = extra_fail;
    for (int i = 0; i < NRUN; i++) begin
      total_c += checks[i];
      total_f += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_c, total_f);
    $finish;
  endtask

  initial begin
    wait (&done);
    repeat (2) @(posedge clk);
    report(0);
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: runs not finished (%b)", done);
    report(1);
  end

endmodule
