// tb_lte_qpp_workload: runs the collision-free memory subsystem on LTE
// QPP-interleaved block lengths that a plain barrel shifter supports, for
// P = 4 and P = 8 processors, including the largest length 2240 of the
// evaluated HSPA/LTE range. Each length gets its own instance, built with
// MASK = 0 (no relaxation switches); each instance writes a whole block and
// reads it back in natural and interleaved order (see qpp_workload_runner).
// The interleaver coefficients (F1, F2) are those of the LTE turbo-code
// interleaver table.
module tb_lte_qpp_workload;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 9;
  logic done [N];
  int   chk  [N];
  int   fail [N];

  qpp_workload_runner #(.P(4), .K(160),  .F1(21),  .F2(120)) r0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  qpp_workload_runner #(.P(4), .K(200),  .F1(13),  .F2(50))  r1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  qpp_workload_runner #(.P(4), .K(240),  .F1(29),  .F2(60))  r2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  qpp_workload_runner #(.P(4), .K(320),  .F1(21),  .F2(120)) r3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  qpp_workload_runner #(.P(4), .K(2240), .F1(209), .F2(420)) r4 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  qpp_workload_runner #(.P(8), .K(416),  .F1(25),  .F2(52))  r5 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  qpp_workload_runner #(.P(8), .K(480),  .F1(89),  .F2(180)) r6 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fail[6]));
  qpp_workload_runner #(.P(8), .K(800),  .F1(17),  .F2(80))  r7 (.clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fail[7]));
  qpp_workload_runner #(.P(8), .K(2240), .F1(209), .F2(420)) r8 (.clk, .rst_n, .done(done[8]), .checks(chk[8]), .failures(fail[8]));

  int checks, failures;

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1'b1;
      for (int i = 0; i < N; i++) if (!done[i]) all_done = 1'b0;
    end while (!all_done);
    checks = 0;
    failures = 0;
    for (int i = 0; i < N; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
