// tb_cf_network_variants: the worked example (L = 12, P = 4) on the other
// networks of the library, end to end.
//  r0: butterfly, no added switches, with a bank assignment the butterfly can
//      route (A = {0,4,5}, B = {1,2,3}, C = {9,10,11}, D = {6,7,8});
//  r1: Benes, no added switches, with the default (relaxation) assignment,
//      which the rearrangeable Benes network always routes;
//  r2: butterfly with the switches 2/3 and 3/0 added, default assignment
//      (one of its cycles is not a butterfly permutation).
// Each instance writes every datum twice and reads the block back in both
// orders (see mapping_runner).
module tb_cf_network_variants;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 3;
  logic done [N];
  int   chk  [N];
  int   fail [N];

  // Assignment routable by the plain butterfly.
  function automatic logic [11:0][1:0] bf_bank_of();
    int tab [12] = '{0, 1, 1, 1, 0, 0, 3, 3, 3, 2, 2, 2};
    logic [11:0][1:0] r;
    for (int d = 0; d < 12; d++) r[d] = 2'(tab[d]);
    return r;
  endfunction

  mapping_runner #(.NET(cf_pkg::NET_BF), .MASK(4'b0000),
                   .SCHED(cf_pkg::EX_SCHED), .BANK_OF(bf_bank_of()))
    r0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  mapping_runner #(.NET(cf_pkg::NET_BEN), .MASK(4'b0000),
                   .SCHED(cf_pkg::EX_SCHED), .BANK_OF(cf_pkg::EX_BANK_OF))
    r1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  mapping_runner #(.NET(cf_pkg::NET_BF), .MASK(4'b1100),
                   .SCHED(cf_pkg::EX_SCHED), .BANK_OF(cf_pkg::EX_BANK_OF))
    r2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  int checks, failures;

  initial begin
    #1000000;
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
