// tb_cf_controller: self-checking test of the schedule controller with the
// default example mapping (L = 12, P = 4).
// Checks, for every access cycle, the network control word and every bank's
// address against values derived by hand from the mapping; that an iteration
// lasts exactly 2L/P = 6 cycles with the natural half first; that a start
// during an iteration (other than in its last cycle) is ignored; and that a
// start in the last cycle chains a second iteration with no idle cycle.
module tb_cf_controller;
  localparam int T = 6;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic       busy, phase, last;
  logic [2:0] step;
  logic [1:0] net_ctrl;
  logic [3:0] sw;
  logic [3:0][1:0] bank_addr;

  int checks = 0, failures = 0;

  cf_controller dut (.*);

  always #5 clk = ~clk;

  // Hand-derived ROM of the example: shift, switch bits, addresses of banks
  // A, B, C, D per cycle.
  int exp_shift [T] = '{0, 0, 3, 0, 2, 1};
  int exp_sw    [T] = '{0, 0, 0, 4, 8, 8};  // 4: switch 2/3, 8: switch 3/0
  int exp_addr  [T][4] = '{'{0, 0, 0, 0}, '{1, 1, 1, 1}, '{2, 2, 2, 2},
                           '{0, 2, 2, 2}, '{2, 0, 0, 1}, '{1, 1, 1, 0}};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Check one full iteration starting at the current negedge (busy high).
  // If chain is set, start is pulsed in the last cycle; if poke is set, start
  // is pulsed in cycle 2 (must be ignored).
  task automatic run_iteration(bit chain, bit poke);
    for (int t = 0; t < T; t++) begin
      check(busy === 1'b1, $sformatf("busy in cycle %0d", t));
      check(step === 3'(t), $sformatf("step %0d got %0d", t, step));
      check(phase === (t >= 3), $sformatf("phase in cycle %0d", t));
      check(last === (t == T - 1), $sformatf("last in cycle %0d", t));
      check(net_ctrl === 2'(exp_shift[t]), $sformatf("shift in cycle %0d: %0d", t, net_ctrl));
      check(sw === 4'(exp_sw[t]), $sformatf("sw in cycle %0d: %b", t, sw));
      for (int b = 0; b < 4; b++)
        check(bank_addr[b] === 2'(exp_addr[t][b]),
              $sformatf("addr bank %0d cycle %0d: %0d", b, t, bank_addr[b]));
      start = (chain && t == T - 1) || (poke && t == 2);
      @(negedge clk);
      start = 1'b0;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(busy === 1'b0, "idle after reset");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    run_iteration(1'b1, 1'b1);   // chains into a second iteration
    run_iteration(1'b0, 1'b0);
    check(busy === 1'b0, "idle after second iteration");
    // latency: count busy cycles of one more iteration
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (busy && cycles < 50) begin
      cycles++;
      @(negedge clk);
    end
    check(cycles == 6, $sformatf("iteration takes %0d cycles, expected 2L/P = 6", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
