// tb_cf_interleaver_top: end-to-end test of the collision-free memory
// subsystem at its default size (L = 12, P = 4, 8-bit data).
//
// The testbench plays the four processing elements. It keeps its own copy of
// the access schedule (which datum each PE touches in each cycle) and a
// reference memory indexed by datum, independent of where the design stores
// the data. It runs several iterations:
//   1. all cycles write (natural half, then interleaved half overwrites);
//   2..N. random mix of write and read cycles, some iterations started
//      back-to-back in the last cycle of the previous one.
// Every cycle's read data (returned one clock later) must equal the reference
// value of the datum the PE asked for, before that cycle's write.
// It also checks that each iteration lasts 2L/P = 6 cycles, and counts the
// mechanisms of the design: natural- and interleaved-order cycles, cycles
// routed with a non-zero barrel-shifter rotation, cycles that use each added
// relaxation switch, write cycles, read cycles and back-to-back starts. A
// mechanism that never occurred counts as a failure.
module tb_cf_interleaver_top;
  localparam int P = 4, L = 12, W = 8, T = 6;

  logic                clk = 1'b0, rst_n = 1'b0, start = 1'b0, pe_we = 1'b0;
  logic [P-1:0][W-1:0] pe_wdata = '0, pe_rdata;
  logic                busy, phase, last, pe_rvalid;
  logic [2:0]          step;

  int checks = 0, failures = 0;

  cf_interleaver_top dut (.*);

  always #5 clk = ~clk;

  // Datum touched by PE p in cycle t (natural order, then interleaved order).
  int sched [T][P] = '{'{0, 3, 6, 9}, '{1, 4, 7, 10}, '{2, 5, 8, 11},
                       '{0, 8, 2, 11}, '{6, 5, 10, 3}, '{4, 7, 1, 9}};

  logic [W-1:0] ref_mem [L];
  logic [W-1:0] exp_rd [P];
  bit           ref_known [L];   // datum written at least once
  bit           exp_known [P];
  bit           exp_valid;
  // copies taken at the clock edge of the access cycle, compared at the
  // following falling edge when its read data are out
  logic [W-1:0] chk_rd [P];
  bit           chk_known [P];

  int n_natural = 0, n_interleaved = 0, n_rotated = 0, n_sw2 = 0, n_sw3 = 0;
  int n_write = 0, n_read = 0, n_chain = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Read data check: data of the previous access cycle appear now.
  always @(negedge clk) begin
    if (rst_n) begin
      check(pe_rvalid === exp_valid, $sformatf("pe_rvalid %0b expected %0b at %0t", pe_rvalid, exp_valid, $time));
      if (exp_valid && pe_rvalid) begin
        for (int p = 0; p < P; p++)
          if (chk_known[p]) check(pe_rdata[p] === chk_rd[p],
                $sformatf("PE %0d read %h expected %h", p, pe_rdata[p], chk_rd[p]));
        n_read++;
      end
    end
  end

  // Drive one iteration; the first cycle is the current negedge (busy high).
  task automatic iteration(int mode, bit chain);
    for (int t = 0; t < T; t++) begin
      check(busy === 1'b1 && step === 3'(t), $sformatf("busy/step in cycle %0d", t));
      check(phase === (t >= T / 2), $sformatf("phase in cycle %0d", t));
      if (t < T / 2) n_natural++; else n_interleaved++;
      if (dut.u_ctrl.net_ctrl != 0) n_rotated++;
      if (dut.u_ctrl.sw[2]) n_sw2++;
      if (dut.u_ctrl.sw[3]) n_sw3++;
      pe_we = (mode == 0) ? 1'b1 : 1'($urandom % 2);
      for (int p = 0; p < P; p++) begin
        exp_rd[p]    = ref_mem[sched[t][p]];
        exp_known[p] = ref_known[sched[t][p]];
        pe_wdata[p] = W'($urandom);
      end
      if (pe_we) begin
        n_write++;
        for (int p = 0; p < P; p++) begin
          ref_mem[sched[t][p]]   = pe_wdata[p];
          ref_known[sched[t][p]] = 1'b1;
        end
      end
      start = chain && (t == T - 1);
      if (start) n_chain++;
      @(posedge clk);
      chk_rd    = exp_rd;
      chk_known = exp_known;
      exp_valid = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    pe_we = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    exp_valid = 1'b0;
    for (int d = 0; d < L; d++) begin
      ref_mem[d]   = '0;
      ref_known[d] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // 1: fill every datum (all cycles write)
    start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    iteration(0, 1'b1);
    // 2..: random reads/writes, alternating chained and separate starts
    for (int it = 0; it < 20; it++) begin
      bit chain;
      chain = (it % 2 == 0) && (it != 19);
      iteration(1, chain);
      if (!chain) begin
        @(posedge clk);
        exp_valid = 1'b0;
        @(negedge clk);
        check(busy === 1'b0, "idle between iterations");
        start = 1'b1;
        @(posedge clk);
        @(negedge clk);
        start = 1'b0;
      end
    end
    // latency: busy cycles of one iteration, reads only
    cycles = 0;
    while (busy && cycles < 50) begin
      for (int p = 0; p < P; p++) begin
        exp_rd[p]    = ref_mem[sched[cycles % T][p]];
        exp_known[p] = 1'b1;
      end
      cycles++;
      @(posedge clk);
      chk_rd    = exp_rd;
      chk_known = exp_known;
      exp_valid = 1'b1;
      @(negedge clk);
    end
    @(posedge clk);
    #1;
    check(cycles == 2 * L / P, $sformatf("iteration latency %0d cycles, expected 2L/P = %0d",
                                         cycles, 2 * L / P));
    $display("mechanisms: natural=%0d interleaved=%0d rotated=%0d switch2=%0d switch3=%0d write=%0d read=%0d chained=%0d",
             n_natural, n_interleaved, n_rotated, n_sw2, n_sw3, n_write, n_read, n_chain);
    check(n_natural > 0, "natural-order cycles occurred");
    check(n_interleaved > 0, "interleaved-order cycles occurred");
    check(n_rotated > 0, "rotated routing occurred");
    check(n_sw2 > 0, "relaxation switch 2/3 used");
    check(n_sw3 > 0, "relaxation switch 3/0 used");
    check(n_write > 0, "write cycles occurred");
    check(n_read > 0, "read data checked");
    check(n_chain > 0, "back-to-back iterations occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
