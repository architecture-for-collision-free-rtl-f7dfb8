// qpp_workload_runner: drives one collision-free memory subsystem through
// a block of an LTE-style quadratic permutation polynomial (QPP) interleaver
// and checks it. Used by tb_lte_qpp_workload.
//
// Interleaver: pi(i) = (F1*i + F2*i*i) mod K. Each of the P processors owns a
// window of M = K/P consecutive data: in natural-order cycle t processor p
// touches datum p*M + t, in interleaved-order cycle t datum pi(p*M + t). Datum d
// is stored in bank d / M. For the block lengths below this mapping needs only
// rotations, so the subsystem is built with a plain barrel shifter (no
// relaxation switches, MASK = 0); if a cycle were not a rotation the
// controller would refuse to elaborate.
//
// Sequence: one iteration that writes every cycle (the interleaved half
// overwrites each datum with a second value), then one iteration that only
// reads; every read word must be the datum's latest value. The iteration
// length must be 2K/P clock cycles.
module qpp_workload_runner #(
  parameter int P  = 4,
  parameter int K  = 160,
  parameter int F1 = 21,
  parameter int F2 = 120
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int M = K / P;
  localparam int T = 2 * M;
  localparam int W = 16;
  localparam int TW = $clog2(T);

  function automatic int qpp(int i);
    longint v;
    v = (longint'(F1) * i + longint'(F2) * i * i) % longint'(K);
    return int'(v);
  endfunction

  localparam int DW = $clog2(K);
  localparam int BW = $clog2(P);

  typedef logic [2*K-1:0][DW-1:0] sched_t;   // entry t*P + p
  typedef logic [K-1:0][BW-1:0]   bank_t;

  function automatic sched_t make_sched();
    sched_t s;
    for (int t = 0; t < M; t++)
      for (int p = 0; p < P; p++) begin
        s[t * P + p]       = DW'(p * M + t);
        s[(M + t) * P + p] = DW'(qpp(p * M + t));
      end
    return s;
  endfunction

  function automatic bank_t make_bank();
    bank_t b;
    for (int d = 0; d < K; d++) b[d] = BW'(d / M);
    return b;
  endfunction

  localparam sched_t SCHED   = make_sched();
  localparam bank_t  BANK_OF = make_bank();

  logic                start = 1'b0, pe_we = 1'b0;
  logic [P-1:0][W-1:0] pe_wdata = '0, pe_rdata;
  logic                busy, phase, last, pe_rvalid;
  logic [TW-1:0]       step;

  cf_interleaver_top #(
    .P(P), .L(K), .W(W), .MASK('0), .SCHED(SCHED), .BANK_OF(BANK_OF)
  ) dut (.*);

  // datum touched by processor p in cycle t, from the interleaver formula
  function automatic int datum(int t, int p);
    return (t < M) ? p * M + t : qpp(p * M + t - M);
  endfunction

  function automatic logic [W-1:0] value(int d, int pass);
    return W'(d * 7 + pass * 16'h4000 + 16'h0123);
  endfunction

  initial begin
    int cycles;
    bit second [K];
    done = 1'b0; checks = 0; failures = 0;
    for (int d = 0; d < K; d++) second[d] = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    // write iteration
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    pe_we = 1'b1;
    cycles = 0;
    while (busy) begin
      for (int p = 0; p < P; p++)
        pe_wdata[p] = value(datum(cycles, p), (cycles < M) ? 1 : 2);
      cycles++;
      @(negedge clk);
    end
    pe_we = 1'b0;
    checks++;
    if (cycles != T) begin
      failures++;
      $display("FAIL K=%0d P=%0d: write iteration took %0d cycles, expected %0d", K, P, cycles, T);
    end
    // read iteration: data of cycle c appear one clock later
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (busy || pe_rvalid) begin
      if (pe_rvalid) begin
        for (int p = 0; p < P; p++) begin
          checks++;
          if (pe_rdata[p] !== value(datum(cycles - 1, p), 2)) begin
            failures++;
            if (failures < 10)
              $display("FAIL K=%0d P=%0d cycle %0d PE %0d: read %h expected %h", K, P,
                       cycles - 1, p, pe_rdata[p], value(datum(cycles - 1, p), 2));
          end
        end
      end
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != T + 1) begin
      failures++;
      $display("FAIL K=%0d P=%0d: read iteration took %0d cycles, expected %0d + 1", K, P, cycles, T);
    end
    $display("workload K=%0d P=%0d: %0d access cycles per iteration, %0d checks, %0d failures",
             K, P, T, checks, failures);
    done = 1'b1;
  end
endmodule
