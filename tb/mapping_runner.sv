// mapping_runner: drives one collision-free memory subsystem, built with a
// given network and memory mapping, through a write iteration and a read
// iteration, and checks every word read. Used by tb_cf_network_variants.
//
// Parameters are passed straight to cf_interleaver_top. The runner keeps a
// reference value per datum: the write iteration writes a first value in the
// natural half and overwrites it in the interleaved half; in the read
// iteration every processor must receive its datum's latest value, one clock
// after the access cycle. Both iterations must last 2L/P clocks.
module mapping_runner #(
  parameter cf_pkg::net_e NET  = cf_pkg::NET_BS,
  parameter int unsigned  P    = 4,
  parameter int unsigned  L    = 12,
  parameter logic [P-1:0] MASK = '0,
  parameter logic [2*L-1:0][$clog2(L)-1:0] SCHED   = '0,
  parameter logic [L-1:0][$clog2(P)-1:0]   BANK_OF = '0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int T  = 2 * L / P;
  localparam int W  = 8;
  localparam int TW = $clog2(T);

  logic                start = 1'b0, pe_we = 1'b0;
  logic [P-1:0][W-1:0] pe_wdata = '0, pe_rdata;
  logic                busy, phase, last, pe_rvalid;
  logic [TW-1:0]       step;

  cf_interleaver_top #(
    .NET(NET), .P(P), .L(L), .W(W), .MASK(MASK), .SCHED(SCHED), .BANK_OF(BANK_OF)
  ) dut (.*);

  function automatic int datum(int t, int p);
    return int'(SCHED[t * P + p]);
  endfunction

  function automatic logic [W-1:0] value(int d, int pass);
    return W'(d * 13 + pass * 8'h40 + 8'h07);
  endfunction

  initial begin
    int cycles;
    done = 1'b0; checks = 0; failures = 0;
    @(posedge rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    pe_we = 1'b1;
    cycles = 0;
    while (busy) begin
      for (int p = 0; p < P; p++)
        pe_wdata[p] = value(datum(cycles, p), (cycles < T / 2) ? 1 : 2);
      cycles++;
      @(negedge clk);
    end
    pe_we = 1'b0;
    checks++;
    if (cycles != T) begin
      failures++;
      $display("FAIL NET=%0d: write iteration took %0d cycles", NET, cycles);
    end
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
            $display("FAIL NET=%0d cycle %0d PE %0d: read %h expected %h", NET,
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
      $display("FAIL NET=%0d: read iteration took %0d cycles", NET, cycles);
    end
    done = 1'b1;
  end
endmodule
