// cf_interleaver_top: collision-free parallel memory subsystem with a
// network-relaxed connecting network (by default a relaxed barrel shifter).
//
// P processing elements (PEs, outside this module) share P memory banks of
// L/P words. In every access cycle each PE touches one datum; the memory
// mapping places the data so that the P data of a cycle always lie in P
// different banks, both in natural order and in interleaved order. The
// connecting network between PEs and banks is a standard network of the
// library (by default the barrel shifter; NET selects butterfly or Benes)
// extended by the 2x2 switches that network relaxation added (MASK,
// relaxed_network), and the
// controller (cf_controller) supplies per cycle the network control word and
// every bank's address, so the PEs only present data.
//
// Write path (PE -> bank): pe_wdata passes the forward network and is written
// at the end of the cycle when pe_we is high. Read path (bank -> PE): every
// access cycle also reads the addressed words; they leave the banks one cycle
// later and pass the inverse network, driven by the control word of the cycle
// that read them. pe_rdata is therefore valid (pe_rvalid) one clock after the
// access cycle, in the PE order of that cycle. A cycle that writes returns the
// old contents (read-before-write).
//
// Timing: start (a one-cycle pulse while idle, or in the last cycle for a
// back-to-back iteration) begins an iteration; busy is high for exactly
// T = 2L/P clocks, step counts the access cycles and phase tells the natural
// (0) from the interleaved (1) half; last marks the final access cycle.
// Reset is active-low, asynchronous for the controller; bank contents are not
// reset.
//
// The structure (PEs, network, banks, controller with network control bits and
// bank address sequences) and the example mapping follow the design. The data
// width, the single-port read-before-write banks, the one-cycle read latency
// and the start/busy interface are this implementation's choices.
module cf_interleaver_top #(
  parameter  cf_pkg::net_e NET  = cf_pkg::NET_BS,
  parameter  int unsigned  P    = cf_pkg::P,
  parameter  int unsigned  L    = cf_pkg::L,
  parameter  int unsigned  W    = cf_pkg::W,
  parameter  logic [P-1:0] MASK = cf_pkg::RELAX_MASK,
  parameter  logic [2*L-1:0][$clog2(L)-1:0] SCHED   = cf_pkg::EX_SCHED,
  parameter  logic [L-1:0][$clog2(P)-1:0]   BANK_OF = cf_pkg::EX_BANK_OF,
  localparam int unsigned  T     = 2 * L / P,
  localparam int unsigned  DEPTH = L / P,
  localparam int unsigned  CW    = cf_pkg::net_ctrl_bits(NET, P),
  localparam int unsigned  AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned  TW    = (T > 1) ? $clog2(T) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                pe_we,
  input  logic [P-1:0][W-1:0] pe_wdata,
  output logic                busy,
  output logic [TW-1:0]       step,
  output logic                phase,
  output logic                last,
  output logic [P-1:0][W-1:0] pe_rdata,
  output logic                pe_rvalid
);

  logic [CW-1:0]        net_ctrl, net_ctrl_q;
  logic [P-1:0]         sw, sw_q;
  logic [P-1:0][AW-1:0] bank_addr;
  logic [P-1:0][W-1:0]  bank_wdata, bank_rdata;

  cf_controller #(
    .NET(NET), .P(P), .L(L), .MASK(MASK), .SCHED(SCHED), .BANK_OF(BANK_OF)
  ) u_ctrl (
    .clk, .rst_n, .start, .busy, .step, .phase, .last,
    .net_ctrl, .sw, .bank_addr
  );

  relaxed_network #(.NET(NET), .P(P), .W(W), .MASK(MASK), .INVERSE(1'b0)) u_wr_net (
    .ctrl(net_ctrl), .sw(sw), .din(pe_wdata), .dout(bank_wdata));

  for (genvar b = 0; b < P; b++) begin : g_bank
    memory_bank #(.DEPTH(DEPTH), .W(W)) u_bank (
      .clk   (clk),
      .en    (busy),
      .we    (busy && pe_we),
      .addr  (bank_addr[b]),
      .wdata (bank_wdata[b]),
      .rdata (bank_rdata[b])
    );
  end

  // Control word of the cycle whose read data are leaving the banks now.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      net_ctrl_q <= '0;
      sw_q      <= '0;
      pe_rvalid <= 1'b0;
    end else begin
      net_ctrl_q <= net_ctrl;
      sw_q      <= sw;
      pe_rvalid <= busy;
    end
  end

  relaxed_network #(.NET(NET), .P(P), .W(W), .MASK(MASK), .INVERSE(1'b1)) u_rd_net (
    .ctrl(net_ctrl_q), .sw(sw_q), .din(bank_rdata), .dout(pe_rdata));

endmodule
