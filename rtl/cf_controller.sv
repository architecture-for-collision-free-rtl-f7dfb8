// cf_controller: schedule controller of the collision-free memory subsystem.
//
// For every access cycle the controller supplies what the processors cannot:
// the control word of the connecting network (control bits of the standard
// network selected by NET plus the added relaxation switches) and the word address of every bank. Both come
// from a ROM with one entry per cycle of an iteration (T = 2L/P entries).
//
// The ROM is not typed in by hand. It is computed at elaboration from the
// memory mapping, given as parameters: SCHED[t*P + p] is the datum PE p
// touches in cycle t (T*P = 2L entries) and BANK_OF[d] the bank of datum d.
//  * address: data of one bank are numbered in the order of their first access,
//    so each bank uses addresses 0 .. L/P-1;
//  * control word: the first (net_ctrl, sw) pair, searched in increasing order,
//    whose forward network permutation sends every PE p to its bank
//    BANK_OF[SCHED[t*P + p]]. The search tries 2^(control bits of the standard
//    network + added switches) candidates per cycle, so it is limited to 2^16
//    of them: enough for the barrel shifter at any P and for the butterfly and
//    Benes networks at P = 4.
// If a cycle has a bank conflict, a bank receives more than L/P data, or the
// network cannot route a cycle, elaboration stops with an error. This is the
// hardware side of the mapping flow's check that the mapping is collision-free
// for the chosen network.
//
// Timing: a one-cycle start pulse while idle (or during the last cycle of an
// iteration, for back-to-back iterations) makes busy rise on the next clock
// with step = 0. step then counts 0 .. T-1, one access cycle per clock with no
// stall, so an iteration occupies exactly T = 2L/P cycles. last is high during
// step T-1. phase is 0 in the natural-order half (step < L/P) and 1 in the
// interleaved half. net_ctrl, sw and bank_addr are valid while busy and are
// combinational functions of step. Reset is active-low and asynchronous.
module cf_controller #(
  parameter  cf_pkg::net_e NET  = cf_pkg::NET_BS,
  parameter  int unsigned  P    = cf_pkg::P,
  parameter  int unsigned  L    = cf_pkg::L,
  parameter  logic [P-1:0] MASK = cf_pkg::RELAX_MASK,
  parameter  logic [2*L-1:0][$clog2(L)-1:0] SCHED   = cf_pkg::EX_SCHED,
  parameter  logic [L-1:0][$clog2(P)-1:0]   BANK_OF = cf_pkg::EX_BANK_OF,
  localparam int unsigned  T    = 2 * L / P,
  localparam int unsigned  DEPTH = L / P,
  localparam int unsigned  SHW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned  CW   = cf_pkg::net_ctrl_bits(NET, P),
  localparam int unsigned  AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned  TW   = (T > 1) ? $clog2(T) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic [TW-1:0]        step,
  output logic                 phase,
  output logic                 last,
  output logic [CW-1:0]        net_ctrl,
  output logic [P-1:0]         sw,
  output logic [P-1:0][AW-1:0] bank_addr
);

  // ---------------------------------------------------------------- ROM build
  // Lane partner and switch index of lane x in an exchange column on bit dim.
  function automatic int unsigned col_switch(int unsigned x, int unsigned dim);
    int unsigned lo;
    lo = x & ~(32'd1 << dim);
    return ((lo >> (dim + 1)) << dim) | (lo & ((32'd1 << dim) - 1));
  endfunction

  // Bank lane reached by PE p through the forward network for control
  // (c, swv); mirrors barrel_shifter, butterfly_network, benes_network and
  // relax_switch_stage.
  function automatic int unsigned fwd_lane(int unsigned p, logic [CW-1:0] c,
                                           logic [P-1:0] swv);
    int unsigned lane, ncol, dim;
    lane = p;
    if (NET == cf_pkg::NET_BS) begin
      lane = (p + 32'(c)) % P;
    end else begin
      ncol = (NET == cf_pkg::NET_BF) ? SHW : 2 * SHW - 1;
      for (int unsigned i = 0; i < ncol; i++) begin
        if (NET == cf_pkg::NET_BF) dim = i;
        else                       dim = (i < SHW) ? (SHW - 1 - i) : (i - SHW + 1);
        if (c[i * (P / 2) + col_switch(lane, dim)]) lane = lane ^ (32'd1 << dim);
      end
    end
    for (int unsigned k = 0; k < P; k++) begin
      if (MASK[k] && swv[k]) begin
        if (lane == k)                lane = (k + 1) % P;
        else if (lane == (k + 1) % P) lane = k;
      end
    end
    return lane;
  endfunction

  // Address of every datum: rank among the data of its bank, by first access.
  function automatic logic [L-1:0][AW-1:0] build_addr_of();
    logic [L-1:0][AW-1:0] a;
    logic [L-1:0]         seen;
    int unsigned          cnt [P];
    for (int unsigned d = 0; d < L; d++) begin
      a[d]    = '0;
      seen[d] = 1'b0;
    end
    for (int unsigned b = 0; b < P; b++) cnt[b] = 0;
    for (int unsigned t = 0; t < T; t++) begin
      for (int unsigned p = 0; p < P; p++) begin
        int unsigned d;
        d = 32'(SCHED[t*P + p]);
        if (!seen[d]) begin
          seen[d] = 1'b1;
          a[d]    = AW'(cnt[BANK_OF[d]]);
          cnt[BANK_OF[d]]++;
        end
      end
    end
    return a;
  endfunction

  // 1 when every bank holds at most DEPTH data and no cycle has a conflict.
  function automatic bit mapping_ok();
    int unsigned cnt [P];
    bit ok;
    ok = 1'b1;
    for (int unsigned b = 0; b < P; b++) cnt[b] = 0;
    for (int unsigned d = 0; d < L; d++) begin
      cnt[BANK_OF[d]]++;
    end
    for (int unsigned b = 0; b < P; b++) if (cnt[b] > DEPTH) ok = 1'b0;
    for (int unsigned t = 0; t < T; t++) begin
      logic [P-1:0] used;
      used = '0;
      for (int unsigned p = 0; p < P; p++) begin
        if (used[BANK_OF[SCHED[t*P + p]]]) ok = 1'b0;
        used[BANK_OF[SCHED[t*P + p]]] = 1'b1;
      end
    end
    return ok;
  endfunction

  // Control words {sw, net_ctrl} per cycle; bit T of the result flags success.
  typedef logic [P+CW-1:0] cw_t;

  function automatic logic [T:0][P+CW-1:0] build_ctrl();
    logic [T:0][P+CW-1:0] r;
    for (int unsigned t = 0; t <= T; t++) r[t] = '0;
    if (CW + $countones(MASK) > 16) return r;  // search too large: fail
    r[T][0] = 1'b1;
    for (int unsigned t = 0; t < T; t++) begin
      bit found;
      found = 1'b0;
      for (longint unsigned s = 0; s < (longint'(1) << CW); s++) begin
        for (int unsigned v = 0; v < (1 << P); v++) begin
          logic [P-1:0] swv;
          bit match;
          swv = P'(v);
          if (!found && ((swv & ~MASK) == '0)) begin
            match = 1'b1;
            for (int unsigned p = 0; p < P; p++)
              if (fwd_lane(p, CW'(s), swv) != 32'(BANK_OF[SCHED[t*P + p]])) match = 1'b0;
            if (match) begin
              found = 1'b1;
              r[t]  = {swv, CW'(s)};
            end
          end
        end
      end
      if (!found) r[T][0] = 1'b0;
    end
    return r;
  endfunction

  localparam logic [L-1:0][AW-1:0]   ADDR_OF  = build_addr_of();
  localparam logic [T:0][P+CW-1:0]   CTRL_RES = build_ctrl();
  localparam bit                     MAP_OK   = mapping_ok();

  if (!MAP_OK) begin : g_bad_mapping
    $error("cf_controller: mapping is not collision-free or overfills a bank");
  end
  if (CW + $countones(MASK) > 16) begin : g_search_too_large
    $error("cf_controller: routing search over more than 2^16 control words");
  end
  if (MAP_OK && !CTRL_RES[T][0]) begin : g_bad_network
    $error("cf_controller: network cannot route a cycle of the mapping");
  end

  // ------------------------------------------------------------ step counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
    end else if (start && (!busy || last)) begin
      busy <= 1'b1;
      step <= '0;
    end else if (busy) begin
      if (last) begin
        busy <= 1'b0;
        step <= '0;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  assign last  = busy && (step == TW'(T - 1));
  assign phase = (step >= TW'(DEPTH));

  // --------------------------------------------------------------- ROM read
  always_comb begin
    cw_t cw;
    cw        = '0;
    bank_addr = '0;
    for (int unsigned t = 0; t < T; t++) begin
      if (step == TW'(t)) begin
        cw = CTRL_RES[t];
        for (int unsigned p = 0; p < P; p++)
          bank_addr[BANK_OF[SCHED[t*P + p]]] = ADDR_OF[SCHED[t*P + p]];
      end
    end
    net_ctrl = cw[CW-1:0];
    sw       = cw[P+CW-1:CW];
  end

  // Every address issued during an iteration lies inside its bank.
  for (genvar b = 0; b < P; b++) begin : g_chk
    a_addr_in_bank: assert property (@(posedge clk) busy |-> 32'(bank_addr[b]) < DEPTH)
      else $error("cf_controller: bank %0d address %0d out of range", b, bank_addr[b]);
  end

endmodule
