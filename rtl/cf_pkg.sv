// cf_pkg: constants shared by the collision-free parallel memory subsystem.
//
// The default configuration is the worked example of the design: a block of
// L = 12 data words processed by P = 4 processing elements (PEs) that share
// B = P = 4 memory banks. One iteration consists of two half-iterations of
// L/P = 3 access cycles each: first every PE walks its data in natural order,
// then in interleaved order, so an iteration takes T = 2L/P = 6 cycles.
//
// EX_SCHED_TAB[t][p] is the datum that PE p touches in cycle t. The first
// three rows are the natural order, the last three the interleaved order.
// EX_BANK_TAB[d] is the bank (0=A, 1=B, 2=C, 3=D) holding datum d, as found by
// the network-relaxation mapping. With this mapping no two PEs hit the same
// bank in any cycle, but three of the six cycle permutations are not plain
// rotations, so a barrel shifter alone cannot route them; RELAX_MASK marks the
// two 2x2 switches added behind the barrel shifter (between bank lanes 2/3 and
// between lanes 3/0) that make all six permutations routable.
//
// The data width W is not given by the design; 8 bits is this implementation's
// choice (a typical width for turbo-decoder extrinsic values).
package cf_pkg;

  localparam int unsigned P = 4;          // processors = banks
  localparam int unsigned L = 12;         // block length (data words)
  localparam int unsigned W = 8;          // data word width (own choice)
  localparam int unsigned T = 2 * L / P;  // access cycles per iteration

  // Standard networks of the library the mapping can target.
  //   NET_BS : barrel shifter, log2(P) control bits (the default, cheapest)
  //   NET_BF : butterfly, log2(P) stages of P/2 2x2 switches
  //   NET_BEN: Benes, 2*log2(P)-1 stages of P/2 2x2 switches (any permutation)
  typedef enum int unsigned {NET_BS = 0, NET_BF = 1, NET_BEN = 2} net_e;

  // Control bits of the standard network (without relaxation switches).
  function automatic int unsigned net_ctrl_bits(net_e net, int unsigned np);
    int unsigned s;
    s = (np > 1) ? $clog2(np) : 1;
    case (net)
      NET_BF:  return s * np / 2;
      NET_BEN: return (2 * s - 1) * np / 2;
      default: return s;
    endcase
  endfunction

  // One 2x2 switch per cyclically adjacent bank-lane pair (k, k+1 mod P);
  // a set bit means the switch exists in the relaxed network.
  localparam logic [P-1:0] RELAX_MASK = 4'b1100;

  localparam int unsigned DW = $clog2(L);  // datum index width
  localparam int unsigned BW = $clog2(P);  // bank index width

  // Access schedule of the example: rows are cycles, columns are PEs.
  localparam int EX_SCHED_TAB [T][P] = '{
    '{0, 3, 6,  9},    // natural order
    '{1, 4, 7, 10},
    '{2, 5, 8, 11},
    '{0, 8, 2, 11},    // interleaved order
    '{6, 5, 10, 3},
    '{4, 7, 1,  9}
  };

  // Bank of each datum 0..11 (A=0, B=1, C=2, D=3).
  localparam int EX_BANK_TAB [L] = '{0, 0, 3, 1, 1, 0, 2, 2, 1, 3, 3, 2};

  // The same tables in the flattened packed form the modules take as
  // parameters: entry t*P + p of the schedule, entry d of the bank map.
  function automatic logic [T*P-1:0][DW-1:0] ex_sched();
    logic [T*P-1:0][DW-1:0] r;
    for (int unsigned i = 0; i < T * P; i++) r[i] = DW'(EX_SCHED_TAB[i / P][i % P]);
    return r;
  endfunction

  function automatic logic [L-1:0][BW-1:0] ex_bank_of();
    logic [L-1:0][BW-1:0] r;
    for (int unsigned d = 0; d < L; d++) r[d] = BW'(EX_BANK_TAB[d]);
    return r;
  endfunction

  localparam logic [T*P-1:0][DW-1:0] EX_SCHED   = ex_sched();
  localparam logic [L-1:0][BW-1:0]   EX_BANK_OF = ex_bank_of();

endpackage
