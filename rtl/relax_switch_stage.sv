// relax_switch_stage: the network components added by network relaxation.
//
// When a standard barrel shifter cannot realise every cycle permutation of a
// memory mapping, the relaxation step adds 2x2 switches to it until all
// permutations become routable. This stage holds those switches. Switch k sits
// between lanes k and (k+1) mod P and exists only where MASK[k] is set; when it
// exists and sw[k] is high it exchanges the two lanes, otherwise they pass
// straight. Bits of sw whose switch does not exist are ignored.
//
// The switches act one after another in the order k = 0 .. P-1 (INVERSE = 0);
// with INVERSE = 1 they act in the reverse order, so an inverse stage driven
// with the same sw undoes a forward stage. Purely combinational.
// The design adds "switches and/or multiplexers" without fixing their place;
// placing them as a chain of adjacent-lane exchanges behind the barrel shifter
// is this implementation's choice.
module relax_switch_stage #(
  parameter int unsigned P       = cf_pkg::P,
  parameter int unsigned W       = cf_pkg::W,
  parameter logic [P-1:0] MASK   = cf_pkg::RELAX_MASK,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [P-1:0]        sw,
  input  logic [P-1:0][W-1:0] din,
  output logic [P-1:0][W-1:0] dout
);

  // Position of the n-th switch to act (forward: ascending, inverse: descending).
  function automatic int unsigned pos(int unsigned n);
    return INVERSE ? (P - 1 - n) : n;
  endfunction

  always_comb begin
    logic [P-1:0][W-1:0] v;
    v = din;
    for (int unsigned n = 0; n < P; n++) begin
      if (MASK[pos(n)] && sw[pos(n)]) begin
        {v[pos(n)], v[(pos(n) + 1) % P]} = {v[(pos(n) + 1) % P], v[pos(n)]};
      end
    end
    dout = v;
  end

endmodule
