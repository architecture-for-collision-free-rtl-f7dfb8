// relaxed_network: connecting network between processors and banks, made of a
// standard library network extended by network relaxation.
//
// The standard part is selected by NET: barrel shifter (NET_BS, the default),
// butterfly (NET_BF) or Benes (NET_BEN). Behind it sit the 2x2 switches that
// network relaxation added (relax_switch_stage, present where MASK is set;
// MASK = 0 leaves the plain standard network). Forward (INVERSE = 0) the
// network routes processor lanes to bank lanes: standard network, then the
// added switches. Inverse (INVERSE = 1) it routes bank lanes back to the
// processors: undo the added switches, then the inverse standard network.
// A forward and an inverse instance driven with the same control word realise
// the same processor-to-bank connection for the write and the read path.
//
// Control word: ctrl (cf_pkg::net_ctrl_bits(NET, P) bits: the shift of the
// barrel shifter, or the switch bits of the butterfly/Benes columns) plus sw,
// one bit per possible added switch (only popcount(MASK) of them are real).
// For the default, 2 + 2 = 4 bits. Purely combinational. Every control value
// gives a permutation, so two processors can never reach the same bank.
module relaxed_network #(
  parameter  cf_pkg::net_e NET     = cf_pkg::NET_BS,
  parameter  int unsigned  P       = cf_pkg::P,
  parameter  int unsigned  W       = cf_pkg::W,
  parameter  logic [P-1:0] MASK    = cf_pkg::RELAX_MASK,
  parameter  bit           INVERSE = 1'b0,
  localparam int unsigned  CW      = cf_pkg::net_ctrl_bits(NET, P)
) (
  input  logic [CW-1:0]       ctrl,
  input  logic [P-1:0]        sw,
  input  logic [P-1:0][W-1:0] din,
  output logic [P-1:0][W-1:0] dout
);

  logic [P-1:0][W-1:0] base_in, base_out;
  logic [P-1:0][W-1:0] relax_in, relax_out;

  if (NET == cf_pkg::NET_BF) begin : g_bf
    butterfly_network #(.P(P), .W(W), .INVERSE(INVERSE)) u_base (
      .ctrl(ctrl), .din(base_in), .dout(base_out));
  end else if (NET == cf_pkg::NET_BEN) begin : g_ben
    benes_network #(.P(P), .W(W), .INVERSE(INVERSE)) u_base (
      .ctrl(ctrl), .din(base_in), .dout(base_out));
  end else begin : g_bs
    barrel_shifter #(.P(P), .W(W), .INVERSE(INVERSE)) u_base (
      .shift(ctrl), .din(base_in), .dout(base_out));
  end

  relax_switch_stage #(.P(P), .W(W), .MASK(MASK), .INVERSE(INVERSE)) u_relax (
    .sw(sw), .din(relax_in), .dout(relax_out));

  if (!INVERSE) begin : g_fwd
    assign base_in  = din;
    assign relax_in = base_out;
    assign dout     = relax_out;
  end else begin : g_inv
    assign relax_in = din;
    assign base_in  = relax_out;
    assign dout     = base_out;
  end

endmodule
