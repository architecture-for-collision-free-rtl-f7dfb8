// benes_network: the Benes network "BEN" of the library of standard
// connecting networks.
//
// 2*log2(P)-1 columns of P/2 2x2 exchange switches. Column i pairs the lanes
// differing in bit dim(i), with dim = log2(P)-1, ..., 1, 0, 1, ..., log2(P)-1:
// a butterfly followed by its mirror image sharing the middle column. This
// network is rearrangeable: some setting of its (2*log2(P)-1)*P/2 control bits
// (6 for P = 4) realises every one of the P! permutations, so a collision-free
// memory mapping can always be routed on it, at the highest switch cost of the
// library. ctrl[i*P/2 +: P/2] drives column i. Forward the columns act in the
// order 0 .. 2*log2(P)-2; the inverse network applies them in reverse order with
// the same bits and undoes the forward permutation. Purely combinational.
// The document lists the Benes network as a library network; the exchange-
// column formulation and bit ordering are this design's own.
module benes_network #(
  parameter  int unsigned P       = cf_pkg::P,
  parameter  int unsigned W       = cf_pkg::W,
  parameter  bit          INVERSE = 1'b0,
  localparam int unsigned S       = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned NC      = 2 * S - 1,
  localparam int unsigned CW      = NC * P / 2
) (
  input  logic [CW-1:0]       ctrl,
  input  logic [P-1:0][W-1:0] din,
  output logic [P-1:0][W-1:0] dout
);

  if ((1 << $clog2(P)) != P || P < 2) begin : g_bad_p
    $error("benes_network: P must be a power of two, at least 2");
  end

  logic [P-1:0][W-1:0] lane [NC+1];

  assign lane[0] = din;

  for (genvar n = 0; n < NC; n++) begin : g_col
    localparam int unsigned C   = INVERSE ? (NC - 1 - n) : n;
    localparam int unsigned DIM = (C < S) ? (S - 1 - C) : (C - S + 1);
    exchange_stage #(.P(P), .W(W), .DIM(DIM)) u_col (
      .ctrl (ctrl[C*P/2 +: P/2]),
      .din  (lane[n]),
      .dout (lane[n+1])
    );
  end

  assign dout = lane[NC];

endmodule
