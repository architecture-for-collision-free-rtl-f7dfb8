// butterfly_network: the butterfly network "BF" of the library of standard
// connecting networks.
//
// log2(P) columns of P/2 2x2 exchange switches; column i pairs the lanes that
// differ in bit i. Control bits ctrl[i*P/2 +: P/2] drive column i, so the
// network takes log2(P)*P/2 control bits (4 for P = 4) and offers 2^(that)
// distinct permutations, which is fewer than P!: not every memory mapping can
// be routed. Forward (INVERSE = 0) the columns act in the order 0 .. log2(P)-1;
// the inverse network (bank-to-processor read path) applies them in reverse
// order with the same control bits, which undoes the forward permutation.
// Purely combinational. The document lists the butterfly as a library network;
// the exchange-column formulation and bit ordering are this design's own.
module butterfly_network #(
  parameter  int unsigned P       = cf_pkg::P,
  parameter  int unsigned W       = cf_pkg::W,
  parameter  bit          INVERSE = 1'b0,
  localparam int unsigned S       = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned CW      = S * P / 2
) (
  input  logic [CW-1:0]       ctrl,
  input  logic [P-1:0][W-1:0] din,
  output logic [P-1:0][W-1:0] dout
);

  if ((1 << $clog2(P)) != P || P < 2) begin : g_bad_p
    $error("butterfly_network: P must be a power of two, at least 2");
  end

  logic [P-1:0][W-1:0] lane [S+1];

  assign lane[0] = din;

  for (genvar n = 0; n < S; n++) begin : g_col
    // column that acts n-th in this direction
    localparam int unsigned C = INVERSE ? (S - 1 - n) : n;
    exchange_stage #(.P(P), .W(W), .DIM(C)) u_col (
      .ctrl (ctrl[C*P/2 +: P/2]),
      .din  (lane[n]),
      .dout (lane[n+1])
    );
  end

  assign dout = lane[S];

endmodule
