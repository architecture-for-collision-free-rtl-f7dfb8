// barrel_shifter: P-lane rotator, the standard network "BS".
//
// In the forward direction (INVERSE = 0) input lane p appears on output lane
// (p + shift) mod P, i.e. processor p is connected to bank p + shift. With
// INVERSE = 1 the rotation is undone: input lane b appears on output lane
// (b - shift) mod P, which routes bank read data back to the processors.
// The rotator is built as log2(P) stages of 2:1 multiplexers, stage k rotating
// by 2^k when shift[k] is set. It is purely combinational. The control cost is
// log2(P) bits (2 for P = 4), as stated for the barrel shifter of the design;
// the logarithmic mux structure is this implementation's choice. P must be a
// power of two.
module barrel_shifter #(
  parameter  int unsigned P   = cf_pkg::P,
  parameter  int unsigned W   = cf_pkg::W,
  parameter  bit          INVERSE = 1'b0,
  localparam int unsigned SHW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [SHW-1:0]        shift,
  input  logic [P-1:0][W-1:0]   din,
  output logic [P-1:0][W-1:0]   dout
);

  if ((1 << $clog2(P)) != P) begin : g_bad_p
    $error("barrel_shifter: P must be a power of two");
  end

  logic [P-1:0][W-1:0] stage [SHW+1];

  always_comb begin
    stage[0] = din;
    for (int k = 0; k < SHW; k++) begin
      for (int i = 0; i < P; i++) begin
        if (shift[k]) begin
          if (INVERSE) stage[k+1][i] = stage[k][(i + (1 << k)) % P];
          else         stage[k+1][i] = stage[k][(i + P - (1 << k)) % P];
        end else begin
          stage[k+1][i] = stage[k][i];
        end
      end
    end
  end

  assign dout = stage[SHW];

endmodule
