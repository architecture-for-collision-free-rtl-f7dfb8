// exchange_stage: one column of 2x2 switches of a butterfly or Benes network.
//
// The stage pairs the lanes whose indices differ only in bit DIM. Switch j
// (j = 0 .. P/2-1) joins lane lo and lane lo + 2^DIM, where lo is j with a zero
// inserted at bit position DIM; when ctrl[j] is high the two lanes exchange
// their words, otherwise they pass straight. Purely combinational. An exchange
// is its own inverse, so the same stage serves both directions of a network.
module exchange_stage #(
  parameter int unsigned P   = cf_pkg::P,
  parameter int unsigned W   = cf_pkg::W,
  parameter int unsigned DIM = 0
) (
  input  logic [P/2-1:0]      ctrl,
  input  logic [P-1:0][W-1:0] din,
  output logic [P-1:0][W-1:0] dout
);

  for (genvar j = 0; j < P / 2; j++) begin : g_sw
    localparam int unsigned LO = ((j >> DIM) << (DIM + 1)) | (j & ((1 << DIM) - 1));
    localparam int unsigned HI = LO | (1 << DIM);
    assign dout[LO] = ctrl[j] ? din[HI] : din[LO];
    assign dout[HI] = ctrl[j] ? din[LO] : din[HI];
  end

endmodule
