// memory_bank: one of the P single-port data banks.
//
// Each bank holds DEPTH = L/P words, so the P banks together store the L data
// of a block exactly once (in-place mapping, no extra registers). The bank
// performs one access per cycle: when en is high it reads the word at addr and,
// if we is also high, writes wdata there. The read is synchronous: rdata shows
// the word one cycle after addr was presented, and a write in the same cycle
// returns the old contents (read-before-write). With en low rdata holds.
//
// The bank count and depth follow the design; port style, single-port
// organisation and read-before-write are this implementation's choices.
module memory_bank #(
  parameter  int unsigned DEPTH = cf_pkg::L / cf_pkg::P,
  parameter  int unsigned W     = cf_pkg::W,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
