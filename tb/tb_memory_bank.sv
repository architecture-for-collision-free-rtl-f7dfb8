// tb_memory_bank: self-checking test of one data bank.
// Fills the bank, then applies random enable/write/address/data for many
// cycles and compares rdata, one cycle after each enabled access, with a
// reference array (read-before-write semantics). Also checks that rdata
// holds while en is low.
module tb_memory_bank;
  localparam int unsigned DEPTH = 3;
  localparam int unsigned W     = 8;
  localparam int unsigned AW    = 2;

  logic          clk = 1'b0;
  logic          en, we;
  logic [AW-1:0] addr;
  logic [W-1:0]  wdata, rdata;

  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;
  logic         check_q;

  memory_bank #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0; check_q = 0; expect_q = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); wdata = W'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    en = 0; we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check the access of the previous cycle
      if (i == 0) begin
        // first cycle after the fill: nothing to compare yet
      end else if (check_q) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL cycle %0d: rdata=%h expected %h", i, rdata, expect_q);
        end
      end else begin
        // en was low: output must hold the last value
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL cycle %0d: rdata changed while idle", i);
        end
      end
      en    = ($urandom % 4) != 0;
      we    = $urandom % 2;
      addr  = AW'($urandom % DEPTH);
      wdata = W'($urandom);
      check_q = en;
      if (en) begin
        expect_q = model[addr];
        if (we) model[addr] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
