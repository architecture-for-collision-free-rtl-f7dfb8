// tb_butterfly_network: self-checking test of the butterfly network.
// P = 4: all 16 control words are compared with a reference that applies the
// four exchanges one by one (bit 0: lanes 0/1, bit 1: 2/3, bit 2: 0/2,
// bit 3: 1/3); the 16 resulting permutations must all differ. The inverse
// network must undo the forward one. P = 8: random control words must give
// permutations that the inverse network undoes, and single bits must exchange
// the expected lanes.
module tb_butterfly_network;
  localparam int unsigned W = 8;

  logic [3:0]        c4;
  logic [3:0][W-1:0] x4, f4, r4;
  logic [11:0]       c8;
  logic [7:0][W-1:0] x8, f8, r8;

  int checks = 0, failures = 0;

  butterfly_network #(.P(4), .W(W), .INVERSE(1'b0)) u_f4 (.ctrl(c4), .din(x4), .dout(f4));
  butterfly_network #(.P(4), .W(W), .INVERSE(1'b1)) u_r4 (.ctrl(c4), .din(f4), .dout(r4));
  butterfly_network #(.P(8), .W(W), .INVERSE(1'b0)) u_f8 (.ctrl(c8), .din(x8), .dout(f8));
  butterfly_network #(.P(8), .W(W), .INVERSE(1'b1)) u_r8 (.ctrl(c8), .din(f8), .dout(r8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [3:0][W-1:0] swap4(logic [3:0][W-1:0] v, int a, int b);
    logic [W-1:0] t;
    t = v[a]; v[a] = v[b]; v[b] = t;
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][W-1:0] e;
    logic [3:0][W-1:0] seen [16];
    for (int p = 0; p < 4; p++) x4[p] = W'(p);
    for (int c = 0; c < 16; c++) begin
      c4 = 4'(c);
      e = x4;
      if ((c & 1) != 0) e = swap4(e, 0, 1);
      if ((c & 2) != 0) e = swap4(e, 2, 3);
      if ((c & 4) != 0) e = swap4(e, 0, 2);
      if ((c & 8) != 0) e = swap4(e, 1, 3);
      #1;
      check(f4 === e, $sformatf("P4 ctrl=%b got %h expected %h", c4, f4, e));
      check(r4 === x4, $sformatf("P4 round trip ctrl=%b", c4));
      seen[c] = f4;
      for (int k = 0; k < c; k++)
        check(seen[k] !== f4, $sformatf("P4 ctrl %0d and %0d give the same permutation", k, c));
    end
    for (int p = 0; p < 8; p++) x8[p] = W'(8'h30 + p);
    for (int i = 0; i < 300; i++) begin
      c8 = 12'($urandom);
      #1;
      check(r8 === x8, $sformatf("P8 round trip ctrl=%h", c8));
      for (int m = 0; m < 8; m++)
        for (int n = m + 1; n < 8; n++)
          check(f8[m] !== f8[n], $sformatf("P8 collision ctrl=%h", c8));
    end
    c8 = 12'h001; #1;
    check(f8[0] === x8[1] && f8[1] === x8[0] && f8[7:2] === x8[7:2], "P8 bit 0 exchanges lanes 0/1");
    c8 = 12'h010; #1;
    check(f8[0] === x8[2] && f8[2] === x8[0] && f8[1] === x8[1], "P8 bit 4 exchanges lanes 0/2");
    c8 = 12'h100; #1;
    check(f8[0] === x8[4] && f8[4] === x8[0] && f8[1] === x8[1], "P8 bit 8 exchanges lanes 0/4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
