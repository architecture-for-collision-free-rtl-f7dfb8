// tb_benes_network: self-checking test of the Benes network.
// P = 4: all 64 control words are compared with a reference that applies the
// six exchanges one by one (bits 0/1: lanes 0/2 and 1/3, bits 2/3: lanes 0/1
// and 2/3, bits 4/5: lanes 0/2 and 1/3); together they must reach all 24
// permutations of four lanes (the network is rearrangeable). The inverse
// network must undo the forward one. P = 8: random control words must give
// permutations that the inverse network undoes.
module tb_benes_network;
  localparam int unsigned W = 8;

  logic [5:0]        c4;
  logic [3:0][W-1:0] x4, f4, r4;
  logic [19:0]       c8;
  logic [7:0][W-1:0] x8, f8, r8;

  int checks = 0, failures = 0;

  benes_network #(.P(4), .W(W), .INVERSE(1'b0)) u_f4 (.ctrl(c4), .din(x4), .dout(f4));
  benes_network #(.P(4), .W(W), .INVERSE(1'b1)) u_r4 (.ctrl(c4), .din(f4), .dout(r4));
  benes_network #(.P(8), .W(W), .INVERSE(1'b0)) u_f8 (.ctrl(c8), .din(x8), .dout(f8));
  benes_network #(.P(8), .W(W), .INVERSE(1'b1)) u_r8 (.ctrl(c8), .din(f8), .dout(r8));

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
    bit reached [256];   // indexed by the permutation packed as 4 x 2 bits
    int n_perm;
    for (int k = 0; k < 256; k++) reached[k] = 1'b0;
    for (int p = 0; p < 4; p++) x4[p] = W'(p);
    for (int c = 0; c < 64; c++) begin
      c4 = 6'(c);
      e = x4;
      if ((c & 1) != 0)  e = swap4(e, 0, 2);
      if ((c & 2) != 0)  e = swap4(e, 1, 3);
      if ((c & 4) != 0)  e = swap4(e, 0, 1);
      if ((c & 8) != 0)  e = swap4(e, 2, 3);
      if ((c & 16) != 0) e = swap4(e, 0, 2);
      if ((c & 32) != 0) e = swap4(e, 1, 3);
      #1;
      check(f4 === e, $sformatf("P4 ctrl=%b got %h expected %h", c4, f4, e));
      check(r4 === x4, $sformatf("P4 round trip ctrl=%b", c4));
      reached[{f4[3][1:0], f4[2][1:0], f4[1][1:0], f4[0][1:0]}] = 1'b1;
    end
    n_perm = 0;
    for (int k = 0; k < 256; k++) if (reached[k]) n_perm++;
    check(n_perm == 24, $sformatf("P4 reaches %0d of 24 permutations", n_perm));
    for (int p = 0; p < 8; p++) x8[p] = W'(8'h50 + p);
    for (int i = 0; i < 300; i++) begin
      c8 = 20'($urandom);
      #1;
      check(r8 === x8, $sformatf("P8 round trip ctrl=%h", c8));
      for (int m = 0; m < 8; m++)
        for (int n = m + 1; n < 8; n++)
          check(f8[m] !== f8[n], $sformatf("P8 collision ctrl=%h", c8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
