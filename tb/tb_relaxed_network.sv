// tb_relaxed_network: self-checking test of the connecting network with
// relaxation switches.
// 1. Default (barrel shifter + switches 2/3 and 3/0, P = 4): the six cycle
//    permutations of the example mapping are applied with hand-derived control
//    words; every processor's word must arrive at its bank, and the inverse
//    network must bring the bank words back to the right processors.
// 2. For the barrel-shifter, butterfly and Benes variants, every control word
//    gives a permutation (no two lanes collide) and the inverse network undoes
//    the forward one.
// 3. Butterfly (no added switches): the control bits map to the expected
//    exchanges, e.g. bit 0 exchanges lanes 0/1 and bit 2 lanes 0/2.
module tb_relaxed_network;
  localparam int unsigned W = 8;

  logic [1:0]        shift;
  logic [3:0]        sw;
  logic [3:0][W-1:0] x, f, b, r;

  logic [3:0]        bf_c;
  logic [3:0][W-1:0] bf_f, bf_r;
  logic [5:0]        ben_c;
  logic [3:0][W-1:0] ben_f, ben_r;

  int checks = 0, failures = 0;

  relaxed_network #(.NET(cf_pkg::NET_BS), .P(4), .W(W), .MASK(4'b1100), .INVERSE(1'b0)) u_f (
    .ctrl(shift), .sw(sw), .din(x), .dout(f));
  relaxed_network #(.NET(cf_pkg::NET_BS), .P(4), .W(W), .MASK(4'b1100), .INVERSE(1'b1)) u_i (
    .ctrl(shift), .sw(sw), .din(b), .dout(r));
  relaxed_network #(.NET(cf_pkg::NET_BF), .P(4), .W(W), .MASK(4'b0000), .INVERSE(1'b0)) u_bf_f (
    .ctrl(bf_c), .sw(sw), .din(x), .dout(bf_f));
  relaxed_network #(.NET(cf_pkg::NET_BF), .P(4), .W(W), .MASK(4'b0000), .INVERSE(1'b1)) u_bf_i (
    .ctrl(bf_c), .sw(sw), .din(bf_f), .dout(bf_r));
  relaxed_network #(.NET(cf_pkg::NET_BEN), .P(4), .W(W), .MASK(4'b1000), .INVERSE(1'b0)) u_ben_f (
    .ctrl(ben_c), .sw(sw), .din(x), .dout(ben_f));
  relaxed_network #(.NET(cf_pkg::NET_BEN), .P(4), .W(W), .MASK(4'b1000), .INVERSE(1'b1)) u_ben_i (
    .ctrl(ben_c), .sw(sw), .din(ben_f), .dout(ben_r));

  // Bank of PE p in each cycle of the example (A=0 .. D=3) and the control
  // word (shift, sw) that realises it.
  int bank_of_pe [6][4] = '{'{0, 1, 2, 3}, '{0, 1, 2, 3}, '{3, 0, 1, 2},
                            '{0, 1, 3, 2}, '{2, 0, 3, 1}, '{1, 2, 0, 3}};
  int sh [6] = '{0, 0, 3, 0, 2, 1};
  int sv [6] = '{0, 0, 0, 4, 8, 8};   // 4: switch 2/3, 8: switch 3/0

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit distinct(logic [3:0][W-1:0] v);
    for (int m = 0; m < 4; m++)
      for (int n = m + 1; n < 4; n++)
        if (v[m] == v[n]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bf_c = '0;
    ben_c = '0;
    for (int rep = 0; rep < 10; rep++) begin
      for (int t = 0; t < 6; t++) begin
        shift = 2'(sh[t]);
        sw    = 4'(sv[t]);
        for (int p = 0; p < 4; p++) x[p] = W'($urandom);
        for (int k = 0; k < 4; k++) b[k] = W'($urandom);
        #1;
        for (int p = 0; p < 4; p++) begin
          check(f[bank_of_pe[t][p]] === x[p], $sformatf("write route t=%0d pe=%0d", t, p));
          check(r[p] === b[bank_of_pe[t][p]], $sformatf("read route t=%0d pe=%0d", t, p));
        end
      end
    end
    // all control words, distinct lane values
    for (int p = 0; p < 4; p++) x[p] = W'(8'h10 * p + 8'h5);
    for (int c = 0; c < 64; c++) begin
      {sw, shift} = 6'(c);
      #1;
      b = f;
      #1;
      check(r === x, $sformatf("BS round trip ctrl=%0d", c));
      check(distinct(f), $sformatf("BS collision ctrl=%0d", c));
    end
    for (int c = 0; c < 16; c++) begin
      bf_c = 4'(c);
      #1;
      check(bf_r === x, $sformatf("BF round trip ctrl=%0d", c));
      check(distinct(bf_f), $sformatf("BF collision ctrl=%0d", c));
    end
    for (int c = 0; c < 128; c++) begin
      {sw[3], ben_c} = 7'(c);
      #1;
      check(ben_r === x, $sformatf("BEN round trip ctrl=%0d", c));
      check(distinct(ben_f), $sformatf("BEN collision ctrl=%0d", c));
    end
    // butterfly bit meaning
    bf_c = 4'b0001; #1; check(bf_f === {x[3], x[2], x[0], x[1]}, "BF bit0 exchanges lanes 0/1");
    bf_c = 4'b0100; #1; check(bf_f === {x[3], x[0], x[1], x[2]}, "BF bit2 exchanges lanes 0/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
