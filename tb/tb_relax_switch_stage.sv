// tb_relax_switch_stage: self-checking test of the added relaxation switches.
// Uses the default configuration (P = 4, switches between lanes 2/3 and 3/0).
// The expected lane orders for every sw value are written out by hand below;
// bits of sw without a switch must have no effect, and the inverse stage must
// undo the forward stage.
module tb_relax_switch_stage;
  localparam int unsigned W = 8;

  logic [3:0]        sw;
  logic [3:0][W-1:0] x, f, i, r;

  int checks = 0, failures = 0;

  relax_switch_stage #(.P(4), .W(W), .MASK(4'b1100), .INVERSE(1'b0)) u_f (.sw(sw), .din(x), .dout(f));
  relax_switch_stage #(.P(4), .W(W), .MASK(4'b1100), .INVERSE(1'b1)) u_i (.sw(sw), .din(x), .dout(i));
  relax_switch_stage #(.P(4), .W(W), .MASK(4'b1100), .INVERSE(1'b1)) u_r (.sw(sw), .din(f), .dout(r));

  // Source lane of each output lane, forward, indexed by sw[3:2].
  // 00: identity; 01 (switch 2/3): 0,1,3,2; 10 (switch 3/0): 3,1,2,0;
  // 11: swap 2/3 then 3/0 -> 2,1,3,0.
  int src_fwd [4][4] = '{'{0, 1, 2, 3}, '{0, 1, 3, 2}, '{3, 1, 2, 0}, '{2, 1, 3, 0}};
  // Inverse: swap 3/0 first, then 2/3 -> for 11: 3,1,0,2.
  int src_inv [4][4] = '{'{0, 1, 2, 3}, '{0, 1, 3, 2}, '{3, 1, 2, 0}, '{3, 1, 0, 2}};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 10; rep++) begin
      for (int v = 0; v < 16; v++) begin
        sw = 4'(v);
        for (int p = 0; p < 4; p++) x[p] = W'($urandom);
        #1;
        for (int o = 0; o < 4; o++) begin
          checks++;
          if (f[o] !== x[src_fwd[v >> 2][o]]) begin
            failures++;
            $display("FAIL fwd sw=%b lane %0d", sw, o);
          end
          checks++;
          if (i[o] !== x[src_inv[v >> 2][o]]) begin
            failures++;
            $display("FAIL inv sw=%b lane %0d", sw, o);
          end
        end
        checks++;
        if (r !== x) begin
          failures++;
          $display("FAIL round trip sw=%b", sw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
