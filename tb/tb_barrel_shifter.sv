// tb_barrel_shifter: self-checking test of the lane rotator.
// For P = 4 and P = 8, forward and inverse, every shift amount and random
// lane data: forward must put input lane p on output lane (p+s) mod P, inverse
// must put input lane b on output lane (b-s) mod P, and inverse(forward(x))
// must give x back.
module tb_barrel_shifter;
  localparam int unsigned W = 8;

  logic [1:0]        s4;
  logic [3:0][W-1:0] x4, f4, i4, r4;
  logic [2:0]        s8;
  logic [7:0][W-1:0] x8, f8, i8, r8;

  int checks = 0, failures = 0;

  barrel_shifter #(.P(4), .W(W), .INVERSE(1'b0)) u_f4 (.shift(s4), .din(x4), .dout(f4));
  barrel_shifter #(.P(4), .W(W), .INVERSE(1'b1)) u_i4 (.shift(s4), .din(x4), .dout(i4));
  barrel_shifter #(.P(4), .W(W), .INVERSE(1'b1)) u_r4 (.shift(s4), .din(f4), .dout(r4));
  barrel_shifter #(.P(8), .W(W), .INVERSE(1'b0)) u_f8 (.shift(s8), .din(x8), .dout(f8));
  barrel_shifter #(.P(8), .W(W), .INVERSE(1'b1)) u_i8 (.shift(s8), .din(x8), .dout(i8));
  barrel_shifter #(.P(8), .W(W), .INVERSE(1'b1)) u_r8 (.shift(s8), .din(f8), .dout(r8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 4; s++) begin
        s4 = 2'(s);
        for (int p = 0; p < 4; p++) x4[p] = W'($urandom);
        #1;
        for (int p = 0; p < 4; p++) begin
          check(f4[(p + s) % 4] === x4[p], $sformatf("P4 fwd s=%0d p=%0d", s, p));
          check(i4[(p + 4 - s) % 4] === x4[p], $sformatf("P4 inv s=%0d p=%0d", s, p));
        end
        check(r4 === x4, $sformatf("P4 round trip s=%0d", s));
      end
      for (int s = 0; s < 8; s++) begin
        s8 = 3'(s);
        for (int p = 0; p < 8; p++) x8[p] = W'($urandom);
        #1;
        for (int p = 0; p < 8; p++) begin
          check(f8[(p + s) % 8] === x8[p], $sformatf("P8 fwd s=%0d p=%0d", s, p));
          check(i8[(p + 8 - s) % 8] === x8[p], $sformatf("P8 inv s=%0d p=%0d", s, p));
        end
        check(r8 === x8, $sformatf("P8 round trip s=%0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
