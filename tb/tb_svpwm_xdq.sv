// tb_svpwm_xdq: exhaustive check of the intermediate d-q transformation.
//
// Every combination of the three VW-bit phase samples is applied. The expected
// values come from the real-valued Clarke transform, Vd = (2/3)(va - vb/2 -
// vc/2) and Vq = (vb - vc)/sqrt(3), scaled by 3 and 2*sqrt(3) and rounded:
// the block must deliver xd = 3*Vd and xq = 2*sqrt(3)*Vq exactly.
module tb_svpwm_xdq;
  localparam int unsigned VW = 6;

  logic signed [VW-1:0] va, vb, vc;
  logic signed [VW+1:0] xd, xq;
  int checks = 0, failures = 0;

  svpwm_xdq #(.VW(VW)) dut (.va(va), .vb(vb), .vc(vc), .xd(xd), .xq(xq));

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vd, vq;
    int  exp_d, exp_q;
    for (int a = -(2**(VW-1)); a < 2**(VW-1); a++)
      for (int b = -(2**(VW-1)); b < 2**(VW-1); b++)
        for (int c = -(2**(VW-1)); c < 2**(VW-1); c++) begin
          va = VW'(a); vb = VW'(b); vc = VW'(c);
          #1;
          vd = (2.0 / 3.0) * (real'(a) - 0.5 * real'(b) - 0.5 * real'(c));
          vq = (real'(b) - real'(c)) / $sqrt(3.0);
          exp_d = int'($floor(3.0 * vd + 0.5));
          exp_q = int'($floor(2.0 * $sqrt(3.0) * vq + 0.5));
          checks += 2;
          if (int'(xd) != exp_d) begin
            failures++;
            if (failures < 10) $display("xd mismatch va=%0d vb=%0d vc=%0d got %0d exp %0d", a, b, c, xd, exp_d);
          end
          if (int'(xq) != exp_q) begin
            failures++;
            if (failures < 10) $display("xq mismatch va=%0d vb=%0d vc=%0d got %0d exp %0d", a, b, c, xq, exp_q);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
