// tb_tanh_act: exhaustive test of the activation over all 32768 Q4.11
// inputs. Each output is compared with the rounded table definition and,
// independently, with 128 * tanh(x) computed at full precision (error at
// most 1.5 LSB because of the 1/256 input truncation). Also checks odd
// symmetry and monotonicity.
module tb_tanh_act;
  import pdm_cnn_pkg::*;

  acc_t  x;
  data_t y;

  tanh_act u_dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int prev, m, q;
    real exact;
    prev = -128;
    for (int v = -16384; v < 16384; v++) begin
      x = acc_t'(v);
      #1;
      m = (v < 0) ? -v : v;
      q = int'($floor($tanh(real'(m / 8) / 256.0) * 128.0 + 0.5));
      if (q > 127) q = 127;
      if (v < 0) q = -q;
      check(int'(y) == q, $sformatf("x=%0d y=%0d expected %0d", v, y, q));
      exact = $tanh(real'(v) / 2048.0) * 128.0;
      check((real'(y) - exact) < 1.5 && (exact - real'(y)) < 1.5,
            $sformatf("x=%0d y=%0d far from %f", v, y, exact));
      check(int'(y) >= prev, $sformatf("not monotonic at x=%0d", v));
      prev = int'(y);
    end
    // symmetry
    for (int v = 1; v < 16384; v += 7) begin
      int yp;
      x = acc_t'(v); #1; yp = int'(y);
      x = acc_t'(-v); #1;
      check(int'(y) == -yp, $sformatf("symmetry at %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
