// tb_err_sign_logic -- checks the error-sign logic against the error
// e = z - B*s(z) computed in real arithmetic for random equalised samples z.
// The three slicer bits are formed from z with thresholds +B, -B and 0.
module tb_err_sign_logic;
  localparam real B = 0.25;
  logic p_i, n_i, x_i, e_i, e_ib;
  int checks = 0, failures = 0;
  real z, e;

  err_sign_logic dut (.p_i, .n_i, .x_i, .e_i, .e_ib);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      z = (real'($urandom_range(0, 20000)) - 10000.0) / 10000.0;   // -1 .. 1 V
      if (z == B || z == -B || z == 0.0) continue;
      p_i = z > B;
      n_i = z > -B;
      x_i = z > 0.0;
      e = z - (x_i ? B : -B);
      #1;
      checks++;
      if (e_i != (e > 0.0) || e_ib != !(e > 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL z=%f e_i=%b", z, e_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
