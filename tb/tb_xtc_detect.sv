// tb_xtc_detect -- exhaustive check of the XTC detector against its truth
// table: only the four rows where both lanes switch give a pulse; the
// aggressor's direction and the victim's edge bit choose UP or DN.
module tb_xtc_detect;
  logic own_t0, own_t05, own_t1, nbr_t0, nbr_t1, up, dn;
  int checks = 0, failures = 0;
  logic exp_up, exp_dn;

  xtc_detect dut (.own_t0, .own_t05, .own_t1, .nbr_t0, .nbr_t1, .up, .dn);

  initial begin
    for (int v = 0; v < 32; v++) begin
      {own_t0, own_t05, own_t1, nbr_t0, nbr_t1} = 5'(v);
      #1;
      exp_up = 1'b0;
      exp_dn = 1'b0;
      if (own_t0 != own_t1) begin
        // rows: aggressor 0->1 with edge 0 / 1, aggressor 1->0 with edge 0 / 1
        case ({nbr_t0, nbr_t1, own_t05})
          3'b010: exp_up = 1'b1;   // under-compensation
          3'b011: exp_dn = 1'b1;   // over-compensation
          3'b100: exp_dn = 1'b1;   // over-compensation
          3'b101: exp_up = 1'b1;   // under-compensation
          default: ;
        endcase
      end
      checks++;
      if (up != exp_up || dn != exp_dn) begin
        failures++;
        $display("FAIL inputs=%05b up=%b dn=%b", v[4:0], up, dn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
