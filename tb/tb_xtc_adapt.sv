// tb_xtc_adapt -- tests one adaptive XTC loop at its default widths.
//
// Phase 1 (open loop): random aligned decisions for 4000 UIs; a reference
//   model (truth table + clamped integrator) predicts the V_CONT word each
//   cycle, and the DAC code must be its top bits. The fraction of UIs that
//   produce a pulse must be near 1/4 (both lanes switching).
// Phase 2 (closed loop): a simple crosstalk model makes the edge bit equal to
//   the predicted crosstalk polarity while the word is below a target and
//   opposite above it. Three targets are run, the final control voltages of
//   three crosstalk strengths: 616, 757 and 831 mV (words 157, 193, 212),
//   reached by the analog loop in 52.4, 62 and 65 ns (629, 744 and 780 UIs
//   at 83.3 ps). The loop must settle at each target within +-2 LSB; the
//   settling time must be within 25 % of target / 0.25 UIs (the slope of a
//   loop that moves in one UI of four) and within 20 % of the analog
//   loop's time.
// Phase 3: load presets the word and en = 0 freezes it.
module tb_xtc_adapt;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic rst_n, en, load;
  logic [W-1:0] load_val, vcont;
  logic [2:0] alpha_dac;
  logic own_t0, own_t05, own_t1, nbr_t0, nbr_t1;
  xtc_dfe_pkg::updn_t pulse;
  logic at_max, at_min;
  int checks = 0, failures = 0;
  int ref_w, pulses, target, settle;
  localparam int TGT [3] = '{157, 193, 212};
  localparam int ANALOG_UI [3] = '{629, 744, 780};
  logic exp_up, exp_dn;

  always #5 clk = ~clk;

  xtc_adapt dut (.clk, .rst_n, .en, .load, .load_val, .own_t0, .own_t05, .own_t1,
                 .nbr_t0, .nbr_t1, .vcont, .alpha_dac, .pulse, .at_max, .at_min);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s vcont=%0d ref=%0d", what, vcont, ref_w);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; load = 1'b0; load_val = '0;
    {own_t0, own_t05, own_t1, nbr_t0, nbr_t1} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ref_w = 0;
    pulses = 0;
    // Phase 1
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      {own_t0, own_t05, own_t1, nbr_t0, nbr_t1} = 5'($urandom);
      exp_up = (own_t0 != own_t1) && (nbr_t0 != nbr_t1) && (own_t05 == nbr_t0);
      exp_dn = (own_t0 != own_t1) && (nbr_t0 != nbr_t1) && (own_t05 != nbr_t0);
      #1;
      check("pulse", pulse.up == exp_up && pulse.dn == exp_dn);
      if (exp_up || exp_dn) pulses++;
      @(posedge clk);
      ref_w = ref_w + (exp_up ? 1 : 0) - (exp_dn ? 1 : 0);
      ref_w = ref_w > 255 ? 255 : ref_w < 0 ? 0 : ref_w;
      #1;
      check("word", int'(vcont) == ref_w);
      check("dac code", alpha_dac == vcont[7:5]);
    end
    check("pulse rate near 1/4", pulses > 850 && pulses < 1150);
    $display("open loop: %0d pulses in 4000 UIs", pulses);

    // Phase 2
    for (int t = 0; t < 3; t++) begin
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      target = TGT[t];
      settle = -1;
      for (int k = 0; k < 3000; k++) begin
        @(negedge clk);
        own_t0 = 1'($urandom); own_t1 = 1'($urandom);
        nbr_t0 = 1'($urandom); nbr_t1 = 1'($urandom);
        own_t05 = (int'(vcont) < target) ? nbr_t0 : !nbr_t0;
        if (settle < 0 && int'(vcont) >= target) settle = k;
      end
      $display("closed loop: target %0d settled after %0d UIs (analog loop %0d UIs), final word %0d",
               target, settle, ANALOG_UI[t], vcont);
      check("settles at target", int'(vcont) >= target - 2 && int'(vcont) <= target + 2);
      check("settling time vs slope", settle > target * 3 && settle < target * 5);
      check("settling time vs analog loop", settle * 10 > ANALOG_UI[t] * 8 &&
                                            settle * 10 < ANALOG_UI[t] * 12);
    end

    // Phase 3
    @(negedge clk);
    load = 1'b1; load_val = 8'd100;
    @(negedge clk);
    load = 1'b0; en = 1'b0;
    check("load", vcont == 8'd100);
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      {own_t0, own_t05, own_t1, nbr_t0, nbr_t1} = 5'($urandom);
    end
    check("frozen", vcont == 8'd100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
