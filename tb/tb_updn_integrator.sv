// tb_updn_integrator -- self-checking test of the saturating up/down
// integrator, one unsigned and one signed 4-bit instance.
//
// Random up/dn/en/load stimulus is applied for 4000 cycles; an integer
// reference model (clamped add) predicts the word every cycle. Directed
// phases first drive long UP and DN runs to reach both rails, checking the
// rate of one LSB per clock and the rail flags.
module tb_updn_integrator;
  logic clk = 1'b0;
  logic rst_n;
  logic en, load, up, dn;
  logic [3:0] load_val;
  logic [3:0] wu, ws;
  logic [5:0] w3;
  logic m3max, m3min;
  int ref_3;
  logic umax, umin, smax, smin;
  int checks = 0, failures = 0;
  int ref_u, ref_s;

  always #5 clk = ~clk;

  updn_integrator #(.W(4), .SIGNED(1'b0), .STEP(1), .RESET_VAL(4'd3)) dut_u (
    .clk, .rst_n, .en, .load, .load_val, .up, .dn, .word(wu), .at_max(umax), .at_min(umin));
  updn_integrator #(.W(4), .SIGNED(1'b1), .STEP(1), .RESET_VAL(4'd0)) dut_s (
    .clk, .rst_n, .en, .load, .load_val, .up, .dn, .word(ws), .at_max(smax), .at_min(smin));

  updn_integrator #(.W(6), .SIGNED(1'b0), .STEP(3), .RESET_VAL(6'd0)) dut_3 (
    .clk, .rst_n, .en, .load, .load_val({2'b00, load_val}), .up, .dn, .word(w3),
    .at_max(m3max), .at_min(m3min));

  function automatic int clamp(int v, int lo, int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: wu=%0d ref_u=%0d ws=%0d ref_s=%0d", what, wu, ref_u,
                                  $signed(ws), ref_s);
    end
  endtask

  // One clock with the given controls, then compare with the reference.
  task automatic step(logic e, logic l, logic [3:0] lv, logic u, logic d);
    en = e; load = l; load_val = lv; up = u; dn = d;
    @(posedge clk);
    if (l) begin
      ref_u = int'(lv);
      ref_s = int'($signed(lv));
      ref_3 = int'(lv);
    end else if (e) begin
      ref_3 = clamp(ref_3 + ((u && !d) ? 3 : 0) - ((d && !u) ? 3 : 0), 0, 63);
      ref_u = clamp(ref_u + ((u && !d) ? 1 : 0) - ((d && !u) ? 1 : 0), 0, 15);
      ref_s = clamp(ref_s + ((u && !d) ? 1 : 0) - ((d && !u) ? 1 : 0), -8, 7);
    end
    #1;
    check("unsigned word", int'(wu) == ref_u);
    check("signed word", int'($signed(ws)) == ref_s);
    check("step-3 word", int'(w3) == ref_3 && m3max == (ref_3 == 63) && m3min == (ref_3 == 0));
    check("flags", umax == (ref_u == 15) && umin == (ref_u == 0) &&
                   smax == (ref_s == 7) && smin == (ref_s == -8));
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; load = 1'b0; up = 1'b0; dn = 1'b0; load_val = '0;
    repeat (2) @(posedge clk);
    #1;
    ref_u = 3; ref_s = 0; ref_3 = 0;
    check("reset value", wu == 4'd3 && ws == 4'd0);
    rst_n = 1'b1;
    // Rate: one LSB per clock up to the rail, then stays there.
    for (int i = 0; i < 25; i++) step(1, 0, 0, 1, 0);
    check("upper rail reached", umax && smax && m3max);
    for (int i = 0; i < 25; i++) step(1, 0, 0, 0, 1);
    check("lower rail reached", umin && smin && m3min);
    // No-update states: neither or both pulses, and frozen.
    for (int i = 0; i < 5; i++) step(1, 0, 0, 0, 0);
    for (int i = 0; i < 5; i++) step(1, 0, 0, 1, 1);
    for (int i = 0; i < 5; i++) step(0, 0, 0, 1, 0);
    // Load has priority over en = 0.
    step(0, 1, 4'd9, 0, 1);
    for (int i = 0; i < 4000; i++)
      step($urandom_range(0, 7) != 0, $urandom_range(0, 63) == 0, 4'($urandom),
           1'($urandom), 1'($urandom));
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
