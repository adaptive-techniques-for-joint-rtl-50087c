// tb_dfe_adapt -- closed-loop test of the AGC + adaptive DFE loop of one
// lane against a real-valued channel model.
//
// Channel: pulse response cursor h0 = 500 mV, post-cursors h1 = 200 mV,
// h2 = 100 mV, h3 = 0; random +-1 data; target level B = 250 mV. The model
// forms z[k] = A*r[k] - sum cj*s(x[k-j]) from the block's own control words
// and feedback bits and drives the three slicer bits. Expected end state,
// worked out from the model: A = B/h0 = 0.5, cj = B*hj/h0 = 100, 50, 0 mV.
//
// Checks, every UI: each word moves by exactly one LSB in the direction
// given by the update equations evaluated with the real-valued error
// (one update per UI, one clock latency). After 3000 UIs: the words sit
// within a few LSB of the expected values, and A was within 2 % of 0.5
// within 1000 UIs of a start from 0.1. Finally load and freeze are checked.
module tb_dfe_adapt;
  localparam int unsigned NTAPS = 3;
  localparam real B = 0.25;
  localparam real H [4] = '{0.5, 0.2, 0.1, 0.0};
  localparam real A_LSB = 1.0 / 512.0;
  localparam real C_LSB = 0.002;

  logic clk = 1'b0;
  logic rst_n, agc_en, tap_en, load;
  logic data_i, errp_i, errn_i;
  logic [9:0] agc_load_val, agc_gain;
  logic [7:0] tap_load_val [NTAPS];
  logic signed [7:0] dfe_tap [NTAPS];
  logic [NTAPS:1] x_hist;
  logic e_sign, agc_sat;
  logic [NTAPS-1:0] tap_sat;
  xtc_dfe_pkg::updn_t agc_pulse;
  xtc_dfe_pkg::updn_t tap_pulse [NTAPS];

  int checks = 0, failures = 0;
  int tx [$];
  int agc_before, tap_before [NTAPS];
  int d_agc, d_tap [NTAPS];
  int conv_at;
  real r, z, e;

  always #5 clk = ~clk;

  dfe_adapt dut (.clk, .rst_n, .data_i, .errp_i, .errn_i, .agc_en, .tap_en, .load,
                 .agc_load_val, .tap_load_val, .agc_gain, .dfe_tap, .x_hist, .e_sign,
                 .agc_pulse, .tap_pulse, .agc_sat, .tap_sat);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s A=%0d c=%0d,%0d,%0d", what, agc_gain,
                                  dfe_tap[0], dfe_tap[1], dfe_tap[2]);
    end
  endtask

  function automatic int s(logic b);
    return b ? 1 : -1;
  endfunction

  // Drive one UI of the channel model and check the resulting update.
  task automatic one_ui(bit check_steps);
    int xk;
    @(negedge clk);
    xk = ($urandom_range(0, 1) == 1) ? 1 : -1;
    tx.push_back(xk);
    r = 0.0;
    for (int j = 0; j < 4; j++)
      if (tx.size() > j) r += H[j] * real'(tx[tx.size() - 1 - j]);
    z = real'(agc_gain) * A_LSB * r;
    for (int j = 1; j <= NTAPS; j++) z -= real'(dfe_tap[j-1]) * C_LSB * real'(s(x_hist[j]));
    data_i = z > 0.0;
    errp_i = z > B;
    errn_i = z > -B;
    e = z - (data_i ? B : -B);
    d_agc = -s(data_i) * ((e > 0.0) ? 1 : -1);
    for (int j = 1; j <= NTAPS; j++) d_tap[j-1] = s(x_hist[j]) * ((e > 0.0) ? 1 : -1);
    agc_before = int'(agc_gain);
    for (int j = 0; j < NTAPS; j++) tap_before[j] = int'(dfe_tap[j]);
    @(posedge clk);
    #1;
    if (check_steps) begin
      check("agc step", int'(agc_gain) == agc_before + d_agc);
      for (int j = 0; j < NTAPS; j++)
        check("tap step", int'(dfe_tap[j]) == tap_before[j] + d_tap[j]);
    end
  endtask

  initial begin
    rst_n = 1'b0; agc_en = 1'b1; tap_en = 1'b1; load = 1'b0;
    data_i = 1'b0; errp_i = 1'b0; errn_i = 1'b0;
    agc_load_val = '0;
    for (int j = 0; j < NTAPS; j++) tap_load_val[j] = '0;
    repeat (2) @(posedge clk);
    #1;
    check("reset: A = 0.1", agc_gain == 10'd51 && dfe_tap[0] == 0);
    rst_n = 1'b1;
    conv_at = -1;
    for (int k = 0; k < 3000; k++) begin
      one_ui(1'b1);
      if (conv_at < 0 && agc_gain >= 10'd251) conv_at = k;
    end
    $display("A reached 0.49 after %0d UIs; final A=%0d c=%0d,%0d,%0d", conv_at, agc_gain,
             dfe_tap[0], dfe_tap[1], dfe_tap[2]);
    check("A converged to 0.5", agc_gain >= 10'd250 && agc_gain <= 10'd262);
    check("c1 converged to 100 mV", dfe_tap[0] >= 8'sd46 && dfe_tap[0] <= 8'sd54);
    check("c2 converged to 50 mV", dfe_tap[1] >= 8'sd21 && dfe_tap[1] <= 8'sd29);
    check("c3 converged to 0", dfe_tap[2] >= -8'sd4 && dfe_tap[2] <= 8'sd4);
    check("convergence within 1000 UIs", conv_at >= 0 && conv_at < 1000);
    check("no saturation", !agc_sat && tap_sat == '0);

    // Load and freeze.
    @(negedge clk);
    load = 1'b1; agc_load_val = 10'd300; tap_load_val[0] = 8'd10;
    @(negedge clk);
    load = 1'b0; agc_en = 1'b0; tap_en = 1'b0;
    check("load", agc_gain == 10'd300 && dfe_tap[0] == 8'sd10);
    for (int k = 0; k < 100; k++) one_ui(1'b0);
    check("frozen", agc_gain == 10'd300 && dfe_tap[0] == 8'sd10);
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
