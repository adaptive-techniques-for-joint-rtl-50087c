// tb_xtc_dfe_top -- end-to-end test of the two-lane joint XTC / AGC / DFE
// controller at its default parameters, closed around a real-valued model of
// the analog receiver.
//
// Receiver model, one step per unit interval (UI), both lanes alike:
//   forward signal at the data instant   r(k)    = sum_j h[j] * x(k-j)
//   at the edge instant k+1/2            (r(k) + r(k+1)) / 2
//   far-end crosstalk at the edge        -KX * (x'(k+1) - x'(k)) / 2
//     (x' = the other lane's data; a rising aggressor couples a negative
//     bump, a falling one a positive bump; no crosstalk at data instants)
//   XTC path at the edge                 KD * h'[0] * (x'(k+1) - x'(k)) / 2
//   XTC adder                            G*((1-alpha)*forward + alpha*XTC), G = 4
//   VGA and DFE summer                   z = A*y - sum cj * s(x(k-j))
//   slicers: data z > 0, error z > +B and z > -B, edge (edge instant) > 0.
// The edge-instant residual vanishes for alpha/(1-alpha) = KX/(KD*h'[0]),
// so the expected alpha is known in closed form. At the data instant the
// DFE sees G(1-alpha)*h, so the expected gain is A = B/(G(1-alpha)h0) and
// the expected taps cj = B*hj/h0.
//
// Nine cases: three channel losses (pulse responses standing for -15.7,
// -17.7 and -19.7 dB insertion loss) times three crosstalk strengths
// (60, 120 and 180 mVpp, i.e. KX = 30, 60, 90 mV peak); 500 mVpp NRZ data.
// Each case starts from reset, runs 20000 UIs, and checks alpha, A and the
// taps of both lanes against the expected values and that the last 2000
// decisions of both lanes are error-free. The last case then freezes alpha
// (fixed-ratio operation) and presets all words with load.
// Every UI the AGC word of a running lane must move by exactly one LSB
// (one update per symbol). Mechanisms counted: XTC UP, XTC DN, XTC no-update, AGC UP/DN, tap UP/DN,
// frozen alpha, load. A mechanism that never happens counts as a failure.
module tb_xtc_dfe_top;
  import xtc_dfe_pkg::*;

  localparam int unsigned NT = NTAPS_DEF;
  localparam real G = 4.0;
  localparam real B = 0.25;
  localparam real KD = 1.0;
  localparam real A_LSB = 1.0 / 512.0;
  localparam real C_LSB = 0.002;
  localparam int  RUN_UI = 20000;

  // Pulse responses (V, for +-0.25 V transmit levels), cursor then 3 taps.
  localparam real HTAB [3][4] = '{'{0.110, 0.045, 0.020, 0.008},
                                  '{0.095, 0.048, 0.024, 0.010},
                                  '{0.080, 0.050, 0.028, 0.012}};
  localparam real KXTAB [3] = '{0.030, 0.060, 0.090};

  logic clk = 1'b0;
  logic rst_n, load;
  lane_slicers_t slicers [NLANES];
  logic [NLANES-1:0] xtc_en, dfe_en;
  logic [ALPHA_W_DEF-1:0] alpha_init [NLANES];
  logic [AGC_W_DEF-1:0] agc_init [NLANES];
  logic [TAP_W_DEF-1:0] tap_init [NLANES][NT];
  logic [ALPHA_W_DEF-1:0] alpha_vcont [NLANES];
  logic [ALPHA_DAC_W_DEF-1:0] alpha_dac [NLANES];
  logic [AGC_W_DEF-1:0] agc_gain [NLANES];
  logic signed [TAP_W_DEF-1:0] dfe_tap [NLANES][NT];
  logic [NT:1] dfe_fb [NLANES];
  updn_t xtc_pulse [NLANES];
  updn_t agc_pulse [NLANES];
  updn_t tap_pulse [NLANES][NT];
  logic [NLANES-1:0] xtc_sat, dfe_sat, err_sign;

  int checks = 0, failures = 0;
  int n_xtc_up = 0, n_xtc_dn = 0, n_xtc_hold = 0, n_agc_up = 0, n_agc_dn = 0;
  int n_tap_up = 0, n_tap_dn = 0, n_frozen = 0, n_load = 0;
  int n_rate = 0, n_rate_bad = 0;
  real h [4];
  real kx;
  int tx [NLANES][$];
  int bit_err [NLANES];
  int case_id;

  always #5 clk = ~clk;

  xtc_dfe_top dut (.clk, .rst_n, .slicers, .xtc_en, .dfe_en, .load, .alpha_init, .agc_init,
                   .tap_init, .alpha_vcont, .alpha_dac, .agc_gain, .dfe_tap, .dfe_fb,
                   .xtc_pulse, .xtc_sat, .agc_pulse, .tap_pulse, .dfe_sat, .err_sign);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL case %0d: %s", case_id, what);
    end
  endtask

  function automatic real sg(logic b);
    return b ? 1.0 : -1.0;
  endfunction

  // Received forward signal of lane l at data instant i (index into tx).
  function automatic real rx_at(int l, int i);
    real v = 0.0;
    for (int j = 0; j < 4; j++)
      if (i - j >= 0) v += h[j] * real'(tx[l][i - j]);
    return v;
  endfunction

  // One UI: uses data k (newest known is k+1, needed for the edge at k+1/2).
  task automatic one_ui(bit count_errors);
    int k;
    int agc_before [NLANES];
    for (int l = 0; l < NLANES; l++) tx[l].push_back(($urandom_range(0, 1) == 1) ? 1 : -1);
    k = tx[0].size() - 2;
    @(negedge clk);
    for (int l = 0; l < NLANES; l++) begin
      int o = (l + 1) % NLANES;
      real alpha, a, y, z, ye, dx;
      alpha = real'(alpha_vcont[l]) / 255.0;
      a = real'(agc_gain[l]) * A_LSB;
      // data instant k
      y = G * (1.0 - alpha) * rx_at(l, k);
      z = a * y;
      for (int j = 1; j <= NT; j++) z -= real'(dfe_tap[l][j-1]) * C_LSB * sg(dfe_fb[l][j]);
      slicers[l].data = z > 0.0;
      slicers[l].errp = z > B;
      slicers[l].errn = z > -B;
      if (count_errors && ((z > 0.0) != (tx[l][k] > 0))) bit_err[l]++;
      // edge instant k + 1/2
      dx = real'(tx[o][k+1] - tx[o][k]) / 2.0;
      ye = G * ((1.0 - alpha) * ((rx_at(l, k) + rx_at(l, k+1)) / 2.0 - kx * dx)
                + alpha * KD * h[0] * dx);
      slicers[l].edge_s = ye > 0.0;
    end
    for (int l = 0; l < NLANES; l++) agc_before[l] = int'(agc_gain[l]);
    @(posedge clk);
    #1;
    for (int l = 0; l < NLANES; l++) begin
      // one gain update per UI while the loop runs
      if (dfe_en[l] && !dfe_sat[l]) begin
        n_rate++;
        if (int'(agc_gain[l]) - agc_before[l] != 1 && agc_before[l] - int'(agc_gain[l]) != 1)
          n_rate_bad++;
      end
      if (xtc_pulse[l].up) n_xtc_up++;
      else if (xtc_pulse[l].dn) n_xtc_dn++;
      else n_xtc_hold++;
      if (agc_pulse[l].up) n_agc_up++;
      if (agc_pulse[l].dn) n_agc_dn++;
      for (int j = 0; j < NT; j++) begin
        if (tap_pulse[l][j].up) n_tap_up++;
        if (tap_pulse[l][j].dn) n_tap_dn++;
      end
    end
  endtask

  task automatic run_case(int il, int xt);
    real ratio, a_exp_alpha, alpha_act, a_exp;
    case_id = il * 3 + xt;
    for (int j = 0; j < 4; j++) h[j] = HTAB[il][j];
    kx = KXTAB[xt];
    for (int l = 0; l < NLANES; l++) begin
      tx[l].delete();
      tx[l].push_back(1);
      bit_err[l] = 0;
    end
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < RUN_UI; n++) one_ui(n >= RUN_UI - 2000);
    ratio = kx / (KD * h[0]);
    a_exp_alpha = ratio / (1.0 + ratio);
    for (int l = 0; l < NLANES; l++) begin
      alpha_act = real'(alpha_vcont[l]) / 255.0;
      a_exp = B / (G * (1.0 - alpha_act) * h[0]);
      $display("case %0d lane %0d: alpha %0.3f (exp %0.3f) A %0.3f (exp %0.3f) c %0d %0d %0d (exp %0.0f %0.0f %0.0f) errors %0d",
               case_id, l, alpha_act, a_exp_alpha, real'(agc_gain[l]) * A_LSB, a_exp,
               dfe_tap[l][0], dfe_tap[l][1], dfe_tap[l][2],
               B * h[1] / h[0] / C_LSB, B * h[2] / h[0] / C_LSB, B * h[3] / h[0] / C_LSB,
               bit_err[l]);
      check("alpha", alpha_act > a_exp_alpha - 0.03 && alpha_act < a_exp_alpha + 0.03);
      check("AGC gain", real'(agc_gain[l]) * A_LSB > a_exp * 0.95 &&
                        real'(agc_gain[l]) * A_LSB < a_exp * 1.05);
      for (int j = 1; j <= NT; j++)
        check("DFE tap", real'(dfe_tap[l][j-1]) > B * h[j] / h[0] / C_LSB - 5.0 &&
                         real'(dfe_tap[l][j-1]) < B * h[j] / h[0] / C_LSB + 5.0);
      check("alpha DAC code is the top bits", alpha_dac[l] == alpha_vcont[l][7:5]);
      check("error-free after convergence", bit_err[l] == 0);
      check("no control word at a rail", !xtc_sat[l] && !dfe_sat[l]);
    end
  endtask

  initial begin
    logic [ALPHA_W_DEF-1:0] held [NLANES];
    rst_n = 1'b0; load = 1'b0; xtc_en = '1; dfe_en = '1;
    for (int l = 0; l < NLANES; l++) begin
      slicers[l] = '0;
      alpha_init[l] = '0;
      agc_init[l] = '0;
      for (int j = 0; j < NT; j++) tap_init[l][j] = '0;
    end
    repeat (2) @(posedge clk);
    for (int il = 0; il < 3; il++)
      for (int xt = 0; xt < 3; xt++) run_case(il, xt);

    // Fixed alpha: freeze the XTC loops, the DFE loops keep running.
    xtc_en = '0;
    for (int l = 0; l < NLANES; l++) held[l] = alpha_vcont[l];
    for (int n = 0; n < 2000; n++) begin
      one_ui(1'b0);
      if (alpha_vcont[0] == held[0] && alpha_vcont[1] == held[1] &&
          (xtc_pulse[0].up || xtc_pulse[0].dn)) n_frozen++;
    end
    check("alpha held while frozen", alpha_vcont[0] == held[0] && alpha_vcont[1] == held[1]);
    xtc_en = '1;

    // Preset all words to an expected starting point.
    @(negedge clk);
    for (int l = 0; l < NLANES; l++) begin
      alpha_init[l] = 8'd128;
      agc_init[l] = 10'd400;
      for (int j = 0; j < NT; j++) tap_init[l][j] = 8'(j + 1);
    end
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check("load presets the words", alpha_vcont[0] == 8'd128 && alpha_vcont[1] == 8'd128 &&
          agc_gain[0] == 10'd400 && dfe_tap[1][2] == 8'sd3);
    if (alpha_vcont[0] == 8'd128 && agc_gain[1] == 10'd400) n_load++;

    $display("mechanisms: xtc_up %0d xtc_dn %0d xtc_hold %0d agc_up %0d agc_dn %0d tap_up %0d tap_dn %0d frozen %0d load %0d",
             n_xtc_up, n_xtc_dn, n_xtc_hold, n_agc_up, n_agc_dn, n_tap_up, n_tap_dn,
             n_frozen, n_load);
    check("XTC UP seen", n_xtc_up > 0);
    check("XTC DN seen", n_xtc_dn > 0);
    check("XTC no-update seen", n_xtc_hold > 0);
    check("AGC UP and DN seen", n_agc_up > 0 && n_agc_dn > 0);
    check("tap UP and DN seen", n_tap_up > 0 && n_tap_dn > 0);
    check("frozen alpha seen", n_frozen > 0);
    check("load seen", n_load > 0);
    check("one AGC update per UI", n_rate > 0 && n_rate_bad == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * RUN_UI + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
