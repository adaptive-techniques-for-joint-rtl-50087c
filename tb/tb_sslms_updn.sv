// tb_sslms_updn -- checks the sign-sign LMS pulse generator.
//
// Random data and error-sign bits are driven for 3000 UIs. The testbench
// keeps its own decision history and evaluates the update equations in +-1
// arithmetic: the AGC gain must move by -s(x[k])s(e[k]) and tap j by
// +s(x[k-j])s(e[k]); UP is expected for a positive move, DN otherwise. The
// history outputs must equal the last NTAPS data bits.
module tb_sslms_updn;
  localparam int unsigned NTAPS = 3;
  logic clk = 1'b0;
  logic rst_n;
  logic x_i, e_i;
  xtc_dfe_pkg::updn_t agc;
  xtc_dfe_pkg::updn_t tap [NTAPS];
  logic [NTAPS:1] x_hist;
  int checks = 0, failures = 0;
  int xs [$];

  always #5 clk = ~clk;

  sslms_updn #(.NTAPS(NTAPS)) dut (.clk, .rst_n, .x_i, .e_i, .agc, .tap, .x_hist);

  function automatic int sgn(logic b);
    return b ? 1 : -1;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; x_i = 1'b0; e_i = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NTAPS; j++) xs.push_back(-1);   // reset history = 0 = -1
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      x_i = 1'($urandom);
      e_i = 1'($urandom);
      #1;
      check("agc pulse", agc.up == (-sgn(x_i) * sgn(e_i) > 0) && agc.dn == !agc.up);
      for (int j = 1; j <= NTAPS; j++) begin
        int prod;
        prod = xs[xs.size() - j] * sgn(e_i);
        check("tap pulse", tap[j-1].up == (prod > 0) && tap[j-1].dn == (prod < 0));
        check("history", sgn(x_hist[j]) == xs[xs.size() - j]);
      end
      xs.push_back(sgn(x_i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
