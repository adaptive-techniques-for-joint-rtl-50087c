// tb_xtc_sample_align -- checks the digital delay of one lane.
//
// A random stream of data-centre and edge decisions is driven, one pair per
// clock. The testbench keeps its own record of what was driven and checks
// after every clock that x_t0 / x_t05 / x_t1 are the data decision of two
// clocks earlier, the edge decision of two clocks earlier (taken between
// those two data decisions) and the data decision of one clock earlier.
module tb_xtc_sample_align;
  logic clk = 1'b0;
  logic rst_n;
  logic data_smp, edge_smp;
  logic x_t0, x_t05, x_t1;
  logic d_log [$];
  logic e_log [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xtc_sample_align dut (.clk, .rst_n, .data_smp, .edge_smp, .x_t0, .x_t05, .x_t1);

  initial begin
    rst_n = 1'b0; data_smp = 1'b1; edge_smp = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({x_t0, x_t05, x_t1} != 3'b000) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      data_smp = 1'($urandom);
      edge_smp = 1'($urandom);
      d_log.push_back(data_smp);
      e_log.push_back(edge_smp);
      @(posedge clk);
      #1;
      if (n >= 1) begin
        checks++;
        if (x_t1 != d_log[n] || x_t0 != d_log[n-1] || x_t05 != e_log[n-1]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %b%b%b", n, x_t0, x_t05, x_t1);
        end
      end
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
