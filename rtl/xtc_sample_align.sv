// xtc_sample_align -- the "digital delay" of one lane: lines up the
// data-centre and edge decisions so that the two data bits around a
// transition and the edge bit taken between them are presented together.
//
// Two flip-flops per path, all on the recovered 0-degree clock, as in the
// lane's digital-delay block: the data path taps x[t1] after the first
// flip-flop and x[t0] after the second; the edge path takes x[t0.5] after
// its second flip-flop.
//
// Input timing: at each clock edge, data_smp holds the data-centre slicer
// decision taken one unit interval (UI) earlier, and edge_smp holds the
// edge-slicer decision taken on the 180-degree clock half a UI earlier.
// With that, after edge n the outputs are
//   x_t0  = data decision of UI n-2,
//   x_t05 = edge decision between UI n-2 and UI n-1,
//   x_t1  = data decision of UI n-1.
// Reset clears all flip-flops (reset behaviour is this design's choice).
module xtc_sample_align (
  input  logic clk,
  input  logic rst_n,
  input  logic data_smp,
  input  logic edge_smp,
  output logic x_t0,
  output logic x_t05,
  output logic x_t1
);

  logic edge_q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_t1    <= 1'b0;
      x_t0    <= 1'b0;
      edge_q1 <= 1'b0;
      x_t05   <= 1'b0;
    end else begin
      x_t1    <= data_smp;
      x_t0    <= x_t1;
      edge_q1 <= edge_smp;
      x_t05   <= edge_q1;
    end
  end

endmodule
