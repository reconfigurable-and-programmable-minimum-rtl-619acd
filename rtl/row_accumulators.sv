// row_accumulators: the parallel accumulators of vector quantisation.
//
// One accumulator per PE row, i.e. per stored code-vector. While `en` is
// high, each accumulator adds the absolute difference its row puts out for
// the currently selected column; after all N columns have been processed,
// accumulator k holds the L1 distance between the input vector and
// code-vector k. `clr` (the internal reset line) empties them.
// Accumulator width B+clog2(N) holds the largest possible distance.
// Timing: `acc` includes the input of the previous enabled clock.
module row_accumulators #(
  parameter int unsigned N  = 4,
  parameter int unsigned B  = 6,
  localparam int unsigned AW = B + $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [B-1:0]  row_ad [N],
  output logic [AW-1:0] acc    [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) acc[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < N; k++) acc[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < N; k++) acc[k] <= acc[k] + AW'(row_ad[k]);
    end
  end

endmodule
