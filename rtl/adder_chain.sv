// adder_chain: serial adder chain that turns the N column partial sums of
// the PE array into one block distance (sum of absolute differences).
//
// The chain starts from zero on the left; stage c adds column c's partial
// sum to the running total and registers it, so the total moves one column
// to the right per clock, as the latches between the adders do in the
// design. All column sums for one displacement leave the array in the same
// clock, so column c is first delayed by c registers to meet the running
// total (the original obtains this skew from the half-clock phase offset of
// its P/N latches; the alignment registers are this design's own).
// Timing: `sad` refers to the column sums presented N enabled clocks
// earlier. `en` stalls the whole chain; `clr` empties it.
module adder_chain #(
  parameter int unsigned N  = 4,
  parameter int unsigned SW = 8,              // column-sum width
  parameter int unsigned DW = SW + $clog2(N)  // block-distance width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [SW-1:0] col_sum [N],
  output logic [DW-1:0] sad
);

  // skew_q[c][k]: column c after k+1 alignment registers (k < c)
  logic [SW-1:0] skew_q [N][N];
  logic [SW-1:0] aligned[N];
  logic [DW-1:0] acc_q  [N];

  for (genvar c = 0; c < N; c++) begin : g_align
    if (c == 0) begin : g_direct
      assign aligned[c] = col_sum[c];
    end else begin : g_delay
      assign aligned[c] = skew_q[c][c-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) begin
        acc_q[c] <= '0;
        for (int k = 0; k < N; k++) skew_q[c][k] <= '0;
      end
    end else if (clr) begin
      for (int c = 0; c < N; c++) begin
        acc_q[c] <= '0;
        for (int k = 0; k < N; k++) skew_q[c][k] <= '0;
      end
    end else if (en) begin
      for (int c = 0; c < N; c++) begin
        skew_q[c][0] <= col_sum[c];
        for (int k = 1; k < N; k++) skew_q[c][k] <= skew_q[c][k-1];
        acc_q[c] <= ((c == 0) ? '0 : acc_q[(c == 0) ? 0 : c-1]) + DW'(aligned[c]);
      end
    end
  end

  assign sad = acc_q[N-1];

endmodule
