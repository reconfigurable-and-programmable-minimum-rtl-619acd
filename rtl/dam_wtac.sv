// dam_wtac: winner-take-all over the accumulated code-vector distances.
//
// Finds the index of the smallest of N distances `dists` and registers it, with
// the winning distance, when `eval` is high; `found_valid` pulses one
// clock later. Among equal distances the lowest index wins (this design's
// choice). The original is a digital/analog mixed-signal winner-take-all
// circuit; this is a digital comparator scan with the same function.
module dam_wtac #(
  parameter int unsigned N  = 4,
  parameter int unsigned DW = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eval,
  input  logic [DW-1:0] dists [N],
  output logic [IW-1:0] found_addr,
  output logic [DW-1:0] found_dist,
  output logic          found_valid
);

  logic [IW-1:0] win_idx;
  logic [DW-1:0] win_val;

  always_comb begin
    win_idx = '0;
    win_val = dists[0];
    for (int k = 1; k < N; k++) begin
      if (dists[k] < win_val) begin
        win_idx = IW'(k);
        win_val = dists[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found_addr  <= '0;
      found_dist  <= '0;
      found_valid <= 1'b0;
    end else begin
      found_valid <= eval;
      if (eval) begin
        found_addr <= win_idx;
        found_dist <= win_val;
      end
    end
  end

endmodule
