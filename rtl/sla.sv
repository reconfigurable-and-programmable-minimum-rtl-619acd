// sla: one row of the programmable shift latch array.
//
// Search-area data leave the left end of a PE row and must reach the right
// end of the row above exactly when the pels of the next search-area line
// line up with the PEs there. With a search area N+2p pels wide, a row of N
// PE stages and a one-clock skew per row for the column partial sums, the
// row-to-row path is N+2p-1 stages, so this delay line is 2p-1 stages long.
// The array is programmable: `psel` chooses p from 1 to PMAX at run time
// and the output is tapped after 2*psel-1 stages.
//
// The original builds the array from alternating P/N static latches on the
// two clock phases; here each stage is one edge-triggered register.
// Its stages are also SRAM cells: in SRAM mode stage k is written through
// word line `wl[k]` and read on `cells[k]`.
// Interface: `en` shifts. `dout` is the tapped stage, valid one clock after
// the shift that loaded it.
module sla #(
  parameter int unsigned B    = 6,
  parameter int unsigned PMAX = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [2*PMAX-2:0]        wl,      // word lines of the stages
  input  logic                     we,
  input  logic [B-1:0]             wdata,
  output logic [B-1:0]             cells [2*PMAX-1],
  input  logic [$clog2(PMAX+1)-1:0] psel,   // selected displacement, 1..PMAX
  input  logic [B-1:0]             din,
  output logic [B-1:0]             dout
);

  localparam int unsigned L = 2 * PMAX - 1;

  logic [B-1:0] stage_q [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) stage_q[k] <= '0;
    end else if (we && wl != '0) begin
      for (int k = 0; k < L; k++) if (wl[k]) stage_q[k] <= wdata;
    end else if (en) begin
      stage_q[0] <= din;
      for (int k = 1; k < L; k++) stage_q[k] <= stage_q[k-1];
    end
  end

  assign cells = stage_q;

  // Tap after 2*psel-1 stages; out-of-range selections use the longest.
  always_comb begin
    dout = stage_q[L-1];
    for (int q = 1; q <= int'(PMAX); q++)
      if (int'(psel) == q) dout = stage_q[2*q-2];
  end

endmodule
