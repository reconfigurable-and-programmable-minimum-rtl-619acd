// pe: one processing element (P-PE or N-PE) of the search array.
//
// A PE holds one B-bit word x in its storage cell (a reference-block pel in
// motion estimation, one component of a code-vector in vector quantisation)
// and merges the distance arithmetic with that storage:
//   * SRAM mode : the stored word is written when its word line `wl` and
//                 `we` are high, the search-data cell likewise through
//                 `wl_y`; `x_q` and `y_q` are read through the bit lines.
//   * ME mode   : each enabled clock the search-data stage takes `y_in` (from
//                 the neighbour on the right, or from a shift latch array)
//                 and the partial-sum register takes ps_in + |x - y|, i.e.
//                 absolute difference and summation in one clock, as the
//                 memory-merged logic of the design does.
//   * VQ mode   : when the PE's column is selected, `ad_out` carries
//                 |x - v_in| for the broadcast input component (zero
//                 otherwise), so a row can OR its PEs onto one line.
// `clr` (the internal reset line) clears the partial-sum register
// synchronously; the stored word and the search-data cell are kept, as they
// are SRAM cells.
//
// The design alternates P-type and N-type PEs in a checkerboard, the N-type
// ones working on the opposite clock phase with transparent latches. Here
// every PE is an edge-triggered register stage on one clock; the array adds
// the skew registers that the half-clock offsets provide in the original.
// Timing: `ps_q` and `y_q` change one enabled clock after their inputs;
// `ad_out` is combinational.
module pe #(
  parameter int unsigned B  = 6,          // word width
  parameter int unsigned SW = B + 2       // partial-sum width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,      // internal reset line
  // storage cell
  input  logic          wl,       // word line of the stored word
  input  logic          wl_y,     // word line of the search-data cell
  input  logic          we,
  input  logic [B-1:0]  wdata,
  output logic [B-1:0]  x_q,
  // motion estimation
  input  logic          me_en,    // shift / accumulate enable
  input  logic [B-1:0]  y_in,
  output logic [B-1:0]  y_q,
  input  logic [SW-1:0] ps_in,
  output logic [SW-1:0] ps_q,
  // vector quantisation
  input  logic          vq_sel,   // cfg1 AND column select
  input  logic [B-1:0]  v_in,
  output logic [B-1:0]  ad_out
);

  function automatic logic [B-1:0] absdiff(input logic [B-1:0] a, input logic [B-1:0] b);
    return (a >= b) ? a - b : b - a;
  endfunction

  logic [B-1:0] ad_me;
  assign ad_me  = absdiff(x_q, y_q);
  assign ad_out = vq_sel ? absdiff(x_q, v_in) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
    end else if (wl && we) begin
      x_q <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q <= '0;
    end else if (wl_y && we) begin
      y_q <= wdata;
    end else if (me_en) begin
      y_q <= y_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_q <= '0;
    end else if (clr) begin
      ps_q <= '0;
    end else if (me_en) begin
      ps_q <= ps_in + SW'(ad_me);
    end
  end

endmodule
