// pe_array: the N x N array of processing elements with its shift latch
// array rows.
//
// PE(r,c) sits in row r (0 = top) and column c (0 = left). In motion
// estimation PE(r,c) holds reference pel x(r+1,c+1). All storage of the
// array is SRAM-addressable (WORDS = 2*N*N + (N-1)*(2*PMAX-1) words):
//   word r*N+c                    stored word (reference pel / code-vector
//                                 component) of PE(r,c)
//   word N*N + r*N+c              search-data cell of PE(r,c)
//   word 2*N*N + r*(2*PMAX-1)+k   stage k of the SLA row feeding PE row r
//
// Search-data path (ME): the search area is streamed in line by line, left
// to right, one pel per enabled clock, into the bottom-right PE. Within a
// row the data move one PE to the left per clock; from the left end of a
// row they pass through an SLA row of 2p-1 stages into the right end of the
// row above. The row-to-row path is therefore N+2p-1 stages: one pel less
// than a search-area line, so each row sees its pel one clock before the
// row below it. That one-clock skew lets the partial sums run down each
// column through the PE registers: the value leaving the bottom of column
// c, col_sum[c], is sum_r |x(r,c) - y(r+m, c+n)| for a single candidate
// displacement, and all N columns refer to the same displacement in the
// same clock.
//
// VQ path: `vq_col` selects one column; each row ORs its PEs' gated
// absolute differences onto its row line `row_ad`, which feeds that row's
// accumulator.
//
// Bit lines: `rdata` is the OR of all cells gated by their word lines (at
// most one is high); `wdata` is broadcast.
//
// The wiring follows the array and SLA figure of the design; the register
// level timing (one-clock row skew instead of half-clock phase offsets) is
// this design's own.
module pe_array #(
  parameter int unsigned N    = 4,
  parameter int unsigned B    = 6,
  parameter int unsigned PMAX = 2,
  localparam int unsigned SW  = B + $clog2(N),
  localparam int unsigned PW  = $clog2(PMAX+1),
  localparam int unsigned L   = 2 * PMAX - 1,
  localparam int unsigned WORDS = 2 * N * N + (N - 1) * L
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  // bit lines and word lines
  input  logic [WORDS-1:0]      wl,
  input  logic                  we,
  input  logic [B-1:0]          wdata,
  output logic [B-1:0]          rdata,
  // motion estimation
  input  logic                  me_en,
  input  logic [PW-1:0]         psel,
  input  logic [B-1:0]          sin,
  output logic [SW-1:0]         col_sum [N],
  // vector quantisation
  input  logic                  cfg1,
  input  logic [N-1:0]          vq_col,
  input  logic [B-1:0]          v_in,
  output logic [B-1:0]          row_ad [N]
);

  logic [B-1:0]  x_q   [N][N];
  logic [B-1:0]  y_q   [N][N];
  logic [B-1:0]  y_in  [N][N];
  logic [SW-1:0] ps_q  [N][N];
  logic [SW-1:0] ps_in [N][N];
  logic [B-1:0]  ad    [N][N];
  logic [B-1:0]  row_in[N];     // data entering the right end of each row
  logic [B-1:0]  sla_cells [N][L];

  assign row_in[N-1] = sin;

  for (genvar r = 0; r < N; r++) begin : g_row
    if (r < N - 1) begin : g_sla
      sla #(.B(B), .PMAX(PMAX)) u_sla (
        .clk, .rst_n,
        .en   (me_en),
        .wl   (wl[2*N*N + r*L +: L]),
        .we,
        .wdata,
        .cells(sla_cells[r]),
        .psel,
        .din  (y_q[r+1][0]),
        .dout (row_in[r])
      );
    end else begin : g_no_sla
      for (genvar k = 0; k < L; k++) begin : g_zero
        assign sla_cells[r][k] = '0;
      end
    end
    for (genvar c = 0; c < N; c++) begin : g_col
      assign y_in[r][c]  = (c == N - 1) ? row_in[r] : y_q[r][c+1];
      assign ps_in[r][c] = (r == 0) ? '0 : ps_q[r-1][c];
      pe #(.B(B), .SW(SW)) u_pe (
        .clk, .rst_n, .clr,
        .wl     (wl[r*N+c]),
        .wl_y   (wl[N*N + r*N+c]),
        .we,
        .wdata,
        .x_q    (x_q[r][c]),
        .me_en,
        .y_in   (y_in[r][c]),
        .y_q    (y_q[r][c]),
        .ps_in  (ps_in[r][c]),
        .ps_q   (ps_q[r][c]),
        .vq_sel (cfg1 & vq_col[c]),
        .v_in,
        .ad_out (ad[r][c])
      );
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_colsum
    assign col_sum[c] = ps_q[N-1][c];
  end

  always_comb begin
    for (int r = 0; r < N; r++) begin
      row_ad[r] = '0;
      for (int c = 0; c < N; c++) row_ad[r] |= ad[r][c];
    end
  end

  always_comb begin
    rdata = '0;
    for (int w = 0; w < N * N; w++) begin
      if (wl[w])       rdata |= x_q[w / N][w % N];
      if (wl[N*N + w]) rdata |= y_q[w / N][w % N];
    end
    for (int r = 0; r < N - 1; r++)
      for (int k = 0; k < L; k++)
        if (wl[2*N*N + r*L + k]) rdata |= sla_cells[r][k];
  end

endmodule
