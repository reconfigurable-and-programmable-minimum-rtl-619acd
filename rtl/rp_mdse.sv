// rp_mdse: reconfigurable and programmable minimum distance search engine.
//
// An N x N array of B-bit processing elements whose storage cells double as
// an SRAM. The same array is configured, by command, into one of three
// machines:
//   * SRAM : all cells of the array are read/written over the data bus:
//            words 0..N*N-1 are the PEs' stored words (reference block or
//            code-book, PE row r column c at r*N+c), then the N*N PE
//            search-data cells, then the (N-1)*(2*PMAX-1) SLA stages.
//            Read latency 1 clock.
//   * VQ   : full-search vector quantisation. Row k of the array holds
//            code-vector k (N components, one per column). The N components
//            of an input vector arrive one per `vin_valid` clock; for each,
//            one column computes |x - v| in all rows in parallel and the
//            row accumulators add. A winner-take-all stage then reports the
//            row (code-vector) of least L1 distance on `found_addr`,
//            N+1 clocks after the first component.
//   * ME   : full-search block motion estimation. The array holds the N x N
//            reference block; the (N+2p) x (N+2p) search area is streamed
//            in raster order, one pel per `sin_valid` clock, through the
//            systolic array and the programmable shift latch array. Column
//            partial sums feed the serial adder chain, whose distances for
//            all (2p+1)^2 displacements go to the motion vector calculator.
//            `mv_m`/`mv_n` (vertical/horizontal, -p..p) and `min_sad` are
//            valid with `done`, (N+2p)^2 + N + 2 clocks after the first pel
//            when no stalls occur. p (1..PMAX) is chosen by `psel` at start.
// Defaults are those of the fabricated prototype: 16 six-bit PEs as a 4 x 4
// array, a maximum displacement of 2 and a 4-word winner-take-all.
// Single-clock edge-triggered timing, the command interface and the
// handshakes are this design's own.
module rp_mdse
  import rp_mdse_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned B    = 6,
  parameter int unsigned PMAX = 2,
  localparam int unsigned PW  = $clog2(PMAX+1),
  localparam int unsigned WORDS = 2*N*N + (N-1)*(2*PMAX-1),
  localparam int unsigned AW  = $clog2(WORDS),
  localparam int unsigned IW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW  = B + $clog2(N),       // column sum / VQ distance
  localparam int unsigned DW  = B + $clog2(N*N),     // block distance
  localparam int unsigned VW  = PW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command signals
  input  logic                 cs,
  input  cmd_e                 cmd,
  input  logic                 start,
  input  logic [PW-1:0]        psel,
  output mode_e                mode,
  output cfg_t                 cfg,
  output logic                 busy,
  output logic                 done,
  // SRAM access (address bus / data bus)
  input  logic                 req,
  input  logic                 wr,
  input  logic [AW-1:0]        addr,
  input  logic [B-1:0]         din,
  output logic [B-1:0]         dout,
  output logic                 dout_valid,
  // VQ input vector / found address
  input  logic                 vin_valid,
  input  logic [B-1:0]         vin,
  output logic [IW-1:0]        found_addr,
  output logic [SW-1:0]        found_dist,
  output logic                 found_valid,
  // ME search area / found motion vector
  input  logic                 sin_valid,
  input  logic [B-1:0]         sin,
  output logic signed [VW-1:0] mv_m,
  output logic signed [VW-1:0] mv_n,
  output logic [DW-1:0]        min_sad,
  output logic                 mv_done
);

  logic          sram_en, me_en, mvc_clr, mvc_valid, acc_en, wta_eval;
  logic [PW-1:0] psel_q;
  logic [N-1:0]  vq_col;
  logic [WORDS-1:0] wl;
  logic [B-1:0]  bl_wdata, bl_rdata;
  logic          bl_we;
  logic [SW-1:0] col_sum [N];
  logic [B-1:0]  row_ad  [N];
  logic [SW-1:0] acc     [N];
  logic [DW-1:0] sad;
  logic          access;

  assign access = sram_en & req;

  global_ctrl #(.N(N), .PMAX(PMAX)) u_ctrl (
    .clk, .rst_n, .cs, .cmd, .start, .psel, .sin_valid, .vin_valid,
    .mode, .cfg, .busy, .done, .sram_en,
    .psel_q, .me_en, .mvc_clr, .mvc_valid,
    .vq_col, .acc_en, .wta_eval
  );

  addr_decoder #(.WORDS(WORDS)) u_dec (
    .en (access), .addr, .wl
  );

  sram_io #(.B(B)) u_io (
    .clk, .rst_n, .access, .wr, .din,
    .bl_wdata, .bl_we, .bl_rdata,
    .dout, .dout_valid
  );

  pe_array #(.N(N), .B(B), .PMAX(PMAX)) u_array (
    .clk, .rst_n,
    .clr    (cfg.reset),
    .wl, .we(bl_we), .wdata(bl_wdata), .rdata(bl_rdata),
    .me_en, .psel(psel_q), .sin, .col_sum,
    .cfg1   (cfg.cfg1), .vq_col, .v_in(vin), .row_ad
  );

  adder_chain #(.N(N), .SW(SW), .DW(DW)) u_chain (
    .clk, .rst_n, .clr(cfg.reset), .en(me_en), .col_sum, .sad
  );

  mvc #(.DW(DW), .PMAX(PMAX)) u_mvc (
    .clk, .rst_n, .clr(mvc_clr), .psel(psel_q),
    .valid(mvc_valid), .sad, .mv_m, .mv_n, .min_sad, .done(mv_done)
  );

  row_accumulators #(.N(N), .B(B)) u_acc (
    .clk, .rst_n, .clr(cfg.reset), .en(acc_en), .row_ad, .acc
  );

  dam_wtac #(.N(N), .DW(SW)) u_wta (
    .clk, .rst_n, .eval(wta_eval), .dists(acc),
    .found_addr, .found_dist, .found_valid
  );

endmodule
