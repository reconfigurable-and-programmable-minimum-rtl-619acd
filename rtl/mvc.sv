// mvc: motion vector calculator.
//
// Receives the block distances of one search serially, one per `valid`
// clock, in raster order of the candidate displacement: m (vertical) from
// -p to +p, and for each m, n (horizontal) from -p to +p. It counts the
// candidates itself, keeps the smallest distance seen and the displacement
// that produced it, and raises `done` after the (2p+1)^2-th candidate.
// A later candidate replaces the stored one only if strictly smaller, so
// ties go to the first in raster order (a choice of this design).
// `clr` starts a new search. Outputs are registered and hold until `clr`.
module mvc #(
  parameter int unsigned DW   = 10,
  parameter int unsigned PMAX = 2,
  localparam int unsigned PW  = $clog2(PMAX+1),
  localparam int unsigned VW  = $clog2(PMAX+1) + 1   // signed vector width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic [PW-1:0]        psel,
  input  logic                 valid,
  input  logic [DW-1:0]        sad,
  output logic signed [VW-1:0] mv_m,
  output logic signed [VW-1:0] mv_n,
  output logic [DW-1:0]        min_sad,
  output logic                 done
);

  logic [PW:0] m_cnt, n_cnt;      // 0 .. 2p
  logic [PW:0] span;              // 2p
  logic        first;
  logic        last;

  assign span = {psel, 1'b0};
  assign last = (m_cnt == span) && (n_cnt == span);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_cnt <= '0; n_cnt <= '0; first <= 1'b1; done <= 1'b0;
      mv_m <= '0; mv_n <= '0; min_sad <= '0;
    end else if (clr) begin
      m_cnt <= '0; n_cnt <= '0; first <= 1'b1; done <= 1'b0;
      mv_m <= '0; mv_n <= '0; min_sad <= '0;
    end else if (valid && !done) begin
      if (first || sad < min_sad) begin
        min_sad <= sad;
        mv_m    <= VW'(signed'({1'b0, m_cnt}) - signed'({2'b0, psel}));
        mv_n    <= VW'(signed'({1'b0, n_cnt}) - signed'({2'b0, psel}));
      end
      first <= 1'b0;
      if (last) begin
        done <= 1'b1;
      end else if (n_cnt == span) begin
        n_cnt <= '0;
        m_cnt <= m_cnt + 1'b1;
      end else begin
        n_cnt <= n_cnt + 1'b1;
      end
    end
  end

endmodule
