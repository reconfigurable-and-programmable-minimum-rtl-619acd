// me_frame_tb: motion estimation over a small picture at the default size
// (4 x 4 blocks, p = 2), the way a coder would use the engine.
//
// A 32 x 32 previous frame of random pels is generated; the current frame
// is the previous one moved by a known global displacement. For each of
// the 6 x 6 interior 4 x 4 blocks of the current frame the testbench writes
// the block into the array, starts a search and streams the 8 x 8 search
// area around the block from the previous frame. Every block must report
// the planted motion vector with distance 0. The clocks spent per block
// (load, start and search) are measured and must equal
// 16 + 1 + (N+2p)^2 + N + 2 + 1.
module me_frame_tb;
  import rp_mdse_pkg::*;

  localparam int N = 4, B = 6, PMAX = 2, P = 2;
  localparam int WORDS = 2*N*N + (N-1)*(2*PMAX-1);
  localparam int PW = $clog2(PMAX+1), AW = $clog2(WORDS), IW = $clog2(N);
  localparam int SW = B + $clog2(N), DW = B + $clog2(N*N), VW = PW + 1;
  localparam int FS = 32, W = N + 2*P;
  localparam int DM = 1, DN = -2;       // planted motion (vertical, horizontal)

  logic clk = 0, rst_n = 0;
  logic cs = 0, start = 0, req = 0, wr = 0, vin_valid = 0, sin_valid = 0;
  cmd_e cmd = CMD_SRAM;
  logic [PW-1:0] psel = '0;
  logic [AW-1:0] addr = '0;
  logic [B-1:0]  din = '0, vin = '0, sin = '0;
  mode_e mode; cfg_t cfg;
  logic busy, done, dout_valid, found_valid, mv_done;
  logic [B-1:0] dout;
  logic [IW-1:0] found_addr;
  logic [SW-1:0] found_dist;
  logic signed [VW-1:0] mv_m, mv_n;
  logic [DW-1:0] min_sad;

  rp_mdse dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, blocks = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [B-1:0] prev [FS][FS];
  logic [B-1:0] cur  [FS][FS];

  initial begin
    foreach (prev[y, x]) prev[y][x] = B'($urandom);
    foreach (cur[y, x]) begin
      automatic int sy = y + DM, sx = x + DN;
      cur[y][x] = (sy >= 0 && sy < FS && sx >= 0 && sx < FS) ? prev[sy][sx] : '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    cs = 1;
    @(negedge clk);
    for (int by = 4; by < FS - 4; by += N)
      for (int bx = 4; bx < FS - 4; bx += N) begin
        automatic int t0 = cyc, cnt = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            req = 1; wr = 1; addr = AW'(i*N + j); din = cur[by+i][bx+j];
            @(negedge clk);
          end
        req = 0; wr = 0;
        cmd = CMD_ME; psel = PW'(P); start = 1;
        @(negedge clk);
        start = 0; cmd = CMD_SRAM;
        for (int r = 0; r < W; r++)
          for (int c = 0; c < W; c++) begin
            sin_valid = 1; sin = prev[by - P + r][bx - P + c];
            @(negedge clk);
          end
        sin_valid = 0;
        while (!done && cnt < 100) begin @(negedge clk); cnt++; end
        check(done && mv_m == VW'(DM) && mv_n == VW'(DN) && min_sad == '0,
              $sformatf("block (%0d,%0d): vector (%0d,%0d) sad %0d", by, bx, mv_m, mv_n, min_sad));
        @(negedge clk);
        check(cyc - t0 == N*N + 1 + W*W + N + 2 + 1,
              $sformatf("clocks per block %0d exp %0d", cyc - t0, N*N + 1 + W*W + N + 2 + 1));
        blocks++;
      end
    check(blocks == 36, "all blocks searched");
    $display("blocks=%0d clocks per block=%0d", blocks, N*N + 1 + W*W + N + 2 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
