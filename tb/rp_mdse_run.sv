// rp_mdse_run: test sequence for one size of the engine, used by
// rp_mdse_scaled_tb to run the larger configurations.
//
// With its own clock it loads a random reference block, runs motion
// estimations at p = PMAX and at a random smaller p (vector, distance and
// the (N+2p)^2 + N + 2 clock count checked against a direct computation),
// then loads a random N x N code-book and runs vector quantisations
// (winner and distance checked). Reports through `finished`, `checks` and
// `failures`.
module rp_mdse_run #(
  parameter int N    = 8,
  parameter int PMAX = 4
) (
  output bit finished,
  output int checks,
  output int failures
);
  import rp_mdse_pkg::*;

  localparam int B = 6;
  localparam int WORDS = 2*N*N + (N-1)*(2*PMAX-1);
  localparam int PW = $clog2(PMAX+1), AW = $clog2(WORDS), IW = $clog2(N);
  localparam int SW = B + $clog2(N), DW = B + $clog2(N*N), VW = PW + 1;

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

  rp_mdse #(.N(N), .B(B), .PMAX(PMAX)) dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d %s", N, what); end
  endtask

  logic [B-1:0] mem [N*N];

  task automatic load_words();
    for (int w = 0; w < N*N; w++) begin
      mem[w] = B'($urandom);
      req = 1; wr = 1; addr = AW'(w); din = mem[w];
      @(negedge clk);
    end
    req = 0; wr = 0;
  endtask

  task automatic run_me(input int p);
    int W = N + 2*p, best = -1, bm = 0, bn = 0, t0, cnt = 0;
    logic [B-1:0] sa [][];
    int pm = $urandom_range(0, 2*p), pn = $urandom_range(0, 2*p);
    sa = new[W];
    foreach (sa[r]) begin
      sa[r] = new[W];
      foreach (sa[r][c]) sa[r][c] = B'($urandom);
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) sa[pm+i][pn+j] = mem[i*N+j] ^ B'($urandom_range(0, 3));
    for (int m = 0; m <= 2*p; m++)
      for (int n = 0; n <= 2*p; n++) begin
        int s = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            int d = int'(mem[i*N+j]) - int'(sa[m+i][n+j]);
            s += (d < 0) ? -d : d;
          end
        if (best < 0 || s < best) begin best = s; bm = m - p; bn = n - p; end
      end
    cmd = CMD_ME; psel = PW'(p); start = 1;
    @(negedge clk);
    start = 0; cmd = CMD_SRAM;
    t0 = cyc;
    for (int r = 0; r < W; r++)
      for (int c = 0; c < W; c++) begin
        sin_valid = 1; sin = sa[r][c];
        @(negedge clk);
      end
    sin_valid = 0;
    while (!done && cnt < 1000) begin @(negedge clk); cnt++; end
    check(done && mv_m == VW'(bm) && mv_n == VW'(bn) && int'(min_sad) == best,
          $sformatf("ME p=%0d got (%0d,%0d) %0d exp (%0d,%0d) %0d", p, mv_m, mv_n, min_sad, bm, bn, best));
    check(cyc - t0 == W*W + N + 2, $sformatf("ME p=%0d clocks %0d exp %0d", p, cyc - t0, W*W + N + 2));
    @(negedge clk);
  endtask

  task automatic run_vq();
    logic [B-1:0] v [N];
    int best = -1, bk = 0, cnt = 0;
    foreach (v[j]) v[j] = B'($urandom);
    for (int k = 0; k < N; k++) begin
      int s = 0;
      for (int j = 0; j < N; j++) begin
        int d = int'(mem[k*N+j]) - int'(v[j]);
        s += (d < 0) ? -d : d;
      end
      if (best < 0 || s < best) begin best = s; bk = k; end
    end
    cmd = CMD_VQ; start = 1;
    @(negedge clk);
    start = 0; cmd = CMD_SRAM;
    for (int j = 0; j < N; j++) begin
      vin_valid = 1; vin = v[j];
      @(negedge clk);
    end
    vin_valid = 0;
    while (!found_valid && cnt < 100) begin @(negedge clk); cnt++; end
    check(found_valid && int'(found_addr) == bk && int'(found_dist) == best,
          $sformatf("VQ got %0d (%0d) exp %0d (%0d)", found_addr, found_dist, bk, best));
    @(negedge clk);
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cs = 1;
    @(negedge clk);
    load_words();
    run_me(PMAX);
    run_me(PMAX);
    run_me($urandom_range(1, PMAX));
    for (int k = 0; k < 4; k++) begin
      load_words();
      run_vq();
    end
    finished = 1;
  end
endmodule
