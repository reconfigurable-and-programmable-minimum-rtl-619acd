// rp_mdse_tb: end-to-end test of the search engine at its default size
// (4 x 4 six-bit PEs, maximum displacement 2).
//
// Sequence: select the chip (IDLE -> SRAM), write and read back all PE
// words, then run full-search motion estimations with p = 2 and p = 1 (one
// without stalls, with the cycle count checked against (N+2p)^2 + N + 2,
// others with random gaps in the search-area stream), then vector
// quantisations with a random code-book, and finally deselect the chip.
// Expected motion vectors, distances and winners come from a direct
// computation in the testbench. Each mechanism (SRAM write/read, each mode
// change, ME and VQ stalls, both SLA lengths) is counted and must occur.
module rp_mdse_tb;
  import rp_mdse_pkg::*;

  localparam int N = 4, B = 6, PMAX = 2;
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

  rp_mdse dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_wr = 0, n_rd = 0, n_to_sram = 0, n_to_idle = 0, n_to_vq = 0, n_to_me = 0;
  int n_me_stall = 0, n_vq_stall = 0, n_p1 = 0, n_p2 = 0;

  mode_e prev_mode = MODE_IDLE;
  always @(posedge clk) begin
    if (rst_n && mode != prev_mode) begin
      unique case (mode)
        MODE_SRAM: n_to_sram++;
        MODE_IDLE: n_to_idle++;
        MODE_VQ:   n_to_vq++;
        MODE_ME:   n_to_me++;
      endcase
    end
    prev_mode <= mode;
  end

  // The internal control lines must match the mode table at all times.
  always @(negedge clk) if (rst_n) begin
    cfg_t exp_cfg;
    unique case (mode)
      MODE_VQ: exp_cfg = '{1'b0, 1'b1, 1'b0};
      MODE_ME: exp_cfg = '{1'b0, 1'b0, 1'b1};
      default: exp_cfg = '{1'b1, 1'b0, 1'b0};
    endcase
    if (cfg !== exp_cfg) begin
      failures++;
      $display("FAIL cfg %b in mode %s", cfg, mode.name());
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [B-1:0] mem [N*N];

  task automatic sram_write(input int a, input logic [B-1:0] d);
    @(negedge clk);
    req = 1; wr = 1; addr = AW'(a); din = d;
    @(negedge clk);
    req = 0; wr = 0;
    n_wr++;
  endtask

  task automatic sram_read_check(input int a, input logic [B-1:0] d);
    @(negedge clk);
    req = 1; wr = 0; addr = AW'(a);
    @(negedge clk);
    req = 0;
    check(dout_valid && dout == d, $sformatf("SRAM read addr %0d got %0d exp %0d", a, dout, d));
    n_rd++;
  endtask

  task automatic load_words(input bit rand_fill);
    for (int w = 0; w < N*N; w++) begin
      if (rand_fill) mem[w] = B'($urandom);
      sram_write(w, mem[w]);
    end
  endtask

  // ---------------------------------------------------------------- ME
  task automatic run_me(input int p, input int stall_pct, input bit check_cycles);
    int W = N + 2*p;
    logic [B-1:0] sa [][];
    int best, bm, bn, s, t0, cnt;
    sa = new[W];
    foreach (sa[r]) begin
      sa[r] = new[W];
      foreach (sa[r][c]) sa[r][c] = B'($urandom);
    end
    // plant a noisy copy of the reference block at a random displacement
    begin
      automatic int pm = $urandom_range(0, 2*p), pn = $urandom_range(0, 2*p);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          sa[pm+i][pn+j] = mem[i*N+j] ^ B'($urandom_range(0, 1));
    end
    best = -1; bm = 0; bn = 0;
    for (int m = 0; m <= 2*p; m++)
      for (int n = 0; n <= 2*p; n++) begin
        s = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            automatic int d = int'(mem[i*N+j]) - int'(sa[m+i][n+j]);
            s += (d < 0) ? -d : d;
          end
        if (best < 0 || s < best) begin best = s; bm = m - p; bn = n - p; end
      end
    @(negedge clk);
    cmd = CMD_ME; psel = PW'(p); start = 1;
    @(negedge clk);
    start = 0; cmd = CMD_SRAM;
    check(mode == MODE_ME && busy, "ME mode entered");
    if (p == 1) n_p1++; else n_p2++;
    t0 = cyc;
    for (int r = 0; r < W; r++)
      for (int c = 0; c < W; c++) begin
        while (stall_pct > 0 && $urandom_range(0, 99) < stall_pct) begin
          sin_valid = 0;
          @(negedge clk);
          n_me_stall++;
        end
        sin_valid = 1; sin = sa[r][c];
        @(negedge clk);
      end
    sin_valid = 0;
    cnt = 0;
    while (!done && cnt < 1000) begin @(negedge clk); cnt++; end
    check(done && mv_done, "ME done");
    check(mv_m == VW'(bm) && mv_n == VW'(bn),
          $sformatf("ME p=%0d vector (%0d,%0d) exp (%0d,%0d)", p, mv_m, mv_n, bm, bn));
    check(int'(min_sad) == best, $sformatf("ME p=%0d min SAD %0d exp %0d", p, min_sad, best));
    if (check_cycles)
      check(cyc - t0 == W*W + N + 2,
            $sformatf("ME p=%0d cycles %0d exp %0d", p, cyc - t0, W*W + N + 2));
    @(negedge clk);
    check(mode == MODE_SRAM, "back to SRAM after ME");
  endtask

  // ---------------------------------------------------------------- VQ
  task automatic run_vq(input int stall_pct);
    logic [B-1:0] v [N];
    int best, bk, s, t0, cnt;
    foreach (v[j]) v[j] = B'($urandom);
    best = -1; bk = 0;
    for (int k = 0; k < N; k++) begin
      s = 0;
      for (int j = 0; j < N; j++) begin
        automatic int d = int'(mem[k*N+j]) - int'(v[j]);
        s += (d < 0) ? -d : d;
      end
      if (best < 0 || s < best) begin best = s; bk = k; end
    end
    @(negedge clk);
    cmd = CMD_VQ; start = 1;
    @(negedge clk);
    start = 0; cmd = CMD_SRAM;
    check(mode == MODE_VQ && busy, "VQ mode entered");
    t0 = cyc;
    for (int j = 0; j < N; j++) begin
      while (stall_pct > 0 && $urandom_range(0, 99) < stall_pct) begin
        vin_valid = 0;
        @(negedge clk);
        n_vq_stall++;
      end
      vin_valid = 1; vin = v[j];
      @(negedge clk);
    end
    vin_valid = 0;
    cnt = 0;
    while (!found_valid && cnt < 100) begin @(negedge clk); cnt++; end
    check(found_valid && done, "VQ done");
    check(int'(found_addr) == bk && int'(found_dist) == best,
          $sformatf("VQ winner %0d (%0d) exp %0d (%0d)", found_addr, found_dist, bk, best));
    if (stall_pct == 0)
      check(cyc - t0 == N + 1, $sformatf("VQ cycles %0d exp %0d", cyc - t0, N + 1));
    @(negedge clk);
    check(mode == MODE_SRAM, "back to SRAM after VQ");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mode == MODE_IDLE, "idle after reset");
    cs = 1;
    @(negedge clk);
    check(mode == MODE_SRAM, "SRAM after chip select");

    // search-data and SLA cells are SRAM words too
    begin
      automatic logic [B-1:0] other [WORDS];
      for (int w = N*N; w < WORDS; w++) begin
        other[w] = B'($urandom);
        sram_write(w, other[w]);
      end
      for (int w = N*N; w < WORDS; w++) sram_read_check(w, other[w]);
    end
    load_words(1);
    for (int w = 0; w < N*N; w++) sram_read_check(w, mem[w]);

    run_me(2, 0, 1);
    run_me(1, 0, 1);
    for (int k = 0; k < 6; k++) run_me($urandom_range(1, 2), 30, 0);

    for (int k = 0; k < 3; k++) begin
      load_words(1);
      run_vq(0);
      run_vq(40);
    end
    // stored words survive the searches
    for (int w = 0; w < N*N; w++) sram_read_check(w, mem[w]);

    cs = 0;
    @(negedge clk);
    @(negedge clk);
    check(mode == MODE_IDLE, "idle after chip deselect");

    check(n_wr > 0, "SRAM writes happened");
    check(n_rd > 0, "SRAM reads happened");
    check(n_to_sram > 0 && n_to_idle > 0 && n_to_vq > 0 && n_to_me > 0, "all mode changes happened");
    check(n_me_stall > 0, "ME stalls happened");
    check(n_vq_stall > 0, "VQ stalls happened");
    check(n_p1 > 0 && n_p2 > 0, "both SLA lengths used");
    $display("mechanisms: wr=%0d rd=%0d ->SRAM=%0d ->IDLE=%0d ->VQ=%0d ->ME=%0d me_stall=%0d vq_stall=%0d p1=%0d p2=%0d",
             n_wr, n_rd, n_to_sram, n_to_idle, n_to_vq, n_to_me, n_me_stall, n_vq_stall, n_p1, n_p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
