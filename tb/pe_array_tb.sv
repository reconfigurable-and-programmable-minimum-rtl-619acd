// pe_array_tb: checks the PE array with its shift latch array rows.
// SRAM: every stored word, search-data cell and SLA stage written through
// its word line reads back on the bit lines. ME: a random search area is streamed in raster order with random
// stalls, for p = 1 and p = 2; one enabled clock after the pel that
// completes a candidate window, every column sum must equal the column's
// sum of absolute differences for that displacement. VQ: with each column
// selected in turn, every row line must carry |x(row,col) - v|.
module pe_array_tb;
  localparam int N = 4, B = 6, PMAX = 2, SW = B + 2;
  localparam int WORDS = 2*N*N + (N-1)*(2*PMAX-1);
  logic clk = 0, rst_n = 0, clr = 0, we = 0, me_en = 0, cfg1 = 0;
  logic [WORDS-1:0] wl = '0;
  logic [B-1:0] wdata = '0, rdata, sin = '0, v_in = '0;
  logic [1:0] psel = 2'd2;
  logic [SW-1:0] col_sum [N];
  logic [N-1:0] vq_col = '0;
  logic [B-1:0] row_ad [N];

  pe_array #(.N(N), .B(B), .PMAX(PMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int ad(input int a, input int b); return a > b ? a - b : b - a; endfunction

  logic [B-1:0] x [N][N];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      // SRAM load and read back
      for (int w = 0; w < N*N; w++) begin
        x[w/N][w%N] = B'($urandom);
        wl = '0; wl[w] = 1; we = 1; wdata = x[w/N][w%N];
        @(negedge clk);
      end
      we = 0;
      for (int w = 0; w < N*N; w++) begin
        wl = '0; wl[w] = 1;
        #1 check(rdata == x[w/N][w%N], "bit-line read");
      end
      begin
        automatic logic [B-1:0] other [WORDS];
        @(negedge clk);
        for (int w = N*N; w < WORDS; w++) begin
          other[w] = B'($urandom);
          wl = '0; wl[w] = 1; we = 1; wdata = other[w];
          @(negedge clk);
        end
        we = 0;
        for (int w = N*N; w < WORDS; w++) begin
          wl = '0; wl[w] = 1;
          #1 check(rdata == other[w], $sformatf("search/SLA cell %0d read", w));
        end
        for (int w = 0; w < N*N; w++) begin
          wl = '0; wl[w] = 1;
          #1 check(rdata == x[w/N][w%N], "stored word unchanged");
        end
      end
      wl = '0;
      // ME
      begin
        automatic int p = 1 + it % 2, W = N + 2*p;
        automatic logic [B-1:0] sa [N+2*PMAX][N+2*PMAX];
        automatic int prev_r = -1, prev_c = -1;
        psel = 2'(p);
        clr = 1; @(negedge clk); clr = 0;
        for (int r = 0; r < W; r++) for (int c = 0; c < W; c++) sa[r][c] = B'($urandom);
        for (int k = 0; k <= W*W; k++) begin
          while ($urandom_range(0, 3) == 0) begin me_en = 0; @(negedge clk); end
          me_en = 1; sin = (k < W*W) ? sa[k / W][k % W] : '0;
          @(negedge clk);
          me_en = 0;
          // window completed by the previous pel
          if (prev_r >= N-1 && prev_c >= N-1) begin
            automatic int r0 = prev_r - (N-1), c0 = prev_c - (N-1);
            for (int c = 0; c < N; c++) begin
              automatic int s = 0;
              for (int i = 0; i < N; i++) s += ad(int'(x[i][c]), int'(sa[r0+i][c0+c]));
              check(int'(col_sum[c]) == s, $sformatf("p=%0d win(%0d,%0d) col %0d got %0d exp %0d", p, r0, c0, c, col_sum[c], s));
            end
          end
          prev_r = k / W; prev_c = k % W;
        end
      end
      // VQ
      cfg1 = 1;
      for (int c = 0; c < N; c++) begin
        vq_col = '0; vq_col[c] = 1; v_in = B'($urandom);
        #1;
        for (int r = 0; r < N; r++)
          check(int'(row_ad[r]) == ad(int'(x[r][c]), int'(v_in)), "VQ row line");
      end
      cfg1 = 0; #1;
      for (int r = 0; r < N; r++) check(row_ad[r] == '0, "row lines idle outside VQ");
      vq_col = '0;
      @(negedge clk);
    end
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
