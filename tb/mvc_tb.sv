// mvc_tb: streams (2p+1)^2 random distances with gaps for p = 1 and 2 and
// checks the minimum, its displacement (first minimum in raster order wins)
// and that done rises exactly after the last candidate.
module mvc_tb;
  localparam int DW = 10, PMAX = 2;
  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  logic [1:0] psel = 2'd2;
  logic [DW-1:0] sad = '0, min_sad;
  logic signed [2:0] mv_m, mv_n;
  logic done;

  mvc #(.DW(DW), .PMAX(PMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      automatic int p = 1 + it % 2, K = (2*p+1)*(2*p+1), best = -1, bm = 0, bn = 0;
      psel = 2'(p);
      clr = 1; @(negedge clk); clr = 0;
      for (int k = 0; k < K; k++) begin
        automatic int s = (it % 3 == 0) ? $urandom_range(0, 7) : $urandom_range(0, 1023);
        while ($urandom_range(0, 2) == 0) begin valid = 0; @(negedge clk); end
        valid = 1; sad = DW'(s);
        if (best < 0 || s < best) begin best = s; bm = k / (2*p+1) - p; bn = k % (2*p+1) - p; end
        @(negedge clk);
        check(done == (k == K - 1), "done timing");
      end
      valid = 1; sad = '0;   // extra input after done must be ignored
      @(negedge clk);
      valid = 0;
      check(int'(min_sad) == best && int'(mv_m) == bm && int'(mv_n) == bn,
            $sformatf("p=%0d got %0d (%0d,%0d) exp %0d (%0d,%0d)", p, min_sad, mv_m, mv_n, best, bm, bn));
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
