// dam_wtac_tb: random distance sets (many with ties) are evaluated; the
// registered winner must be the lowest index holding the minimum, with its
// distance, and found_valid must follow eval by one clock.
module dam_wtac_tb;
  localparam int N = 4, DW = 8;
  logic clk = 0, rst_n = 0, eval = 0;
  logic [DW-1:0] dists [N];
  logic [1:0] found_addr;
  logic [DW-1:0] found_dist;
  logic found_valid;

  dam_wtac #(.N(N), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (dists[k]) dists[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      automatic int bk = 0, bv;
      foreach (dists[k]) dists[k] = (it % 2) ? DW'($urandom_range(0, 3)) : DW'($urandom);
      bv = int'(dists[0]);
      for (int k = 1; k < N; k++) if (int'(dists[k]) < bv) begin bv = int'(dists[k]); bk = k; end
      eval = 1;
      @(negedge clk);
      eval = 0;
      foreach (dists[k]) dists[k] = DW'($urandom);   // must not disturb the result
      check(found_valid, "valid after eval");
      check(int'(found_addr) == bk && int'(found_dist) == bv,
            $sformatf("winner %0d (%0d) exp %0d (%0d)", found_addr, found_dist, bk, bv));
      @(negedge clk);
      check(!found_valid && int'(found_addr) == bk, "result held, valid is a pulse");
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
