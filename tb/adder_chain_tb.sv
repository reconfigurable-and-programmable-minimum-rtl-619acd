// adder_chain_tb: feeds random column sums with random stalls and checks
// that the chain output equals the sum of the N columns presented N enabled
// clocks earlier (latency N), and that clear empties the chain.
module adder_chain_tb;
  localparam int N = 4, SW = 8, DW = 10;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [SW-1:0] col_sum [N];
  logic [DW-1:0] sad;

  adder_chain #(.N(N), .SW(SW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int sums [$];

  initial begin
    foreach (col_sum[c]) col_sum[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic int s = 0;
      en = ($urandom_range(0, 4) != 0);
      foreach (col_sum[c]) begin
        col_sum[c] = SW'($urandom);
        s += int'(col_sum[c]);
      end
      if (en) sums.push_back(s);
      @(negedge clk);
      if (sums.size() >= N)
        check(int'(sad) == sums[sums.size() - N], $sformatf("t=%0d sad %0d exp %0d", t, sad, sums[sums.size() - N]));
    end
    clr = 1; @(negedge clk); clr = 0;
    check(sad == '0, "clear");
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
