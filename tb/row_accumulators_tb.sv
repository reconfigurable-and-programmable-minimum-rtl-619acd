// row_accumulators_tb: random row inputs with random enables; each
// accumulator must hold the sum of its enabled inputs; clear empties all.
module row_accumulators_tb;
  localparam int N = 4, B = 6, AW = 8;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [B-1:0] row_ad [N];
  logic [AW-1:0] acc [N];

  row_accumulators #(.N(N), .B(B)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int model [N];

  initial begin
    foreach (row_ad[k]) row_ad[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      clr = 1; @(negedge clk); clr = 0;
      foreach (model[k]) model[k] = 0;
      for (int c = 0; c < N + 2; c++) begin
        en = ($urandom_range(0, 2) != 0) && (c < N);
        foreach (row_ad[k]) begin
          row_ad[k] = B'($urandom);
          if (en) model[k] += int'(row_ad[k]);
        end
        @(negedge clk);
        foreach (acc[k]) check(int'(acc[k]) == model[k], $sformatf("acc %0d got %0d exp %0d", k, acc[k], model[k]));
      end
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
