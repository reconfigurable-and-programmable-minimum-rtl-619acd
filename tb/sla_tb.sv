// sla_tb: checks that each programmable length (2p-1 stages for p = 1..PMAX)
// delays the stream by exactly that many enabled clocks, that a low enable
// holds the contents, and that every stage can be written and read as an
// SRAM word.
module sla_tb;
  localparam int B = 6, PMAX = 3;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [2*PMAX-2:0] wl = '0;
  logic [B-1:0] wdata = '0;
  logic [B-1:0] cells [2*PMAX-1];
  logic [1:0] psel = 2'd1;
  logic [B-1:0] din = '0, dout;

  sla #(.B(B), .PMAX(PMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [B-1:0] hist [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 1; p <= PMAX; p++) begin
      automatic int L = 2*p - 1;
      psel = 2'(p);
      // fill every stage through its word line, check it, then stream
      hist.delete();
      for (int k = 0; k < 2*PMAX-1; k++) begin
        wl = '0; wl[k] = 1; we = 1; wdata = B'($urandom);
        @(negedge clk);
        check(cells[k] == wdata, "SRAM write of a stage");
      end
      wl = '0; we = 0;
      for (int k = 2*PMAX-2; k >= 0; k--) hist.push_back(cells[k]);
      for (int t = 0; t < 60; t++) begin
        en = ($urandom_range(0, 3) != 0);
        din = B'($urandom);
        if (en) hist.push_back(din);
        @(negedge clk);
        check(dout == hist[hist.size() - L], $sformatf("p=%0d t=%0d out %0d exp %0d", p, t, dout, hist[hist.size() - L]));
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
