// pe_tb: checks one processing element: storage write/hold, the one-clock
// ADC+SUM (ps_q = ps_in + |x - y|) with the shift of the search data,
// enable hold, the search-data cell written as SRAM, clear of the partial
// sum only, and the column-selected VQ absolute difference.
module pe_tb;
  localparam int B = 6, SW = 8;
  logic clk = 0, rst_n = 0, clr = 0, wl = 0, wl_y = 0, we = 0, me_en = 0, vq_sel = 0;
  logic [B-1:0] wdata = '0, x_q, y_in = '0, y_q, v_in = '0, ad_out;
  logic [SW-1:0] ps_in = '0, ps_q;

  pe #(.B(B), .SW(SW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int ad(input int a, input int b); return a > b ? a - b : b - a; endfunction

  initial begin
    int x, y, p, v, exp_ps, exp_y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      x = $urandom_range(0, 63);
      wl = 1; we = 1; wdata = B'(x);
      @(negedge clk);
      wl = 0; we = 1; wdata = B'($urandom);   // no word line: must hold
      @(negedge clk);
      we = 0;
      check(x_q == B'(x), "stored word");
      // ME step
      y = $urandom_range(0, 63); p = $urandom_range(0, 180);
      y_in = B'(y); ps_in = SW'(p); me_en = 1;
      @(negedge clk);
      check(y_q == B'(y), "search data shifted in");
      y_in = B'($urandom); ps_in = SW'(p);
      exp_ps = p + ad(x, y);
      exp_y  = int'(y_in);
      @(negedge clk);
      check(int'(ps_q) == exp_ps, $sformatf("ps %0d exp %0d", ps_q, exp_ps));
      check(int'(y_q) == exp_y, "second shift");
      me_en = 0; y_in = B'($urandom); ps_in = SW'($urandom);
      @(negedge clk);
      check(int'(ps_q) == exp_ps && int'(y_q) == exp_y, "hold without enable");
      // VQ
      v = $urandom_range(0, 63); v_in = B'(v); vq_sel = 1;
      #1 check(int'(ad_out) == ad(x, v), "VQ absolute difference");
      vq_sel = 0;
      #1 check(ad_out == '0, "VQ output gated when not selected");
      if (it % 10 == 0) begin
        clr = 1;
        @(negedge clk);
        clr = 0;
        check(ps_q == '0 && int'(y_q) == exp_y && x_q == B'(x), "clear empties only the partial sum");
        y = $urandom_range(0, 63);
        wl_y = 1; we = 1; wdata = B'(y);
        @(negedge clk);
        wl_y = 0; we = 0;
        check(int'(y_q) == y && x_q == B'(x), "search-data cell written as SRAM");
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
