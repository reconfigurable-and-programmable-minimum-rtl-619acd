// global_ctrl_tb: checks the mode machine (IDLE/SRAM/VQ/ME, chip select,
// start commands), the reset/cfg1/cfg2 lines of each mode, the VQ column
// sequence and winner-take-all strobe, and the ME scan: shift enables
// follow sin_valid, the distance-valid strobe marks exactly the (2p+1)^2
// candidate windows N+2 shifts after the pel that completes them, the
// flush adds N+2 shifts and done comes (N+2p)^2 + N + 2 clocks after the
// first pel when nothing stalls.
module global_ctrl_tb;
  import rp_mdse_pkg::*;
  localparam int N = 4, PMAX = 2, LAT = N + 2;
  logic clk = 0, rst_n = 0, cs = 0, start = 0, sin_valid = 0, vin_valid = 0;
  cmd_e cmd = CMD_SRAM;
  logic [1:0] psel = 2'd2, psel_q;
  mode_e mode; cfg_t cfg;
  logic busy, done, sram_en, me_en, mvc_clr, mvc_valid, acc_en, wta_eval;
  logic [N-1:0] vq_col;

  global_ctrl #(.N(N), .PMAX(PMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_start(input cmd_e c, input int p);
    @(negedge clk);
    cmd = c; start = 1; psel = 2'(p);
    #1 if (c == CMD_ME) check(mvc_clr == cs, "MVC cleared at ME start only when selected");
    @(negedge clk);
    start = 0; cmd = CMD_SRAM;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mode == MODE_IDLE && !sram_en, "idle");
    do_start(CMD_ME, 2);
    check(mode == MODE_IDLE, "start ignored while deselected");
    cs = 1; @(negedge clk);
    check(mode == MODE_SRAM && sram_en && cfg == CFG_SRAM, "SRAM mode, reset=1 cfg1=0 cfg2=0");

    // VQ
    for (int it = 0; it < 4; it++) begin
      automatic int col = 0, waited = 0;
      do_start(CMD_VQ, 0);
      check(mode == MODE_VQ && cfg == CFG_VQ && busy && !sram_en, "VQ mode, reset=0 cfg1=1 cfg2=0");
      while (col < N) begin
        vin_valid = (it == 0) || ($urandom_range(0, 2) != 0);
        #1;
        check(vq_col == N'(1 << col), $sformatf("column select %b exp col %0d", vq_col, col));
        check(acc_en == vin_valid && !wta_eval, "accumulate enable");
        @(negedge clk);
        if (vin_valid) col++;
      end
      vin_valid = 0;
      #1 check(wta_eval && vq_col == '0 && !acc_en, "WTA evaluation after N columns");
      @(negedge clk);
      check(mode == MODE_SRAM && done, "VQ done, back to SRAM");
    end

    // ME
    for (int it = 0; it < 6; it++) begin
      automatic int p = 1 + (it % 2), W = N + 2*p;
      automatic int k = 0, nen = 0, nvalid = 0, t = 0;
      automatic bit flags [$];
      do_start(CMD_ME, p);
      check(mode == MODE_ME && cfg == CFG_ME && psel_q == 2'(p), "ME mode, reset=0 cfg1=0 cfg2=1");
      while (!done && t < 1000) begin
        sin_valid = (it < 2) || ($urandom_range(0, 3) != 0);
        #1;
        if (k < W*W) check(me_en == sin_valid, "shift follows sin_valid");
        else         check(me_en, "flush shifts without input");
        if (me_en) begin
          if (k < W*W) flags.push_back((k / W >= N-1) && (k % W >= N-1));
          else         flags.push_back(1'b0);
          check(mvc_valid == ((nen >= LAT) ? flags[nen - LAT] : 1'b0), $sformatf("distance strobe at shift %0d", nen));
          if (mvc_valid) nvalid++;
          nen++;
          k++;
        end else begin
          check(!mvc_valid, "no strobe during a stall");
        end
        @(negedge clk);
        t++;
      end
      sin_valid = 0;
      check(done && mode == MODE_SRAM, "ME done, back to SRAM");
      check(nvalid == (2*p+1)*(2*p+1), $sformatf("candidates %0d exp %0d", nvalid, (2*p+1)*(2*p+1)));
      check(nen == W*W + LAT, $sformatf("shifts %0d exp %0d", nen, W*W + LAT));
      if (it < 2) check(t == W*W + LAT, $sformatf("ME clocks %0d exp %0d", t, W*W + LAT));
    end

    cs = 0; @(negedge clk);
    check(mode == MODE_IDLE, "deselect to idle");
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
