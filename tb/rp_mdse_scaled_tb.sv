// rp_mdse_scaled_tb: runs the engine in the two larger configurations
// estimated for H.26x motion estimation: 8 x 8 blocks with a maximum
// displacement of 4, and 16 x 16 blocks with a maximum displacement of 8
// (whose 16 x 16 array also holds a code-book of 16 code-vectors of 16
// dimensions for vector quantisation).
module rp_mdse_scaled_tb;
  bit fin8, fin16;
  int checks8, checks16, fails8, fails16;

  rp_mdse_run #(.N(8),  .PMAX(4)) u_n8  (.finished(fin8),  .checks(checks8),  .failures(fails8));
  rp_mdse_run #(.N(16), .PMAX(8)) u_n16 (.finished(fin16), .checks(checks16), .failures(fails16));

  initial begin
    wait (fin8 && fin16);
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16, fails8 + fails16);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16, fails8 + fails16 + 1);
    $finish;
  end
endmodule
