// addr_decoder_tb: exhaustive over address and enable, including addresses
// beyond the last word (WORDS = 12 in a 4-bit address space).
module addr_decoder_tb;
  localparam int WORDS = 12;
  logic en = 0;
  logic [3:0] addr = '0;
  logic [WORDS-1:0] wl;

  addr_decoder #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 16; a++) begin
        automatic logic [WORDS-1:0] exp_wl = '0;
        en = e[0]; addr = 4'(a);
        if (e == 1 && a < WORDS) exp_wl[a] = 1'b1;
        #1;
        checks++;
        if (wl !== exp_wl) begin
          failures++;
          $display("FAIL en=%0d addr=%0d wl=%b", e, a, wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
