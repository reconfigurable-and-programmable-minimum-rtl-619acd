// sram_io_tb: random accesses against a small word array in the testbench
// standing for the bit lines; reads must return the addressed word one
// clock later with dout_valid, writes must drive the bit lines and the
// write enable only while accessed.
module sram_io_tb;
  localparam int B = 6;
  logic clk = 0, rst_n = 0, access = 0, wr = 0;
  logic [B-1:0] din = '0, bl_wdata, bl_rdata, dout;
  logic bl_we, dout_valid;
  logic [B-1:0] words [8];
  int sel = 0;

  sram_io #(.B(B)) dut (.*);
  always #5 clk = ~clk;
  assign bl_rdata = words[sel];
  always @(posedge clk) if (bl_we) words[sel] <= bl_wdata;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [B-1:0] model [8];

  initial begin
    foreach (words[k]) begin words[k] = B'(k); model[k] = B'(k); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      automatic int rd_addr = -1;
      access = ($urandom_range(0, 3) != 0);
      wr = $urandom_range(0, 1);
      sel = $urandom_range(0, 7);
      din = B'($urandom);
      #1 check(bl_we == (access && wr), "write enable");
      if (access && wr) model[sel] = din;
      if (access && !wr) rd_addr = sel;
      @(negedge clk);
      check(dout_valid == (rd_addr >= 0), "read valid");
      if (rd_addr >= 0) check(dout == model[rd_addr], $sformatf("read %0d got %0d exp %0d", rd_addr, dout, model[rd_addr]));
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
