// sram_io: data-bus side of the SRAM mode (sense amplifiers and I/O).
//
// Write: drives the data bus value onto the bit lines and asserts the write
// enable for the selected word. Read: samples the bit-line value of the
// selected word at the clock edge (the sense-amplifier latch) and holds it
// on `dout` with `dout_valid` for one clock. One access per clock, read
// latency one clock. The write path is a plain driver, so bl_wdata is din
// itself. The analog sense amplifiers are represented by this
// register; the protocol is this design's own.
module sram_io #(
  parameter int unsigned B = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         access,   // chip selected in SRAM mode, request valid
  input  logic         wr,       // 1 = write, 0 = read
  input  logic [B-1:0] din,      // from the data bus
  output logic [B-1:0] bl_wdata, // to the bit lines
  output logic         bl_we,
  input  logic [B-1:0] bl_rdata, // from the bit lines
  output logic [B-1:0] dout,
  output logic         dout_valid
);

  assign bl_wdata = din;
  assign bl_we    = access & wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= access & ~wr;
      if (access && !wr) dout <= bl_rdata;
    end
  end

endmodule
