// addr_decoder: word-line decoder of the SRAM mode.
//
// Turns a binary word address into one-hot word lines for the words of the
// PE array and shift latch array. All lines stay low when
// `en` is low or the address is beyond the last word. Combinational.
module addr_decoder #(
  parameter int unsigned WORDS = 41,   // 2*4*4 PE cells + 3*3 SLA cells
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [WORDS-1:0] wl
);

  always_comb begin
    wl = '0;
    for (int w = 0; w < int'(WORDS); w++)
      if (en && int'(addr) == w) wl[w] = 1'b1;
  end

endmodule
