// rp_mdse_pkg: types shared by the minimum distance search engine.
//
// The engine is steered by external command signals that the global
// controller turns into three internal control lines, reset, cfg1 and cfg2.
// Their values per mode follow the mode diagram of the design:
//   SRAM  : reset=1 cfg1=0 cfg2=0
//   VQ    : reset=0 cfg1=1 cfg2=0
//   ME    : reset=0 cfg1=0 cfg2=1
// The idle (chip deselected) mode uses the SRAM values; that, and the
// 2-bit command encoding below, are this design's own choices.
package rp_mdse_pkg;

  // External command, sampled while the chip is selected.
  typedef enum logic [1:0] {
    CMD_SRAM = 2'd0,   // stay a plain SRAM (load or read reference data)
    CMD_VQ   = 2'd1,   // run one full-search vector quantisation
    CMD_ME   = 2'd2,   // run one full-search motion estimation
    CMD_NONE = 2'd3    // reserved, treated like CMD_SRAM
  } cmd_e;

  // Operating mode of the global controller.
  typedef enum logic [1:0] {
    MODE_IDLE = 2'd0,
    MODE_SRAM = 2'd1,
    MODE_VQ   = 2'd2,
    MODE_ME   = 2'd3
  } mode_e;

  // Internal configuration lines distributed to the array.
  typedef struct packed {
    logic reset;   // clears search data, partial sums, accumulators, MVC
    logic cfg1;    // VQ: enables the column-selected absolute difference
    logic cfg2;    // ME: enables the systolic shift and ADC+SUM
  } cfg_t;

  localparam cfg_t CFG_SRAM = '{reset: 1'b1, cfg1: 1'b0, cfg2: 1'b0};
  localparam cfg_t CFG_VQ   = '{reset: 1'b0, cfg1: 1'b1, cfg2: 1'b0};
  localparam cfg_t CFG_ME   = '{reset: 1'b0, cfg1: 1'b0, cfg2: 1'b1};

endpackage
