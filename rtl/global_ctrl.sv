// global_ctrl: global control logic of the search engine.
//
// Mode machine (modes and the reset/cfg1/cfg2 values follow the design's
// mode diagram; the command interface is this design's own):
//   IDLE --cs--> SRAM --!cs--> IDLE
//   SRAM --start & cmd=VQ--> VQ --(search finished)--> SRAM
//   SRAM --start & cmd=ME--> ME --(search finished)--> SRAM
// In SRAM mode the internal reset line is high, clearing the partial sums,
// adder chain and accumulators between searches.
//
// VQ sequencing: each clock with `vin_valid` takes one input component;
// the column counter selects PE column 0, 1, .. N-1 in turn and the row
// accumulators add. After the N-th component, one clock asserts `wta_eval`
// and the machine returns to SRAM. Latency: N input clocks + 1.
//
// ME sequencing: the displacement p is latched from `psel` at start; the
// search area is W x W pels, W = N+2p, streamed in raster order. Each clock
// with `sin_valid` is one shift of the array (`me_en`); without it the
// whole datapath stalls. A pel that completes a candidate window (line and
// column index both >= N-1) sets a valid bit that travels N+2 enabled
// clocks along with the data (2 through the PEs, N through the adder
// chain) and marks the distance for the MVC. After the last pel the array
// is flushed with N+2 extra shifts. Without stalls a search takes
// (N+2p)^2 + N + 2 clocks from the first pel.
module global_ctrl
  import rp_mdse_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned PMAX = 2,
  localparam int unsigned PW  = $clog2(PMAX+1),
  localparam int unsigned CW  = $clog2(N + 2*PMAX + 1),
  localparam int unsigned IW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // external commands
  input  logic          cs,
  input  cmd_e          cmd,
  input  logic          start,
  input  logic [PW-1:0] psel,
  input  logic          sin_valid,
  input  logic          vin_valid,
  // status
  output mode_e         mode,
  output cfg_t          cfg,
  output logic          busy,
  output logic          done,       // one-clock pulse at the end of a search
  output logic          sram_en,    // SRAM accesses allowed
  // ME control
  output logic [PW-1:0] psel_q,
  output logic          me_en,
  output logic          mvc_clr,
  output logic          mvc_valid,
  // VQ control
  output logic [N-1:0]  vq_col,
  output logic          acc_en,
  output logic          wta_eval
);

  localparam int unsigned LAT = N + 2;   // pel in -> distance out

  mode_e        mode_q;
  logic [CW-1:0] r_cnt, c_cnt;           // raster position of the next pel
  logic [CW-1:0] w_len;                  // W = N + 2p
  logic          flushing;
  logic [$clog2(LAT+1)-1:0] flush_cnt;
  logic [LAT-1:0] vld_q;
  logic [$clog2(N+1)-1:0] col_cnt;
  logic          vq_eval_q;
  logic          win_valid, last_pel, flush_end;

  assign mode    = mode_q;
  assign busy    = (mode_q == MODE_VQ) || (mode_q == MODE_ME);
  assign sram_en = (mode_q == MODE_SRAM) && cs;
  assign w_len   = CW'(N) + CW'({psel_q, 1'b0});

  always_comb begin
    unique case (mode_q)
      MODE_VQ: cfg = CFG_VQ;
      MODE_ME: cfg = CFG_ME;
      default: cfg = CFG_SRAM;
    endcase
  end

  // ---------------- ME datapath control
  assign me_en     = (mode_q == MODE_ME) && (flushing || sin_valid);
  assign win_valid = !flushing && (r_cnt >= CW'(N-1)) && (c_cnt >= CW'(N-1));
  assign last_pel  = (r_cnt == w_len - 1'b1) && (c_cnt == w_len - 1'b1);
  assign flush_end = flushing && (int'(flush_cnt) == LAT - 1);
  assign mvc_valid = me_en && vld_q[LAT-1];
  assign mvc_clr   = (mode_q == MODE_SRAM) && cs && start && (cmd == CMD_ME);

  // ---------------- VQ control
  always_comb begin
    vq_col = '0;
    if (mode_q == MODE_VQ && !vq_eval_q) vq_col[IW'(col_cnt)] = 1'b1;
  end
  assign acc_en   = (mode_q == MODE_VQ) && !vq_eval_q && vin_valid;
  assign wta_eval = (mode_q == MODE_VQ) && vq_eval_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= MODE_IDLE;
      psel_q    <= PW'(PMAX);
      r_cnt     <= '0;
      c_cnt     <= '0;
      flushing  <= 1'b0;
      flush_cnt <= '0;
      vld_q     <= '0;
      col_cnt   <= '0;
      vq_eval_q <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (mode_q)
        MODE_IDLE: if (cs) mode_q <= MODE_SRAM;
        MODE_SRAM: begin
          r_cnt <= '0; c_cnt <= '0; flushing <= 1'b0; flush_cnt <= '0;
          vld_q <= '0; col_cnt <= '0; vq_eval_q <= 1'b0;
          if (!cs) begin
            mode_q <= MODE_IDLE;
          end else if (start && cmd == CMD_VQ) begin
            mode_q <= MODE_VQ;
          end else if (start && cmd == CMD_ME) begin
            mode_q <= MODE_ME;
            psel_q <= (psel == '0 || int'(psel) > int'(PMAX)) ? PW'(PMAX) : psel;
          end
        end
        MODE_VQ: begin
          if (vq_eval_q) begin
            mode_q <= MODE_SRAM;
            done   <= 1'b1;
          end else if (vin_valid) begin
            if (int'(col_cnt) == N - 1) vq_eval_q <= 1'b1;
            else                        col_cnt   <= col_cnt + 1'b1;
          end
        end
        MODE_ME: begin
          if (me_en) begin
            vld_q <= {vld_q[LAT-2:0], win_valid};
            if (flushing) begin
              flush_cnt <= flush_cnt + 1'b1;
              if (flush_end) begin
                mode_q <= MODE_SRAM;
                done   <= 1'b1;
              end
            end else if (last_pel) begin
              flushing <= 1'b1;
            end else if (c_cnt == w_len - 1'b1) begin
              c_cnt <= '0;
              r_cnt <= r_cnt + 1'b1;
            end else begin
              c_cnt <= c_cnt + 1'b1;
            end
          end
        end
        default: mode_q <= MODE_IDLE;
      endcase
    end
  end

endmodule
