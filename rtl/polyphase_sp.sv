// polyphase_sp: serial-to-parallel commutator and branch delay lines for
// PAR block-parallel filter bank instances.
//
// The input arrives as blocks of LANES = 8 * PAR consecutive complex
// samples per clock (lane i of block b holds x[LANES b + i]). A single
// filter bank at full rate would take 8 samples per step and deal them
// to its 8 branches: branch p gets x_p[m] = x[8 m + 7 - p] (the newest
// sample of each group of 8 goes to branch 0). Here PAR banks work side
// by side, bank j handling decimated time step m = PAR b + j, so each
// needs the branch windows x_p[m - d], d = 0..5, which reach back into
// earlier blocks. The module keeps the last HIST blocks (the z^-1 delays
// of the branch filters, shared by all banks) and routes every lane to
// the (bank, branch, delay) positions that need it. Routing is fixed
// wiring; only the history registers and the output register hold state.
//
// The commutator and delays follow the design description; sharing one
// history among block-parallel banks is how this design slows the banks
// down. clear zeroes the history (start of a burst), so a burst starts
// from silence.
//
// Timing: in_valid qualifies din; the history advances only on valid
// blocks. win and out_valid are registered: latency 1 cycle.
module polyphase_sp
  import fb_pkg::*;
#(
  parameter int unsigned PAR   = 8,
  parameter int unsigned LANES = PAR * D
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 clear,
  input  logic                                 in_valid,
  input  in_smp_t [LANES-1:0]                  din,
  output logic                                 out_valid,
  output in_smp_t [PAR-1:0][D-1:0][WIN-1:0]    win
);

  // Blocks of history needed: the oldest tap is WIN-1 steps before bank 0.
  localparam int HIST = (int'(WIN) - 2 + int'(PAR)) / int'(PAR);

  in_smp_t [HIST-1:0][LANES-1:0] hist;   // hist[0] = previous block
  in_smp_t [PAR-1:0][D-1:0][WIN-1:0] win_d;

  // Bank j, branch p, delay d needs x_p[PAR b + j - d]. With t = j - d,
  // W = floor(t / PAR) <= 0 blocks back, that is lane
  // 8 (t - W PAR) + 7 - p of the current block (W = 0) or of hist[-W-1].
  for (genvar j = 0; j < int'(PAR); j++) begin : g_bank
    for (genvar p = 0; p < int'(D); p++) begin : g_branch
      for (genvar d = 0; d < int'(WIN); d++) begin : g_delay
        localparam int T    = j - d;
        localparam int W    = (T >= 0) ? 0 : -((-T + int'(PAR) - 1) / int'(PAR));
        localparam int LANE = int'(D) * (T - W * int'(PAR)) + int'(D) - 1 - p;
        if (W == 0) begin : g_now
          assign win_d[j][p][d] = din[LANE];
        end else begin : g_old
          assign win_d[j][p][d] = hist[-W - 1][LANE];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (clear) hist <= '0;
      else if (in_valid) begin
        for (int h = HIST - 1; h > 0; h--) hist[h] <= hist[h-1];
        hist[0] <= din;
      end
    end
  end

  always_ff @(posedge clk) win <= win_d;

endmodule
