// fb_core: filter bank core of one polarization, built from PAR
// block-parallel slowed-down filter bank instances.
//
// A single filter bank would have to run at the decimated rate of
// 26.6 GS/s / 8 = 3.33 GHz, which an FPGA cannot reach. The core instead
// takes LANES = 8 * PAR input samples per clock and runs PAR identical
// banks side by side, bank j producing decimated time step PAR b + j of
// block b. With the default PAR = 8 each clock carries 64 input samples
// and 8 x 16 sub-band samples, so a 416 MHz clock sustains 26.6 GS/s.
// The number of instances and the clock follow the design description
// (its chosen option of eight instances); the shared commutator history
// in polyphase_sp is this design's way of feeding them.
//
// Interface: din lane i = x[LANES b + i]; v[j][k] = sub-band k at
// decimated time PAR b + j. sat pulses with out_valid when any output
// sample of that clock was clipped. clear empties the delay lines.
// Timing: one block per clock, latency 6 cycles from in_valid to
// out_valid.
module fb_core
  import fb_pkg::*;
#(
  parameter int unsigned PAR   = 8,
  parameter int unsigned LANES = PAR * D,
  parameter proto_t      COEFS = PROTO
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          in_valid,
  input  in_smp_t [LANES-1:0]           din,
  output logic                          out_valid,
  output out_smp_t [PAR-1:0][M-1:0]     v,
  output logic                          sat
);

  in_smp_t [PAR-1:0][D-1:0][WIN-1:0] win;
  logic                              win_valid;
  logic [PAR-1:0]                    inst_valid, inst_sat;

  polyphase_sp #(.PAR(PAR), .LANES(LANES)) u_sp (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .in_valid  (in_valid),
    .din       (din),
    .out_valid (win_valid),
    .win       (win)
  );

  for (genvar j = 0; j < int'(PAR); j++) begin : g_bank
    fb_instance #(.COEFS(COEFS)) u_fb (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (win_valid),
      .win       (win[j]),
      .out_valid (inst_valid[j]),
      .v         (v[j]),
      .sat       (inst_sat[j])
    );
  end

  // All instances run in lock step; instance 0's valid stands for all.
  assign out_valid = inst_valid[0];
  assign sat       = |inst_sat;

endmodule
