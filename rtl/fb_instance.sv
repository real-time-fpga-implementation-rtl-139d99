// fb_instance: one twice-oversampled 16-channel analysis filter bank.
//
// Eight SIDO polyphase filters (one per commutator branch) produce the 16
// polyphase components u[0..15]: branch p's even output is u[p] and its
// odd output is u[p+8]. A 16-point DFT then turns the components into the
// 16 sub-band samples v[k], k = 0..15, one decimated time step per clock:
//
//   u[q][m] = sum_{l=0..2} h[q + 16 l] * x[8 m + 7 - q - 16 l]
//   v[k][m] = sum_{q=0..15} u[q][m] * exp(-j 2 pi k q / 16)
//
// This structure (M/2 = 8 SIDO filters instead of 16 single-output ones,
// followed by a 16-point DFT) is the one of the design description. The
// final rounding (half up) of v by OUT_SHIFT bits and saturation to the
// 10-bit output, and the sat flag that reports a clipped sample, are this
// design's choices.
//
// Interface: win[p][d] is branch p's delay line, x_p[m - d]. Timing: one
// vector per clock, latency 5 cycles (1 SIDO + 3 DFT + 1 output register).
module fb_instance
  import fb_pkg::*;
#(
  parameter proto_t COEFS = PROTO
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  in_smp_t [D-1:0][WIN-1:0]    win,
  output logic                        out_valid,
  output out_smp_t [M-1:0]            v,
  output logic                        sat
);

  localparam logic signed [OUT_W-1:0] OMAX = {1'b0, {(OUT_W-1){1'b1}}};
  localparam logic signed [OUT_W-1:0] OMIN = {1'b1, {(OUT_W-1){1'b0}}};

  fir_smp_t [M-1:0] u;
  logic [D-1:0]     fir_valid;
  dft_smp_t [M-1:0] y;
  logic             dft_valid;

  for (genvar p = 0; p < int'(D); p++) begin : g_sido
    sido_fir #(.P(p), .COEFS(COEFS)) u_sido (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .win       (win[p]),
      .out_valid (fir_valid[p]),
      .ev        (u[p]),
      .od        (u[p + D])
    );
  end

  dft16 u_dft (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fir_valid[0]),
    .x         (u),
    .out_valid (dft_valid),
    .y         (y)
  );

  // Round half up, then saturate; flags whether it clipped.
  function automatic logic [OUT_W:0] out_scale(logic signed [DFT_W-1:0] a);
    logic signed [DFT_W:0] r;
    r = ((DFT_W+1)'(a) + (DFT_W+1)'(1 << (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (r > (DFT_W+1)'(OMAX))      return {1'b1, OMAX};
    else if (r < (DFT_W+1)'(OMIN)) return {1'b1, OMIN};
    else                           return {1'b0, r[OUT_W-1:0]};
  endfunction

  out_smp_t [M-1:0]   v_d;
  logic [2*M-1:0]     clip;

  for (genvar k = 0; k < int'(M); k++) begin : g_scale
    wire logic [OUT_W:0] sr = out_scale(y[k].re);
    wire logic [OUT_W:0] si = out_scale(y[k].im);
    assign v_d[k].re     = sr[OUT_W-1:0];
    assign v_d[k].im     = si[OUT_W-1:0];
    assign clip[2*k]     = sr[OUT_W];
    assign clip[2*k + 1] = si[OUT_W];
  end

  always_ff @(posedge clk) begin
    v   <= v_d;
    sat <= (|clip) & dft_valid;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= dft_valid;

endmodule
