// sido_fir: single-input dual-output (SIDO) polyphase FIR of one branch of
// the twice-oversampled filter bank.
//
// Branch P (0..7) of the bank sees every 8th input sample. Because the
// bank decimates by 8 but has 16 polyphase components, one branch stream
// feeds two components: the "even" output (polyphase component P) uses the
// branch samples at delays 0, 2, 4 and the "odd" output (component P+8)
// uses delays 1, 3, 5. Each output therefore costs 3 taps:
//
//   ev[m] = sum_l h[P + 16 l]     * xp[m - 2 l]
//   od[m] = sum_l h[P + 8 + 16 l] * xp[m - 1 - 2 l]     l = 0..2
//
// Put differently, the branch's 8-fold polyphase filter h_p[i] = h[P + 8 i],
// i = 0..5, sits on a 6-deep delay line; taps with even i are summed into
// ev and taps with odd i into od.
// The split into even/odd taps of one branch follows the design
// description; the branch delay line itself is held outside this module
// (polyphase_sp), so that eight block-parallel bank instances can share
// it, and arrives here as the window win[d] = xp[m - d], d = 0..5.
// Each MAC sum (Q.15 because the taps are Q1.15) is rounded to nearest
// (half up) and shifted right by FIR_SHIFT, then saturated to FIR_W bits.
//
// Timing: one result pair per clock when in_valid is high; outputs are
// registered, latency 1 cycle. No reset on the data path; out_valid is
// cleared by rst_n.
module sido_fir
  import fb_pkg::*;
#(
  parameter int unsigned P     = 0,
  parameter proto_t      COEFS = PROTO
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  in_smp_t [WIN-1:0]    win,
  output logic                 out_valid,
  output fir_smp_t             ev,
  output fir_smp_t             od
);

  localparam int ACC_W = IN_W + COEF_W + $clog2(TAPS) + 1;
  localparam logic signed [FIR_W-1:0] FMAX = {1'b0, {(FIR_W-1){1'b1}}};
  localparam logic signed [FIR_W-1:0] FMIN = {1'b1, {(FIR_W-1){1'b0}}};

  function automatic logic signed [FIR_W-1:0] fir_scale(logic signed [ACC_W-1:0] a);
    logic signed [ACC_W:0] r;
    r = ((ACC_W+1)'(a) + (ACC_W+1)'(1 << (FIR_SHIFT - 1))) >>> FIR_SHIFT;
    if (r > (ACC_W+1)'(FMAX))      return FMAX;
    else if (r < (ACC_W+1)'(FMIN)) return FMIN;
    else                           return r[FIR_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] ev_re, ev_im, od_re, od_im;

  always_comb begin
    ev_re = '0; ev_im = '0; od_re = '0; od_im = '0;
    for (int l = 0; l < int'(TAPS); l++) begin
      ev_re += ACC_W'($signed(COEFS[P + M*l]) * win[2*l].re);
      ev_im += ACC_W'($signed(COEFS[P + M*l]) * win[2*l].im);
      od_re += ACC_W'($signed(COEFS[P + D + M*l]) * win[2*l+1].re);
      od_im += ACC_W'($signed(COEFS[P + D + M*l]) * win[2*l+1].im);
    end
  end

  always_ff @(posedge clk) begin
    ev.re <= fir_scale(ev_re);
    ev.im <= fir_scale(ev_im);
    od.re <= fir_scale(od_re);
    od.im <= fir_scale(od_im);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
