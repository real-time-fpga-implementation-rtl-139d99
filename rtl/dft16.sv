// dft16: pipelined 16-point DFT across the 16 polyphase filter outputs.
//
//   X[k] = sum_{n=0..15} x[n] * exp(-j 2 pi k n / 16)
//
// The design description only names a 16-point DFT; this implementation
// is a radix-4 decimation-in-time split (n = 4 n1 + n2, k = k1 + 4 k2):
//   stage A  4-point DFTs over n1 for each n2 (adds and +-j swaps only),
//   twiddle  multiply A[n2][k1] by W16^(n2 k1) (Q2.16 constants, rounded),
//   stage C  4-point DFTs over n2 for each k1.
// Only 9 of the 16 twiddles are non-trivial; the trivial ones (e = 0) are
// passed unchanged. The word grows 2 bits in each 4-point stage and 1 bit
// in the twiddle stage, so X is DFT_W = FIR_W + 5 bits and never
// overflows. No scaling happens here.
//
// Timing: fully pipelined, one 16-point transform per clock, latency 3
// cycles (one register per stage). valid travels with the data; it is
// the only reset flop.
module dft16
  import fb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  fir_smp_t [M-1:0]     x,
  output logic                 out_valid,
  output dft_smp_t [M-1:0]     y
);

  localparam int AW = FIR_W + 2;   // after stage A
  localparam int BW = FIR_W + 3;   // after twiddles
  localparam int CW = FIR_W + 5;   // after stage C (= DFT_W)
  localparam int PW = BW + TW_W;   // twiddle products

  typedef struct packed { logic signed [AW-1:0] re, im; } a_t;
  typedef struct packed { logic signed [BW-1:0] re, im; } b_t;

  // a_q[n2][k1], b_q[n2][k1]
  a_t [3:0][3:0] a_d, a_q;
  b_t [3:0][3:0] b_d, b_q;
  dft_smp_t [M-1:0] c_d;
  logic [2:0] vld;

  // ---- stage A: 4-point DFTs over n1 ----
  // X0 = a+b+c+d, X1 = a-jb-c+jd, X2 = a-b+c-d, X3 = a+jb-c-jd
  for (genvar n2 = 0; n2 < 4; n2++) begin : g_stage_a
    wire logic signed [AW-1:0] ar = AW'(x[n2].re),    ai = AW'(x[n2].im);
    wire logic signed [AW-1:0] br = AW'(x[4+n2].re),  bi = AW'(x[4+n2].im);
    wire logic signed [AW-1:0] cr = AW'(x[8+n2].re),  ci = AW'(x[8+n2].im);
    wire logic signed [AW-1:0] dr = AW'(x[12+n2].re), di = AW'(x[12+n2].im);
    assign a_d[n2][0].re = ar + br + cr + dr;  assign a_d[n2][0].im = ai + bi + ci + di;
    assign a_d[n2][1].re = ar + bi - cr - di;  assign a_d[n2][1].im = ai - br - ci + dr;
    assign a_d[n2][2].re = ar - br + cr - dr;  assign a_d[n2][2].im = ai - bi + ci - di;
    assign a_d[n2][3].re = ar - bi - cr + di;  assign a_d[n2][3].im = ai + br - ci - dr;
  end

  // ---- twiddles: (re + j im)(c - j s) = (re c + im s) + j(im c - re s) ----
  for (genvar n2 = 0; n2 < 4; n2++) begin : g_tw_n2
    for (genvar k1 = 0; k1 < 4; k1++) begin : g_tw_k1
      if (n2 * k1 == 0) begin : g_trivial
        assign b_d[n2][k1].re = BW'(a_q[n2][k1].re);
        assign b_d[n2][k1].im = BW'(a_q[n2][k1].im);
      end else begin : g_mult
        localparam logic signed [TW_W-1:0] C = TW_COS[n2 * k1];
        localparam logic signed [TW_W-1:0] S = TW_SIN[n2 * k1];
        wire logic signed [PW-1:0] re = PW'(a_q[n2][k1].re);
        wire logic signed [PW-1:0] im = PW'(a_q[n2][k1].im);
        wire logic signed [PW-1:0] pr = re * PW'(C) + im * PW'(S) + PW'(1 << (TW_FRAC - 1));
        wire logic signed [PW-1:0] pi = im * PW'(C) - re * PW'(S) + PW'(1 << (TW_FRAC - 1));
        assign b_d[n2][k1].re = BW'(pr >>> TW_FRAC);
        assign b_d[n2][k1].im = BW'(pi >>> TW_FRAC);
      end
    end
  end

  // ---- stage C: 4-point DFTs over n2, X[k1 + 4 k2] ----
  for (genvar k1 = 0; k1 < 4; k1++) begin : g_stage_c
    wire logic signed [CW-1:0] ar = CW'(b_q[0][k1].re), ai = CW'(b_q[0][k1].im);
    wire logic signed [CW-1:0] br = CW'(b_q[1][k1].re), bi = CW'(b_q[1][k1].im);
    wire logic signed [CW-1:0] cr = CW'(b_q[2][k1].re), ci = CW'(b_q[2][k1].im);
    wire logic signed [CW-1:0] dr = CW'(b_q[3][k1].re), di = CW'(b_q[3][k1].im);
    assign c_d[k1     ].re = ar + br + cr + dr;  assign c_d[k1     ].im = ai + bi + ci + di;
    assign c_d[k1 +  4].re = ar + bi - cr - di;  assign c_d[k1 +  4].im = ai - br - ci + dr;
    assign c_d[k1 +  8].re = ar - br + cr - dr;  assign c_d[k1 +  8].im = ai - bi + ci - di;
    assign c_d[k1 + 12].re = ar - bi - cr + di;  assign c_d[k1 + 12].im = ai + br - ci - dr;
  end

  always_ff @(posedge clk) begin
    a_q <= a_d;
    b_q <= b_d;
    y   <= c_d;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};

  assign out_valid = vld[2];

endmodule
