// tb_fb_fixed_point: fixed-point penalty of the filter bank on a DFT-spread
// OFDM signal.
//
// Signal: NSYM symbols of a 1024-point OFDM signal whose 960 inner tones
// form 15 DFT-spread sub-bands of 64 tones. Each sub-band carries 64
// random QPSK symbols spread by a 64-point DFT. Tone t sits at t/1024 of
// the sample rate, so sub-band k of the filter bank (centred at -k/16)
// holds tones -64k +- 32. The signal is scaled to an rms of RMS per
// component and quantized to the 5-bit input range. The hardware runs it
// through fb_core (defaults: 8 parallel banks, 64 samples per clock).
//
// For every sub-band k and output sample, three versions are compared:
//   ideal   float filter bank on the unquantized signal
//   float   float filter bank on the 5-bit signal
//   hw      the hardware output
// The ADC noise is ideal - float and the implementation noise is
// float - hw. The check is that the implementation noise is at least
// MARGIN_DB below the ADC noise in every sub-band (excluding the band-edge
// sub-band 8, which holds only part of a sub-band of tones), so the 16-bit
// datapath and 10-bit outputs cost nothing next to a 5-bit ADC.
module tb_fb_fixed_point;
  import fb_pkg::*;

  localparam int NSYM = 4, NFFT = 1024, NSMP = NSYM * NFFT;
  localparam int LANES = 64, NBLK = NSMP / LANES, PAR = 8;
  localparam real RMS = 4.5, MARGIN_DB = 10.0;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  in_smp_t [LANES-1:0] din;
  logic out_valid, sat;
  out_smp_t [PAR-1:0][M-1:0] v;
  int checks = 0, failures = 0, out_b = 0;

  real fr[NSMP], fi[NSMP];                  // unquantized signal
  real hw_r[NBLK*PAR][M], hw_i[NBLK*PAR][M];
  real ct[NFFT], st[NFFT];
  localparam real PI = 3.14159265358979323846;

  always #1 clk = ~clk;

  fb_core dut (.clk, .rst_n, .clear, .in_valid, .din, .out_valid, .v, .sat);

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int j = 0; j < PAR; j++)
      for (int k = 0; k < int'(M); k++) begin
        hw_r[PAR * out_b + j][k] = real'(v[j][k].re);
        hw_i[PAR * out_b + j][k] = real'(v[j][k].im);
      end
    out_b++;
  end

  // float filter bank, output units of the hardware (taps as integers,
  // divided by 2^(FIR_SHIFT + OUT_SHIFT)); q selects the 5-bit signal
  task automatic float_fb(bit q, int m, int k, output real yr, output real yi);
    real xr_, xi_, h, c, s;
    int n, e;
    yr = 0.0; yi = 0.0;
    for (int t = 0; t < int'(NTAPS); t++) begin
      n = 8 * m + 7 - t;
      if (n < 0) continue;
      xr_ = q ? real'(fb_ref_pkg::xr[n]) : fr[n];
      xi_ = q ? real'(fb_ref_pkg::xi[n]) : fi[n];
      h = real'($signed(PROTO[t]));
      e = (k * t) % 16;
      c = ct[e * 64]; s = st[e * 64];          // exp(-j 2 pi k t / 16)
      yr += h * (xr_ * c + xi_ * s);
      yi += h * (xi_ * c - xr_ * s);
    end
    yr = yr / real'(1 << (FIR_SHIFT + OUT_SHIFT));
    yi = yi / real'(1 << (FIR_SHIFT + OUT_SHIFT));
  endtask

  initial begin
    real sr[64], si[64], tr[NFFT], ti[NFFT], p, a, nadc[M], nimp[M], psig[M];
    real ir, ii, qr, qi;
    int e, clipped;
    for (int i = 0; i < NFFT; i++) begin
      ct[i] = $cos(2.0 * PI * i / NFFT);
      st[i] = $sin(2.0 * PI * i / NFFT);
    end
    // ---- DFT-spread OFDM signal ----
    for (int sym = 0; sym < NSYM; sym++) begin
      for (int t = 0; t < NFFT; t++) begin tr[t] = 0.0; ti[t] = 0.0; end
      for (int b = 0; b < 15; b++) begin
        // sub-band b uses filter-bank channel kb = b - 7 (mod 16): 9..15, 0..7
        int kb;
        kb = (b + 9) % 16;
        for (int i = 0; i < 64; i++) begin
          sr[i] = ($urandom_range(0, 1) != 0) ? 1.0 : -1.0;
          si[i] = ($urandom_range(0, 1) != 0) ? 1.0 : -1.0;
        end
        for (int f = 0; f < 64; f++) begin       // 64-point DFT spreading
          real ar, ai;
          int tone;
          ar = 0.0; ai = 0.0;
          for (int i = 0; i < 64; i++) begin
            e = ((f * i) % 64) * 16;
            ar += sr[i] * ct[e] + si[i] * st[e];
            ai += si[i] * ct[e] - sr[i] * st[e];
          end
          tone = (-64 * kb + f - 32 + 2 * NFFT) % NFFT;
          tr[tone] = ar; ti[tone] = ai;
        end
      end
      for (int n = 0; n < NFFT; n++) begin        // 1024-point IFFT (direct)
        real yr, yi;
        yr = 0.0; yi = 0.0;
        for (int t = 0; t < NFFT; t++) begin
          if (tr[t] == 0.0 && ti[t] == 0.0) continue;
          e = (t * n) % NFFT;
          yr += tr[t] * ct[e] - ti[t] * st[e];
          yi += tr[t] * st[e] + ti[t] * ct[e];
        end
        fr[sym * NFFT + n] = yr; fi[sym * NFFT + n] = yi;
      end
    end
    p = 0.0;
    for (int n = 0; n < NSMP; n++) p += fr[n] * fr[n] + fi[n] * fi[n];
    a = RMS / $sqrt(p / (2.0 * NSMP));
    fb_ref_pkg::xr = new[NSMP]; fb_ref_pkg::xi = new[NSMP];
    clipped = 0;
    for (int n = 0; n < NSMP; n++) begin
      fr[n] *= a; fi[n] *= a;
      fb_ref_pkg::xr[n] = int'(fb_ref_pkg::sat(longint'($floor(fr[n] + 0.5)), IN_W));
      fb_ref_pkg::xi[n] = int'(fb_ref_pkg::sat(longint'($floor(fi[n] + 0.5)), IN_W));
      if (real'(fb_ref_pkg::xr[n]) != $floor(fr[n] + 0.5)) clipped++;
    end
    $display("input: %0d samples, rms %.1f per component, %0d clipped by the 5-bit range", NSMP, RMS, clipped);

    // ---- run the hardware ----
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < LANES; i++) begin
        din[i].re = IN_W'(fb_ref_pkg::xr[b * LANES + i]);
        din[i].im = IN_W'(fb_ref_pkg::xi[b * LANES + i]);
      end
      in_valid = 1'b1;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (out_b != NBLK) begin failures++; $display("FAIL %0d output blocks", out_b); end
    checks++;
    if (sat) begin failures++; $display("FAIL output clipped"); end

    // ---- compare ----
    for (int k = 0; k < int'(M); k++) begin nadc[k] = 0.0; nimp[k] = 0.0; psig[k] = 0.0; end
    for (int m = 0; m < NBLK * PAR; m++)
      for (int k = 0; k < int'(M); k++) begin
        float_fb(1'b0, m, k, ir, ii);
        float_fb(1'b1, m, k, qr, qi);
        psig[k] += ir * ir + ii * ii;
        nadc[k] += (ir - qr) * (ir - qr) + (ii - qi) * (ii - qi);
        nimp[k] += (qr - hw_r[m][k]) * (qr - hw_r[m][k]) + (qi - hw_i[m][k]) * (qi - hw_i[m][k]);
      end
    for (int k = 0; k < int'(M); k++) begin
      real snr_adc, snr_imp;
      snr_adc = 10.0 * $log10(psig[k] / nadc[k]);
      snr_imp = 10.0 * $log10(psig[k] / nimp[k]);
      $display("sub-band %2d: signal rms %6.1f  SNR vs ADC noise %5.1f dB  SNR vs fixed-point noise %5.1f dB",
               k, $sqrt(psig[k] / (2.0 * NBLK * PAR)), snr_adc, snr_imp);
      if (k == 8) continue;
      checks++;
      if (snr_imp < snr_adc + MARGIN_DB) begin
        failures++;
        $display("FAIL sub-band %0d: fixed-point noise not %.0f dB below ADC noise", k, MARGIN_DB);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
