// tb_fb_instance: checks one filter bank instance (8 SIDO filters and the
// 16-point DFT) against the reference model, which computes every
// sub-band sample straight from the prototype filter and a floating-point
// DFT. The branch windows x_p[m - d] = x[8 (m - d) + 7 - p] are built here
// for decimated steps m = 0.., one per clock. The first half of the stream
// is random full-scale noise, the second a full-scale tone in sub-band 3,
// which must clip and raise sat. Also checks the 5-cycle latency.
module tb_fb_instance;
  import fb_pkg::*;

  localparam int NSTEP = 160;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  in_smp_t [D-1:0][WIN-1:0] win;
  logic out_valid, sat;
  out_smp_t [M-1:0] v;
  int checks = 0, failures = 0, clipped = 0;
  int cyc = 0, out_m = 0, sent_cyc[$];

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fb_instance dut (.clk, .rst_n, .in_valid, .win, .out_valid, .v, .sat);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int nr, ni;
    // stream: random, then a tone at the centre of sub-band 3
    fb_ref_pkg::fill_tone(8 * NSTEP, 3, 15.0);
    for (int n = 0; n < 4 * NSTEP; n++) begin
      fb_ref_pkg::xr[n] = int'($urandom_range(0, 31)) - 16;
      fb_ref_pkg::xi[n] = int'($urandom_range(0, 31)) - 16;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NSTEP; m++) begin
      @(negedge clk);
      for (int p = 0; p < int'(D); p++)
        for (int d = 0; d < int'(WIN); d++) begin
          nr = fb_ref_pkg::sample_re(8 * (m - d) + 7 - p);
          ni = fb_ref_pkg::sample_im(8 * (m - d) + 7 - p);
          win[p][d].re = IN_W'(nr);
          win[p][d].im = IN_W'(ni);
        end
      in_valid = 1'b1;
      sent_cyc.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(out_m == NSTEP, "number of outputs");
    check(clipped > 0, "tone never clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    bit any_clip;
    any_clip = 1'b0;
    check(sent_cyc.size() > 0 && cyc - sent_cyc.pop_front() == 5, "latency 5");
    for (int k = 0; k < int'(M); k++) begin
      check(fb_ref_pkg::match_v(out_m, k, int'(v[k].re), int'(v[k].im)),
            $sformatf("m %0d k %0d got %0d,%0d", out_m, k, v[k].re, v[k].im));
      any_clip |= fb_ref_pkg::clips(out_m, k);
    end
    check(sat == any_clip, $sformatf("sat flag at m %0d", out_m));
    if (sat) clipped++;
    out_m++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
