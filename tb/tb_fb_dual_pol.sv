// tb_fb_dual_pol: end-to-end test of the dual-polarization filter-bank
// pair at its default sizes (8 parallel banks, 1024-block memories).
//
// The host side is modelled here: it loads the X and Y input memories one
// sample per clock, starts a burst, waits for done and reads every
// sub-band sample back, comparing each with the reference model computed
// straight from the filter bank definition. The bursts are:
//   1. a full-depth burst (1024 blocks = 65536 samples per polarization)
//      of random full-scale noise on X and Y;
//   2. a shorter burst with a full-scale tone in sub-band 2 on X and in
//      sub-band 11 on Y, which must clip: clip_cnt must equal the number
//      of output words the reference model says clip;
//   3. a start while busy (ignored) and a zero-length burst.
// Each burst must start from empty delay lines (clear), so its first
// outputs must ignore the previous burst's data. Mechanisms counted:
// bursts, clears seen through restarts, clipping, ignored starts,
// zero-length bursts. Start to done must take len + 8 cycles (1 for an
// empty burst).
module tb_fb_dual_pol;
  import fb_pkg::*;

  localparam int PAR = 8, DEPTH = 1024, LANES = PAR * 8, NS = PAR * 16;
  localparam int AW = $clog2(DEPTH), LW = $clog2(LANES), SW = $clog2(NS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_wr_en = 1'b0, y_wr_en = 1'b0, x_rd_en = 1'b0, y_rd_en = 1'b0, start = 1'b0;
  logic [AW+LW-1:0] x_wr_addr, y_wr_addr;
  in_smp_t x_wr_data, y_wr_data;
  logic [AW+SW-1:0] x_rd_addr, y_rd_addr;
  out_smp_t x_rd_data, y_rd_data;
  logic [AW:0] x_clip_cnt, y_clip_cnt, len;
  logic busy, done;

  int checks = 0, failures = 0, cyc = 0;
  int n_bursts = 0, n_restarts = 0, n_clip_bursts = 0, n_ignored = 0, n_zero = 0;
  int sxr[], sxi[], syr[], syi[];   // the X and Y streams

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fb_dual_pol dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic load(int nblk);
    for (int a = 0; a < nblk * LANES; a++) begin
      @(negedge clk);
      x_wr_en = 1'b1; y_wr_en = 1'b1;
      x_wr_addr = a[AW+LW-1:0]; y_wr_addr = a[AW+LW-1:0];
      x_wr_data.re = IN_W'(sxr[a]); x_wr_data.im = IN_W'(sxi[a]);
      y_wr_data.re = IN_W'(syr[a]); y_wr_data.im = IN_W'(syi[a]);
    end
    @(negedge clk);
    x_wr_en = 1'b0; y_wr_en = 1'b0;
  endtask

  task automatic run(int nblk, bit poke);
    int t0;
    @(negedge clk);
    len = nblk[AW:0];
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    if (poke) begin
      @(negedge clk);
      check(busy, "busy during burst");
      len = '0;
      start = 1'b1;   // ignored: a burst is running
      @(negedge clk);
      start = 1'b0;
      n_ignored++;
    end
    while (!done) @(negedge clk);
    // +1: t0 is taken before the edge that samples start; an empty burst
    // only passes through the clear cycle.
    check(cyc - t0 == (nblk == 0 ? 1 : nblk + 8) + 1, $sformatf("start to done %0d cycles for %0d blocks", cyc - t0 - 1, nblk));
    n_bursts++;
  endtask

  // Read back all sub-band samples of nblk blocks from both polarizations
  // and compare; returns the number of output words the model says clip.
  task automatic readback(int nblk, output int xclip, output int yclip);
    bit wx, wy;
    xclip = 0; yclip = 0;
    for (int b = 0; b < nblk; b++) begin
      wx = 1'b0; wy = 1'b0;
      for (int s = 0; s < NS; s++) begin
        int a, j, k;
        a = b * NS + s; j = s / 16; k = s % 16;
        @(negedge clk);
        x_rd_en = 1'b1; y_rd_en = 1'b1;
        x_rd_addr = a[AW+SW-1:0]; y_rd_addr = a[AW+SW-1:0];
        @(negedge clk);
        x_rd_en = 1'b0; y_rd_en = 1'b0;
        fb_ref_pkg::xr = sxr; fb_ref_pkg::xi = sxi;
        check(fb_ref_pkg::match_v(PAR * b + j, k, int'(x_rd_data.re), int'(x_rd_data.im)),
              $sformatf("X block %0d j %0d k %0d", b, j, k));
        wx |= fb_ref_pkg::clips(PAR * b + j, k);
        fb_ref_pkg::xr = syr; fb_ref_pkg::xi = syi;
        check(fb_ref_pkg::match_v(PAR * b + j, k, int'(y_rd_data.re), int'(y_rd_data.im)),
              $sformatf("Y block %0d j %0d k %0d", b, j, k));
        wy |= fb_ref_pkg::clips(PAR * b + j, k);
      end
      xclip += int'(wx); yclip += int'(wy);
    end
  endtask

  initial begin
    int xc, yc, nblk;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. full-depth random burst
    fb_ref_pkg::fill_random(DEPTH * LANES);
    sxr = fb_ref_pkg::xr; sxi = fb_ref_pkg::xi;
    fb_ref_pkg::fill_random(DEPTH * LANES);
    syr = fb_ref_pkg::xr; syi = fb_ref_pkg::xi;
    load(DEPTH);
    run(DEPTH, 1'b0);
    readback(DEPTH, xc, yc);
    check(x_clip_cnt == xc[AW:0] && y_clip_cnt == yc[AW:0], "clip count, random burst");

    // 2. shorter tone burst; the memories still hold burst 1's data beyond
    //    the new blocks, and the delay lines must have been cleared.
    nblk = 24;
    fb_ref_pkg::fill_tone(nblk * LANES, 2, 15.5);
    sxr = fb_ref_pkg::xr; sxi = fb_ref_pkg::xi;
    fb_ref_pkg::fill_tone(nblk * LANES, 11, 15.5);
    syr = fb_ref_pkg::xr; syi = fb_ref_pkg::xi;
    load(nblk);
    run(nblk, 1'b1);
    readback(nblk, xc, yc);
    n_restarts++;
    check(xc > 0 && yc > 0, "tone burst clips in the model");
    check(x_clip_cnt == xc[AW:0], $sformatf("X clip count %0d, expected %0d", x_clip_cnt, xc));
    check(y_clip_cnt == yc[AW:0], $sformatf("Y clip count %0d, expected %0d", y_clip_cnt, yc));
    if (x_clip_cnt > 0 && y_clip_cnt > 0) n_clip_bursts++;

    // 3. zero-length burst
    run(0, 1'b0);
    check(x_clip_cnt == 0 && y_clip_cnt == 0, "clip counters cleared by start");
    n_zero++;

    $display("mechanisms: bursts=%0d restarts=%0d clipping=%0d ignored_starts=%0d zero_len=%0d",
             n_bursts, n_restarts, n_clip_bursts, n_ignored, n_zero);
    check(n_bursts > 0, "burst");
    check(n_restarts > 0, "restart after clear");
    check(n_clip_bursts > 0, "output saturation");
    check(n_ignored > 0, "start while busy");
    check(n_zero > 0, "zero-length burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
