// tb_fb_core: checks the block-parallel filter bank core of one
// polarization against the reference model. Blocks of 64 samples go in
// (with random gaps in valid, which must not disturb the delay lines);
// output v[j][k] of block b must match sub-band k at decimated time
// 8 b + j. The stream is random noise followed by a full-scale tone in
// sub-band 5, which must clip and raise sat. A second run after clear
// checks that the delay lines start from zero. Latency: 6 cycles.
module tb_fb_core;
  import fb_pkg::*;

  localparam int PAR = 8, LANES = 64, NBLK = 40;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  in_smp_t [LANES-1:0] din;
  logic out_valid, sat;
  out_smp_t [PAR-1:0][M-1:0] v;
  int checks = 0, failures = 0, clipped = 0, gaps = 0;
  int cyc = 0, out_b = 0, sent_cyc[$];

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fb_core dut (.clk, .rst_n, .clear, .in_valid, .din, .out_valid, .v, .sat);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_stream(bit tone);
    if (tone) fb_ref_pkg::fill_tone(LANES * NBLK, 5, 15.5);
    else      fb_ref_pkg::fill_random(LANES * NBLK);
    if (tone) for (int n = 0; n < LANES * NBLK / 2; n++) begin
      fb_ref_pkg::xr[n] = int'($urandom_range(0, 31)) - 16;
      fb_ref_pkg::xi[n] = int'($urandom_range(0, 31)) - 16;
    end
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    out_b = 0;
    for (int b = 0; b < NBLK; b++) begin
      while ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        gaps++;
        @(negedge clk);
      end
      for (int i = 0; i < LANES; i++) begin
        din[i].re = IN_W'(fb_ref_pkg::xr[b * LANES + i]);
        din[i].im = IN_W'(fb_ref_pkg::xi[b * LANES + i]);
      end
      in_valid = 1'b1;
      sent_cyc.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(out_b == NBLK, "number of output blocks");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_stream(1'b1);
    run_stream(1'b0);
    check(clipped > 0, "tone never clipped");
    check(gaps > 0, "no gaps in valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    bit any_clip;
    any_clip = 1'b0;
    check(sent_cyc.size() > 0 && cyc - sent_cyc.pop_front() == 6, "latency 6");
    for (int j = 0; j < PAR; j++)
      for (int k = 0; k < int'(M); k++) begin
        check(fb_ref_pkg::match_v(PAR * out_b + j, k, int'(v[j][k].re), int'(v[j][k].im)),
              $sformatf("b %0d j %0d k %0d got %0d,%0d", out_b, j, k, v[j][k].re, v[j][k].im));
        any_clip |= fb_ref_pkg::clips(PAR * out_b + j, k);
      end
    check(sat == any_clip, $sformatf("sat flag at block %0d", out_b));
    if (sat) clipped++;
    out_b++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
