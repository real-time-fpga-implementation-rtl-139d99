// tb_fb_system: checks the filter-bank system of one polarization with
// small memories (DEPTH = 16). The host loads random samples, runs a
// burst of all 16 blocks, reads back every sub-band sample and compares
// it with the reference model; then a burst of 5 blocks with a full-scale
// tone in sub-band 7 must reproduce the model and report the clipped
// output words in clip_cnt. Start to done: len + 8 cycles.
module tb_fb_system;
  import fb_pkg::*;

  localparam int PAR = 8, DEPTH = 16, LANES = 64, NS = 128;
  localparam int AW = 4, LW = 6, SW = 7;

  logic clk = 1'b0, rst_n = 1'b0, in_wr_en = 1'b0, out_rd_en = 1'b0, start = 1'b0;
  logic [AW+LW-1:0] in_wr_addr;
  in_smp_t in_wr_data;
  logic [AW+SW-1:0] out_rd_addr;
  out_smp_t out_rd_data;
  logic [AW:0] len, clip_cnt;
  logic busy, done;
  int checks = 0, failures = 0, cyc = 0;

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fb_system #(.PAR(PAR), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic burst(int nblk);
    int t0, nclip;
    for (int a = 0; a < nblk * LANES; a++) begin
      @(negedge clk);
      in_wr_en = 1'b1; in_wr_addr = a[AW+LW-1:0];
      in_wr_data.re = IN_W'(fb_ref_pkg::xr[a]);
      in_wr_data.im = IN_W'(fb_ref_pkg::xi[a]);
    end
    @(negedge clk);
    in_wr_en = 1'b0;
    len = nblk[AW:0];
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(cyc - t0 == nblk + 8 + 1, $sformatf("done after %0d cycles", cyc - t0 - 1));
    nclip = 0;
    for (int b = 0; b < nblk; b++) begin
      bit w;
      w = 1'b0;
      for (int s = 0; s < NS; s++) begin
        int a;
        a = b * NS + s;
        @(negedge clk);
        out_rd_en = 1'b1; out_rd_addr = a[AW+SW-1:0];
        @(negedge clk);
        out_rd_en = 1'b0;
        check(fb_ref_pkg::match_v(PAR * b + s / 16, s % 16, int'(out_rd_data.re), int'(out_rd_data.im)),
              $sformatf("block %0d sample %0d", b, s));
        w |= fb_ref_pkg::clips(PAR * b + s / 16, s % 16);
      end
      nclip += int'(w);
    end
    check(int'(clip_cnt) == nclip, $sformatf("clip_cnt %0d expected %0d", clip_cnt, nclip));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fb_ref_pkg::fill_random(DEPTH * LANES);
    burst(DEPTH);
    fb_ref_pkg::fill_tone(5 * LANES, 7, 15.5);
    burst(5);
    check(clip_cnt > 0, "tone clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
