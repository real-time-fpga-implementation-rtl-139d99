// tb_sido_fir: checks the SIDO polyphase filter of branches 0 and 5.
// Random full-scale windows; the expected even and odd outputs are
// summed here from the prototype taps h[p + 16 l] (even, delays 0,2,4)
// and h[p + 8 + 16 l] (odd, delays 1,3,5), rounded and saturated.
// Also checks the 1-cycle latency of out_valid.
module tb_sido_fir;
  import fb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  in_smp_t [WIN-1:0] win;
  logic v0, v5;
  fir_smp_t ev0, od0, ev5, od5;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  sido_fir #(.P(0)) dut0 (.clk, .rst_n, .in_valid, .win, .out_valid(v0), .ev(ev0), .od(od0));
  sido_fir #(.P(5)) dut5 (.clk, .rst_n, .in_valid, .win, .out_valid(v5), .ev(ev5), .od(od5));

  function automatic int expect_out(int p, bit odd, bit im, in_smp_t [WIN-1:0] w);
    longint acc = 0;
    for (int l = 0; l < 3; l++) begin
      int idx = odd ? 2 * l + 1 : 2 * l;
      longint x = im ? longint'(w[idx].im) : longint'(w[idx].re);
      acc += longint'($signed(PROTO[p + (odd ? 8 : 0) + 16 * l])) * x;
    end
    return int'(fb_ref_pkg::sat(fb_ref_pkg::rshift_round(acc, FIR_SHIFT), FIR_W));
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      in_smp_t [WIN-1:0] w;
      for (int d = 0; d < int'(WIN); d++) begin
        w[d].re = IN_W'($urandom);
        w[d].im = IN_W'($urandom);
      end
      if (t < 4) for (int d = 0; d < int'(WIN); d++) begin  // extremes
        w[d].re = (t[0]) ? -16 : 15;
        w[d].im = (t[1]) ? -16 : 15;
      end
      @(negedge clk);
      win = w; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check("valid", int'(v0 & v5), 1);
      check("ev0.re", int'(ev0.re), expect_out(0, 0, 0, w));
      check("ev0.im", int'(ev0.im), expect_out(0, 0, 1, w));
      check("od0.re", int'(od0.re), expect_out(0, 1, 0, w));
      check("od0.im", int'(od0.im), expect_out(0, 1, 1, w));
      check("ev5.re", int'(ev5.re), expect_out(5, 0, 0, w));
      check("ev5.im", int'(ev5.im), expect_out(5, 0, 1, w));
      check("od5.re", int'(od5.re), expect_out(5, 1, 0, w));
      check("od5.im", int'(od5.im), expect_out(5, 1, 1, w));
      @(negedge clk);
      check("valid low", int'(v0 | v5), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
