// tb_dft16: checks the 16-point DFT against a floating-point DFT.
// Feeds a new random vector (full FIR_W range, plus impulses and a
// constant) every clock, keeps the inputs in a queue and compares each
// result, 3 cycles later, with exp(-j 2 pi k n / 16) sums computed here.
// The twiddles are rounded in the hardware, so 4 LSB of slack is allowed.
module tb_dft16;
  import fb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  fir_smp_t [M-1:0] x;
  logic out_valid;
  dft_smp_t [M-1:0] y;
  int checks = 0, failures = 0;
  fir_smp_t [M-1:0] sent[$];
  int cyc = 0, sent_cyc[$];

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dft16 dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  localparam int N = 300;

  function automatic real absr(real a);
    return a < 0.0 ? -a : a;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      for (int n = 0; n < int'(M); n++) begin
        x[n].re = FIR_W'($urandom);
        x[n].im = FIR_W'($urandom);
        if (t == 0) begin x[n].re = (n == 0) ? 16'sd1000 : '0; x[n].im = '0; end
        if (t == 1) begin x[n].re = (n == 3) ? 16'sd0 : '0;    x[n].im = (n == 3) ? 16'sd777 : '0; end
        if (t == 2) begin x[n].re = 16'sh7fff; x[n].im = 16'sh8000; end
      end
      in_valid = (t % 7 != 6);
      if (in_valid) begin sent.push_back(x); sent_cyc.push_back(cyc); end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL %0d results missing", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    fir_smp_t [M-1:0] xin;
    int c0;
    real pi;
    pi = 3.14159265358979323846;
    if (sent.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      xin = sent.pop_front();
      c0 = sent_cyc.pop_front();
      checks++;
      if (cyc - c0 != 3) begin failures++; $display("FAIL latency %0d", cyc - c0); end
      for (int k = 0; k < int'(M); k++) begin
        real er, ei;
        er = 0.0; ei = 0.0;
        for (int n = 0; n < int'(M); n++) begin
          er += real'(xin[n].re) * $cos(2.0*pi*k*n/16.0) + real'(xin[n].im) * $sin(2.0*pi*k*n/16.0);
          ei += real'(xin[n].im) * $cos(2.0*pi*k*n/16.0) - real'(xin[n].re) * $sin(2.0*pi*k*n/16.0);
        end
        checks++;
        if (absr(real'(y[k].re) - er) > 4.0 || absr(real'(y[k].im) - ei) > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d got %0d,%0d expected %f,%f", k, y[k].re, y[k].im, er, ei);
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
