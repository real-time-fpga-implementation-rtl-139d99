// tb_polyphase_sp: checks the commutator routing and shared delay lines.
// Two instances: the default PAR = 8 (one block of history) and PAR = 2
// (three blocks of history). Random blocks are sent with gaps in valid
// and a clear in the middle; every window entry win[j][p][d] must equal
// x[LANES b + 8 (j - d) + 7 - p] for block b counted from the last clear,
// with samples before the clear reading as zero. Latency: 1 cycle.
module tb_polyphase_sp;
  import fb_pkg::*;

  localparam int PA = 8, LA = PA * 8;
  localparam int PB = 2, LB = PB * 8;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  in_smp_t [LA-1:0] din_a;
  in_smp_t [LB-1:0] din_b;
  logic va, vb;
  in_smp_t [PA-1:0][D-1:0][WIN-1:0] win_a;
  in_smp_t [PB-1:0][D-1:0][WIN-1:0] win_b;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  polyphase_sp #(.PAR(PA)) dut_a (.clk, .rst_n, .clear, .in_valid, .din(din_a), .out_valid(va), .win(win_a));
  polyphase_sp #(.PAR(PB)) dut_b (.clk, .rst_n, .clear, .in_valid, .din(din_b), .out_valid(vb), .win(win_b));

  in_smp_t xa[int], xb[int];   // stream since the last clear

  function automatic in_smp_t get(bit b, int n);
    if (n < 0) return '0;
    return b ? xb[n] : xa[n];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int blk;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    blk = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      clear = (t == 100);
      in_valid = !clear && ($urandom_range(0, 3) != 0);
      for (int i = 0; i < LA; i++) din_a[i] = in_smp_t'($urandom);
      for (int i = 0; i < LB; i++) din_b[i] = in_smp_t'($urandom);
      if (clear) begin xa.delete(); xb.delete(); blk = 0; end
      if (in_valid) begin
        for (int i = 0; i < LA; i++) xa[blk * LA + i] = din_a[i];
        for (int i = 0; i < LB; i++) xb[blk * LB + i] = din_b[i];
      end
      @(negedge clk);
      check(va == in_valid && vb == in_valid, "valid");
      if (in_valid) begin
        for (int j = 0; j < PA; j++) for (int p = 0; p < 8; p++) for (int d = 0; d < int'(WIN); d++)
          check(win_a[j][p][d] == get(0, blk * LA + 8 * (j - d) + 7 - p),
                $sformatf("A blk %0d j %0d p %0d d %0d", blk, j, p, d));
        for (int j = 0; j < PB; j++) for (int p = 0; p < 8; p++) for (int d = 0; d < int'(WIN); d++)
          check(win_b[j][p][d] == get(1, blk * LB + 8 * (j - d) + 7 - p),
                $sformatf("B blk %0d j %0d p %0d d %0d", blk, j, p, d));
        blk++;
      end
      in_valid = 1'b0;
      clear = 1'b0;
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
