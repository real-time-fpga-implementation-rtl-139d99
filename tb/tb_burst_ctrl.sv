// tb_burst_ctrl: checks the burst controller against a stand-in core that
// only delays valid by 6 cycles (the filter bank core's latency). For
// bursts of several lengths, including 1 and 0, it checks: exactly one
// clear cycle right after start; reads of blocks 0 .. len-1 on
// consecutive cycles; core_valid one cycle after each read; output writes
// to words 0 .. len-1 in order; busy/done behaviour; done exactly len + 8
// cycles after the edge that samples start; and that a start while busy is ignored.
module tb_burst_ctrl;

  localparam int DEPTH = 64, AW = 6, LAT = 6;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW:0] len;
  logic busy, done, mem_rd_en, core_clear, core_valid, out_wr_en;
  logic [AW-1:0] mem_rd_addr, out_wr_addr;
  logic [LAT-1:0] core_pipe;
  logic core_out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // stand-in core: valid delayed by LAT cycles
  always_ff @(posedge clk) core_pipe <= rst_n ? {core_pipe[LAT-2:0], core_valid} : '0;
  assign core_out_valid = core_pipe[LAT-1];

  burst_ctrl #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .len, .busy, .done,
    .mem_rd_en, .mem_rd_addr, .core_clear, .core_valid, .core_out_valid,
    .out_wr_en, .out_wr_addr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Per-burst observation
  int n_clear, n_rd, n_wr, n_cv, t_start, t_done, n_late_start;
  bit prev_rd;

  always @(posedge clk) if (rst_n) begin
    if (core_clear) n_clear++;
    if (mem_rd_en) begin
      check(int'(mem_rd_addr) == n_rd, $sformatf("read address %0d, expected %0d", mem_rd_addr, n_rd));
      n_rd++;
    end
    check(core_valid == prev_rd, "core_valid follows read by one cycle");
    prev_rd = mem_rd_en;
    if (out_wr_en) begin
      check(int'(out_wr_addr) == n_wr, $sformatf("write address %0d, expected %0d", out_wr_addr, n_wr));
      n_wr++;
    end
  end

  task automatic burst(int l, bit poke);
    @(negedge clk);
    n_clear = 0; n_rd = 0; n_wr = 0;
    len = l[AW:0];
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    check(busy || l == 0, "busy after start");
    check(!done, "done cleared by start");
    check(core_clear, "clear right after start");
    if (poke) begin
      @(negedge clk);
      len = 7'd3;
      start = 1'b1;   // must be ignored
      @(negedge clk);
      start = 1'b0;
    end
    while (!done) @(negedge clk);
    t_done = cyc;
    check(!busy, "not busy when done");
    check(n_clear == 1, $sformatf("%0d clear cycles", n_clear));
    check(n_rd == l, $sformatf("len %0d: %0d reads", l, n_rd));
    check(n_wr == l, $sformatf("len %0d: %0d writes", l, n_wr));
    if (l > 0)
      // +1: t_start is taken before the edge that samples start
      check(t_done - t_start == l + 8 + 1, $sformatf("len %0d: done after %0d cycles", l, t_done - t_start));
    repeat (3) @(negedge clk);
    check(done, "done stays high");
  endtask

  initial begin
    prev_rd = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    burst(10, 1'b0);
    burst(1, 1'b0);
    burst(0, 1'b0);
    burst(64, 1'b1);
    burst(37, 1'b1);
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
