// fb_par_check: testbench helper that runs one fb_system built with PAR
// parallel banks through a burst of NBLK blocks of the shared reference
// stream (fb_ref_pkg), reads back every sub-band sample and compares it
// with the reference model. Host addresses are the bit concatenations
// {block, lane} and {block, bank, sub-band}, which equal block*LANES+lane
// and (block*PAR+j)*16+k only when PAR is a power of two.
module fb_par_check
  import fb_pkg::*;
#(
  parameter int PAR   = 1,
  parameter int DEPTH = 8,
  parameter int NBLK  = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int LANES = PAR * 8, NS = PAR * 16;
  localparam int AW = $clog2(DEPTH), LW = $clog2(LANES), SW = $clog2(NS);

  logic in_wr_en = 1'b0, out_rd_en = 1'b0, start = 1'b0;
  logic [AW+LW-1:0] in_wr_addr;
  in_smp_t in_wr_data;
  logic [AW+SW-1:0] out_rd_addr;
  out_smp_t out_rd_data;
  logic [AW:0] len, clip_cnt;
  logic busy, done;

  fb_system #(.PAR(PAR), .DEPTH(DEPTH)) dut (.*);

  initial begin
    int t0, cyc;
    finished = 1'b0; checks = 0; failures = 0;
    wait (go);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < LANES; i++) begin
        @(negedge clk);
        in_wr_en = 1'b1;
        in_wr_addr = {AW'(b), LW'(i)};
        in_wr_data.re = IN_W'(fb_ref_pkg::xr[b * LANES + i]);
        in_wr_data.im = IN_W'(fb_ref_pkg::xi[b * LANES + i]);
      end
    @(negedge clk);
    in_wr_en = 1'b0;
    len = (AW+1)'(NBLK);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // cyc counts negedges from the one that raised start, so the edge that
    // samples start is included: len + 8 edges after it means NBLK + 9.
    checks++;
    if (cyc != NBLK + 8 + 1) begin
      failures++;
      $display("FAIL PAR %0d: done after %0d cycles", PAR, cyc - 1);
    end
    for (int b = 0; b < NBLK; b++)
      for (int j = 0; j < PAR; j++)
        for (int k = 0; k < 16; k++) begin
          @(negedge clk);
          out_rd_en = 1'b1;
          out_rd_addr = {AW'(b), SW'(j * 16 + k)};
          @(negedge clk);
          out_rd_en = 1'b0;
          checks++;
          if (!fb_ref_pkg::match_v(PAR * b + j, k, int'(out_rd_data.re), int'(out_rd_data.im))) begin
            failures++;
            if (failures < 5) $display("FAIL PAR %0d block %0d j %0d k %0d", PAR, b, j, k);
          end
        end
    finished = 1'b1;
  end
endmodule
