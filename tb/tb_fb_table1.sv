// tb_fb_table1: the other bank counts of the throughput/resource trade-off
// (1, 2, 4, 6 and 14 block-parallel banks, for clocks of 3325, 1663, 832,
// 555 and 238 MHz at 26.6 GS/s; 8 banks is the default and is covered by
// the other testbenches). Each configuration is a separate fb_system fed
// the same random full-scale stream of 8 x 112 samples; every sub-band
// sample is compared with the reference model, which does not depend on
// the bank count, and each burst must finish len + 8 cycles after start.
module tb_fb_table1;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [4:0] fin;
  int c[5], f[5];
  int checks, failures;

  always #1 clk = ~clk;

  fb_par_check #(.PAR(1),  .DEPTH(128), .NBLK(112)) u_p1  (.clk, .rst_n, .go, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  fb_par_check #(.PAR(2),  .DEPTH(64),  .NBLK(56))  u_p2  (.clk, .rst_n, .go, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  fb_par_check #(.PAR(4),  .DEPTH(32),  .NBLK(28))  u_p4  (.clk, .rst_n, .go, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  fb_par_check #(.PAR(6),  .DEPTH(32),  .NBLK(18))  u_p6  (.clk, .rst_n, .go, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  fb_par_check #(.PAR(14), .DEPTH(8),   .NBLK(8))   u_p14 (.clk, .rst_n, .go, .finished(fin[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    fb_ref_pkg::fill_random(8 * 112);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    go = 1'b1;
    wait (&fin);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
