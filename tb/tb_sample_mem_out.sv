// tb_sample_mem_out: checks the output memory. Writes random words of
// 8 x 16 sub-band samples through the burst port, then reads every sample
// back through the host port at address (word * 8 + j) * 16 + k and
// compares it with sample j*16 + k of the word. Read latency: 1 cycle.
module tb_sample_mem_out;
  import fb_pkg::*;

  localparam int PAR = 8, DEPTH = 16, NS = PAR * 16;

  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [$clog2(DEPTH)-1:0] wr_addr;
  out_smp_t [NS-1:0] wr_data;
  logic [$clog2(DEPTH*NS)-1:0] rd_addr;
  out_smp_t rd_data;
  out_smp_t [NS-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  sample_mem_out #(.PAR(PAR), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  initial begin
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = a[$bits(wr_addr)-1:0];
      for (int s = 0; s < NS; s++) wr_data[s] = out_smp_t'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = 0; a < DEPTH * NS; a++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = a[$bits(rd_addr)-1:0];
      @(negedge clk);
      rd_en = 1'b0;
      checks++;
      if (rd_data != model[a / NS][a % NS]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h", a, rd_data);
      end
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
