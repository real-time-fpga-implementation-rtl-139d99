// tb_sample_mem_in: checks the input sample memory. Writes random samples
// one at a time through the host port (block * LANES + lane addressing),
// then reads whole blocks through the burst port and compares every lane.
// Also checks that the read data is registered (1 cycle) and that a
// read without rd_en keeps the last block.
module tb_sample_mem_in;
  import fb_pkg::*;

  localparam int LANES = 64, DEPTH = 32;

  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [$clog2(DEPTH*LANES)-1:0] wr_addr;
  in_smp_t wr_data;
  logic [$clog2(DEPTH)-1:0] rd_addr;
  in_smp_t [LANES-1:0] rd_data, last;
  in_smp_t model [DEPTH*LANES];
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  sample_mem_in #(.LANES(LANES), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  initial begin
    for (int a = 0; a < DEPTH * LANES; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = a[$bits(wr_addr)-1:0];
      wr_data = in_smp_t'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int t = 0; t < 3 * DEPTH; t++) begin
      int b;
      b = (t < DEPTH) ? t : int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      rd_en = 1'b1; rd_addr = b[$bits(rd_addr)-1:0];
      @(negedge clk);
      rd_en = 1'b0;
      rd_addr = rd_addr + 1'b1;   // must not be read
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (rd_data[i] != model[b * LANES + i]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d lane %0d", b, i);
        end
      end
      last = rd_data;
      @(negedge clk);
      checks++;
      if (rd_data != last) begin failures++; $display("FAIL data changed without rd_en"); end
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
