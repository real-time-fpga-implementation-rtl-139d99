// sample_mem_in: on-chip input sample memory of one polarization.
//
// The host loads the received (ADC) samples one complex sample per write
// through a narrow port; the burst controller then reads one whole block
// of LANES samples per clock, which is the full input rate of the filter
// bank core. The memory holds DEPTH blocks. That samples are staged in
// on-chip memory and played through the filter bank in bursts follows the
// design description; the depth, the one-sample host port and the
// addressing are this design's choices.
//
// Host port: wr_addr = block * LANES + lane, written on wr_en.
// Burst port: rd_data is the block at rd_addr, registered (1 cycle after
// rd_en). A write and a read of the same block in one cycle return the
// old contents.
module sample_mem_in
  import fb_pkg::*;
#(
  parameter int unsigned LANES = 64,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned LW   = $clog2(LANES)
) (
  input  logic                     clk,
  // host write port
  input  logic                     wr_en,
  input  logic [AW+LW-1:0]         wr_addr,
  input  in_smp_t                  wr_data,
  // burst read port
  input  logic                     rd_en,
  input  logic [AW-1:0]            rd_addr,
  output in_smp_t [LANES-1:0]      rd_data
);

  in_smp_t [LANES-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW+LW-1:LW]][wr_addr[LW-1:0]] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
