// sample_mem_out: on-chip output memory of one polarization.
//
// During a burst the controller writes one word per clock holding all
// PAR x M sub-band samples the filter bank core produced in that clock;
// afterwards the host reads the sub-band samples back one at a time.
// That the outputs are captured in on-chip memory and read out by the
// host follows the design description; the depth, the word layout and
// the one-sample host port are this design's choices.
//
// Burst port: wr_data[j][k] = sub-band k at decimated time PAR a + j for
// word a, written on wr_en.
// Host port: rd_addr = (word * PAR + j) * M + k, so consecutive addresses
// walk through all 16 sub-bands of one time step, then through time.
// rd_data is registered: valid 1 cycle after rd_en.
module sample_mem_out
  import fb_pkg::*;
#(
  parameter int unsigned PAR   = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned SW   = $clog2(PAR * M)
) (
  input  logic                          clk,
  // burst write port
  input  logic                          wr_en,
  input  logic [AW-1:0]                 wr_addr,
  input  out_smp_t [PAR*M-1:0]          wr_data,
  // host read port
  input  logic                          rd_en,
  input  logic [AW+SW-1:0]              rd_addr,
  output out_smp_t                      rd_data
);

  out_smp_t [PAR*M-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr[AW+SW-1:SW]][rd_addr[SW-1:0]];
  end

endmodule
