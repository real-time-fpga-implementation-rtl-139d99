// fb_system: the filter-bank system of one polarization: input memory,
// burst controller, filter bank core and output memory.
//
// The host loads up to DEPTH x LANES complex input samples, pulses start,
// waits for done and reads back the PAR x 16 sub-band samples of every
// processed block. During the burst the core runs at full rate, one input
// block (64 samples at the default PAR = 8) per clock. The chain
// memory -> filter bank core -> memory follows the design description;
// the host ports and the clip counter are this design's choices.
//
// Host ports: in_wr_addr = block * LANES + lane; out_rd_addr =
// (block * PAR + j) * 16 + k for sub-band k at decimated time PAR block + j,
// out_rd_data valid one cycle after out_rd_en. clip_cnt counts the clocks
// of the last burst in which some output sample was saturated.
// Timing: start to done takes len + 8 cycles.
module fb_system
  import fb_pkg::*;
#(
  parameter int unsigned PAR   = 8,
  parameter int unsigned DEPTH = 1024,
  parameter proto_t      COEFS = PROTO,
  localparam int unsigned LANES = PAR * D,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LW    = $clog2(LANES),
  localparam int unsigned SW    = $clog2(PAR * M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host: input samples
  input  logic                 in_wr_en,
  input  logic [AW+LW-1:0]     in_wr_addr,
  input  in_smp_t              in_wr_data,
  // host: sub-band samples
  input  logic                 out_rd_en,
  input  logic [AW+SW-1:0]     out_rd_addr,
  output out_smp_t             out_rd_data,
  // host: burst control
  input  logic                 start,
  input  logic [AW:0]          len,
  output logic                 busy,
  output logic                 done,
  output logic [AW:0]          clip_cnt
);

  logic                        mem_rd_en;
  logic [AW-1:0]               mem_rd_addr;
  in_smp_t [LANES-1:0]         blk;
  logic                        core_clear, core_valid, core_out_valid, core_sat;
  out_smp_t [PAR-1:0][M-1:0]   sub;
  logic                        out_wr_en;
  logic [AW-1:0]               out_wr_addr;

  sample_mem_in #(.LANES(LANES), .DEPTH(DEPTH)) u_mem_in (
    .clk     (clk),
    .wr_en   (in_wr_en),
    .wr_addr (in_wr_addr),
    .wr_data (in_wr_data),
    .rd_en   (mem_rd_en),
    .rd_addr (mem_rd_addr),
    .rd_data (blk)
  );

  burst_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .len            (len),
    .busy           (busy),
    .done           (done),
    .mem_rd_en      (mem_rd_en),
    .mem_rd_addr    (mem_rd_addr),
    .core_clear     (core_clear),
    .core_valid     (core_valid),
    .core_out_valid (core_out_valid),
    .out_wr_en      (out_wr_en),
    .out_wr_addr    (out_wr_addr)
  );

  fb_core #(.PAR(PAR), .LANES(LANES), .COEFS(COEFS)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (core_clear),
    .in_valid  (core_valid),
    .din       (blk),
    .out_valid (core_out_valid),
    .v         (sub),
    .sat       (core_sat)
  );

  sample_mem_out #(.PAR(PAR), .DEPTH(DEPTH)) u_mem_out (
    .clk     (clk),
    .wr_en   (out_wr_en),
    .wr_addr (out_wr_addr),
    .wr_data (sub),
    .rd_en   (out_rd_en),
    .rd_addr (out_rd_addr),
    .rd_data (out_rd_data)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                     clip_cnt <= '0;
    else if (start && !busy)        clip_cnt <= '0;
    else if (out_wr_en && core_sat) clip_cnt <= clip_cnt + 1'b1;

endmodule
