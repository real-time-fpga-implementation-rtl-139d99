// fb_dual_pol: dual-polarization filter-bank pair, the front end of a
// digitally sub-banded coherent DFT-spread OFDM receiver.
//
// A coherent receiver samples the X and Y polarizations of a 25 GHz
// optical channel at 26.6 GS/s each. Each polarization goes through its
// own 16-channel, twice-oversampled analysis filter bank, which carves
// the spectrum into 1.66 GHz slices at 3.33 GS/s each; slow sub-band
// receivers downstream (outside this RTL) take the matching X and Y
// slices. This top holds the two filter-bank systems, one per
// polarization, started together by one control port so both process
// time-aligned bursts. The pairing of one bank per polarization follows
// the design description; the shared start/len and the combined done are
// this design's choices.
//
// Ports: for each polarization (x_..., y_...) a host write port for input
// samples and a host read port for sub-band samples, as in fb_system.
// start (ignored while busy) runs a burst of len blocks on both; done is
// high once both have finished. Timing: len + 8 cycles from start to
// done.
module fb_dual_pol
  import fb_pkg::*;
#(
  parameter int unsigned PAR   = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned LANES = PAR * D,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LW    = $clog2(LANES),
  localparam int unsigned SW    = $clog2(PAR * M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // X polarization
  input  logic                 x_wr_en,
  input  logic [AW+LW-1:0]     x_wr_addr,
  input  in_smp_t              x_wr_data,
  input  logic                 x_rd_en,
  input  logic [AW+SW-1:0]     x_rd_addr,
  output out_smp_t             x_rd_data,
  output logic [AW:0]          x_clip_cnt,
  // Y polarization
  input  logic                 y_wr_en,
  input  logic [AW+LW-1:0]     y_wr_addr,
  input  in_smp_t              y_wr_data,
  input  logic                 y_rd_en,
  input  logic [AW+SW-1:0]     y_rd_addr,
  output out_smp_t             y_rd_data,
  output logic [AW:0]          y_clip_cnt,
  // burst control, shared
  input  logic                 start,
  input  logic [AW:0]          len,
  output logic                 busy,
  output logic                 done
);

  logic x_busy, y_busy, x_done, y_done;

  fb_system #(.PAR(PAR), .DEPTH(DEPTH)) u_pol_x (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_wr_en    (x_wr_en),
    .in_wr_addr  (x_wr_addr),
    .in_wr_data  (x_wr_data),
    .out_rd_en   (x_rd_en),
    .out_rd_addr (x_rd_addr),
    .out_rd_data (x_rd_data),
    .start       (start && !busy),
    .len         (len),
    .busy        (x_busy),
    .done        (x_done),
    .clip_cnt    (x_clip_cnt)
  );

  fb_system #(.PAR(PAR), .DEPTH(DEPTH)) u_pol_y (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_wr_en    (y_wr_en),
    .in_wr_addr  (y_wr_addr),
    .in_wr_data  (y_wr_data),
    .out_rd_en   (y_rd_en),
    .out_rd_addr (y_rd_addr),
    .out_rd_data (y_rd_data),
    .start       (start && !busy),
    .len         (len),
    .busy        (y_busy),
    .done        (y_done),
    .clip_cnt    (y_clip_cnt)
  );

  assign busy = x_busy | y_busy;
  assign done = x_done & y_done;

  // Both polarizations run the same burst in lock step.
  a_pol_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    x_busy == y_busy);

endmodule
