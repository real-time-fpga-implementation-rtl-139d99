// burst_ctrl: runs the filter bank over the input memory in one
// full-speed burst and collects the results in the output memory.
//
// The filter bank runs at full rate, but only in bursts between which the
// host fills the input memory and empties the output memory. On start
// (ignored while busy) the controller clears the core's delay lines for
// one cycle, then reads blocks 0 .. len-1 of the input memory on
// consecutive clocks, so the core sees an unbroken stream at full rate.
// Every valid core output is written to the next output-memory word. When
// len words have been written it drops busy and raises done, which stays
// high until the next start. len = 0 completes at once.
// The burst operation follows the design description; the state machine,
// the clear cycle and the start/len/busy/done handshake are this design's.
//
// Timing: done rises len + 2 + L clock edges after the edge that samples
// start, where L is the core latency from core_valid to core_out_valid
// (1 clear cycle, len reads, 1 memory read register, L, last write).
module burst_ctrl #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host control
  input  logic            start,
  input  logic [AW:0]     len,
  output logic            busy,
  output logic            done,
  // input memory burst port
  output logic            mem_rd_en,
  output logic [AW-1:0]   mem_rd_addr,
  // filter bank core
  output logic            core_clear,
  output logic            core_valid,
  input  logic            core_out_valid,
  // output memory burst port
  output logic            out_wr_en,
  output logic [AW-1:0]   out_wr_addr
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [AW:0] len_q, rd_cnt, wr_cnt;

  assign busy        = (state != S_IDLE);
  assign core_clear  = (state == S_CLEAR);
  assign mem_rd_en   = (state == S_RUN);
  assign mem_rd_addr = rd_cnt[AW-1:0];
  assign out_wr_en   = core_out_valid && (state == S_DRAIN || state == S_RUN);
  assign out_wr_addr = wr_cnt[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      len_q      <= '0;
      rd_cnt     <= '0;
      wr_cnt     <= '0;
      core_valid <= 1'b0;
    end else begin
      // the input memory answers one cycle after the read
      core_valid <= mem_rd_en;
      if (out_wr_en) wr_cnt <= wr_cnt + 1'b1;
      unique case (state)
        S_IDLE:
          if (start) begin
            done   <= 1'b0;
            len_q  <= len;
            rd_cnt <= '0;
            wr_cnt <= '0;
            state  <= S_CLEAR;
          end
        S_CLEAR:
          if (len_q == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_RUN;
          end
        S_RUN: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt + 1'b1 == len_q) state <= S_DRAIN;
        end
        S_DRAIN:
          if (out_wr_en && wr_cnt + 1'b1 == len_q) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // No more results may come back than blocks were sent in.
  a_no_extra_write: assert property (@(posedge clk) disable iff (!rst_n)
    out_wr_en |-> wr_cnt < len_q);

endmodule
