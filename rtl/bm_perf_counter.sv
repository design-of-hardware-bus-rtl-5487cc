// bm_perf_counter -- one performance counter (PC) set of the bus monitor.
//
// It accumulates, for the transactions the address decoder assigns to it:
// the read and write transaction counts, the bytes transferred, the number
// of cycles carrying a data beat (valid count), the summed transaction
// lengths (busy count) and two latency histograms.  Latencies are not given
// a counter per cycle value: a read latency falls into one of 8 intervals
// and a write latency into one of 4, and the 32-bit counter of that interval
// advances by one.  The interval limits are programmable: rd_bound holds the
// 7 (wr_bound the 3) ascending lower limits of intervals 1..7 (1..3);
// interval 0 takes everything below the first limit and the last interval
// everything from the last limit up.  The histogram scheme, the 8/4
// interval counts and the 32-bit width follow the monitor description; the
// limit encoding is this design's choice.
//
// Counting happens only while `active` is high; `clr` zeroes every counter
// and wins over counting.  Counters wrap.  Results appear on `counts` one
// cycle after the event.
module bm_perf_counter
  import hbmu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       active,
  input  logic       clr,
  input  pc_event_t  ev,
  input  logic [CNT_W-1:0] rd_bound [NUM_RD_BINS-1],
  input  logic [CNT_W-1:0] wr_bound [NUM_WR_BINS-1],
  output pc_counts_t counts
);

  // Interval index of a latency: the number of limits it reaches.
  function automatic int unsigned rd_bin(input logic [CNT_W-1:0] lat,
                                         input logic [CNT_W-1:0] b [NUM_RD_BINS-1]);
    int unsigned n = 0;
    for (int k = 0; k < NUM_RD_BINS - 1; k++) if (lat >= b[k]) n++;
    return n;
  endfunction

  function automatic int unsigned wr_bin(input logic [CNT_W-1:0] lat,
                                         input logic [CNT_W-1:0] b [NUM_WR_BINS-1]);
    int unsigned n = 0;
    for (int k = 0; k < NUM_WR_BINS - 1; k++) if (lat >= b[k]) n++;
    return n;
  endfunction

  int unsigned rbin, wbin;
  always_comb rbin = rd_bin(ev.rd_lat, rd_bound);
  always_comb wbin = wr_bin(ev.wr_lat, wr_bound);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counts <= '0;
    end else if (clr) begin
      counts <= '0;
    end else if (active) begin
      if (ev.rd_req) begin
        counts.tcr_rd <= counts.tcr_rd + CNT_W'(1);
        counts.tsr_rd <= counts.tsr_rd + CNT_W'(ev.rd_bytes);
      end
      if (ev.wr_req) begin
        counts.tcr_wr <= counts.tcr_wr + CNT_W'(1);
        counts.tsr_wr <= counts.tsr_wr + CNT_W'(ev.wr_bytes);
      end
      if (ev.rd_beat) counts.vc_rd <= counts.vc_rd + CNT_W'(1);
      if (ev.wr_beat) counts.vc_wr <= counts.vc_wr + CNT_W'(1);
      if (ev.rd_done) counts.bc_rd <= counts.bc_rd + ev.rd_busy;
      if (ev.wr_done) counts.bc_wr <= counts.bc_wr + ev.wr_busy;
      if (ev.rd_first) counts.rlc[rbin] <= counts.rlc[rbin] + CNT_W'(1);
      if (ev.wr_resp)  counts.wlc[wbin] <= counts.wlc[wbin] + CNT_W'(1);
    end
  end

endmodule
