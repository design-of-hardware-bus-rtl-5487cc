// bm_txn_detect -- transaction detection for the bus monitor.
//
// Watches the handshakes of one AXI bus and turns them into per-PC-set
// events (hbmu_pkg::pc_event_t).  A read transaction is caught when
// arvalid && arready, a write when awvalid && awready; the address decoder
// picks the PC set it belongs to, and the burst size (arlen+1)<<arsize is
// sent with the event.  Every accepted address is stored with a time stamp
// (a free-running cycle counter) and its PC set in a small queue, so that
// the later data and response handshakes can be charged to the right set
// and timed:
//   read latency  = cycles from the AR handshake to the first R beat
//   read busy     = cycles from the AR handshake to the rlast beat, inclusive
//   write busy    = cycles from the AW handshake to the wlast beat, inclusive
//   write latency = cycles from the AW handshake to the B handshake
// The queues assume responses return in address order (one ID stream or an
// in-order slave) and that write data does not run ahead of its address
// except in the same cycle.  These timing definitions, the in-order
// assumption and the queue depths are this design's choices; the monitor
// description only names the measured quantities.  Events are
// combinational outputs in the handshake cycle.  A handshake that finds its
// queue full or empty is not tracked and sets the sticky `untracked` flag.
// `flush` empties both queues (used when the observed port changes); it
// acts on the clock edge and the handshakes of that cycle are dropped.
module bm_txn_detect
  import hbmu_pkg::*;
#(
  parameter int unsigned RD_OT = 8,   // read transactions tracked at once
  parameter int unsigned WR_OT = 8    // write transactions tracked at once
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,               // clears the untracked flag
  input  logic      flush,             // forget all open transactions
  input  axi_mon_t  bus,
  input  pc_range_t range_cfg [NUM_PC],
  output pc_event_t ev [NUM_PC],
  output logic      ar_fire,
  output logic      aw_fire,
  output logic      untracked
);

  localparam int unsigned RPW = (RD_OT > 1) ? $clog2(RD_OT) : 1;
  localparam int unsigned WPW = (WR_OT > 1) ? $clog2(WR_OT) : 1;

  logic [CNT_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + CNT_W'(1);
  end

  // ---------------------------------------------------------------- decode
  logic [NUM_PC-1:0] ar_hit, aw_hit;
  bm_addr_decoder u_ar_dec (.addr(bus.araddr), .id(bus.arid), .range_cfg, .hit(ar_hit));
  bm_addr_decoder u_aw_dec (.addr(bus.awaddr), .id(bus.awid), .range_cfg, .hit(aw_hit));

  assign ar_fire = bus.arvalid && bus.arready;
  assign aw_fire = bus.awvalid && bus.awready;
  logic r_fire, w_fire, b_fire;
  assign r_fire = bus.rvalid && bus.rready;
  assign w_fire = bus.wvalid && bus.wready;
  assign b_fire = bus.bvalid && bus.bready;

  // ------------------------------------------------------------ read queue
  logic [CNT_W-1:0]  rq_ts  [RD_OT];
  logic [NUM_PC-1:0] rq_pc  [RD_OT];
  logic [RPW-1:0]    rq_wp, rq_rp;
  logic [RPW:0]      rq_n;
  logic              rq_started;     // head has delivered its first beat

  logic rq_push, rq_pop, r_tracked;
  assign r_tracked = r_fire && (rq_n != '0);
  assign rq_push   = ar_fire && (rq_n != (RPW+1)'(RD_OT));
  assign rq_pop    = r_tracked && bus.rlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_wp <= '0; rq_rp <= '0; rq_n <= '0; rq_started <= 1'b0;
      for (int i = 0; i < RD_OT; i++) begin
        rq_ts[i] <= '0; rq_pc[i] <= '0;
      end
    end else if (flush) begin
      rq_wp <= '0; rq_rp <= '0; rq_n <= '0; rq_started <= 1'b0;
    end else begin
      if (rq_push) begin
        rq_ts[rq_wp] <= now;
        rq_pc[rq_wp] <= ar_hit;
        rq_wp <= (rq_wp == RPW'(RD_OT - 1)) ? '0 : rq_wp + RPW'(1);
      end
      if (rq_pop) rq_rp <= (rq_rp == RPW'(RD_OT - 1)) ? '0 : rq_rp + RPW'(1);
      rq_n <= rq_n + (RPW+1)'(rq_push) - (RPW+1)'(rq_pop);
      if (rq_pop)         rq_started <= 1'b0;
      else if (r_tracked) rq_started <= 1'b1;
    end
  end

  // ----------------------------------------------------------- write queue
  // Entries from wq_bp to wq_dp await their response, from wq_dp to wq_ap
  // their data.
  logic [CNT_W-1:0]  wq_ts [WR_OT];
  logic [NUM_PC-1:0] wq_pc [WR_OT];
  logic [WPW-1:0]    wq_ap, wq_dp, wq_bp;
  logic [WPW:0]      wq_n, wq_ndata;      // all entries / entries awaiting data

  logic wq_push, w_tracked, w_new, wq_data_done, b_tracked;
  logic [CNT_W-1:0]  w_ts;
  logic [NUM_PC-1:0] w_pc;
  assign wq_push   = aw_fire && (wq_n != (WPW+1)'(WR_OT));
  // A beat belongs to the oldest entry still waiting for data, or to the
  // address accepted in the same cycle.
  assign w_new     = (wq_ndata == '0) && wq_push;
  assign w_tracked = w_fire && ((wq_ndata != '0) || wq_push);
  assign w_ts      = w_new ? now    : wq_ts[wq_dp];
  assign w_pc      = w_new ? aw_hit : wq_pc[wq_dp];
  assign wq_data_done = w_tracked && bus.wlast;
  assign b_tracked = b_fire && ((wq_n - wq_ndata) != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq_ap <= '0; wq_dp <= '0; wq_bp <= '0; wq_n <= '0; wq_ndata <= '0;
      for (int i = 0; i < WR_OT; i++) begin
        wq_ts[i] <= '0; wq_pc[i] <= '0;
      end
    end else if (flush) begin
      wq_ap <= '0; wq_dp <= '0; wq_bp <= '0; wq_n <= '0; wq_ndata <= '0;
    end else begin
      if (wq_push) begin
        wq_ts[wq_ap] <= now;
        wq_pc[wq_ap] <= aw_hit;
        wq_ap <= (wq_ap == WPW'(WR_OT - 1)) ? '0 : wq_ap + WPW'(1);
      end
      if (wq_data_done) wq_dp <= (wq_dp == WPW'(WR_OT - 1)) ? '0 : wq_dp + WPW'(1);
      if (b_tracked)    wq_bp <= (wq_bp == WPW'(WR_OT - 1)) ? '0 : wq_bp + WPW'(1);
      wq_n     <= wq_n + (WPW+1)'(wq_push) - (WPW+1)'(b_tracked);
      wq_ndata <= wq_ndata + (WPW+1)'(wq_push) - (WPW+1)'(wq_data_done);
    end
  end

  // ---------------------------------------------------------------- events
  logic [CNT_W-1:0] r_age, w_age, b_age;
  assign r_age = now - rq_ts[rq_rp];
  assign w_age = now - w_ts;
  assign b_age = now - wq_ts[wq_bp];

  always_comb begin
    for (int i = 0; i < NUM_PC; i++) begin
      ev[i] = '0;
      ev[i].rd_req   = ar_fire && ar_hit[i];
      ev[i].rd_bytes = burst_bytes(bus.arlen, bus.arsize);
      ev[i].wr_req   = aw_fire && aw_hit[i];
      ev[i].wr_bytes = burst_bytes(bus.awlen, bus.awsize);
      ev[i].rd_beat  = r_tracked && rq_pc[rq_rp][i];
      ev[i].rd_first = r_tracked && rq_pc[rq_rp][i] && !rq_started;
      ev[i].rd_lat   = r_age;
      ev[i].rd_done  = rq_pop && rq_pc[rq_rp][i];
      ev[i].rd_busy  = r_age + CNT_W'(1);
      ev[i].wr_beat  = w_tracked && w_pc[i];
      ev[i].wr_done  = wq_data_done && w_pc[i];
      ev[i].wr_busy  = w_age + CNT_W'(1);
      ev[i].wr_resp  = b_tracked && wq_pc[wq_bp][i];
      ev[i].wr_lat   = b_age;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) untracked <= 1'b0;
    else if (clr) untracked <= 1'b0;
    else if ((ar_fire && !rq_push) || (aw_fire && !wq_push) ||
             (r_fire && !r_tracked) || (w_fire && !w_tracked) ||
             (b_fire && !b_tracked)) untracked <= 1'b1;
  end

endmodule
