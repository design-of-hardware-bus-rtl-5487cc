// bus_monitor -- bus monitor unit (BMU): passive performance monitor for one
// AXI bus.
//
// The transaction detector catches every AXI transaction, the address
// decoder sends it to one of three performance counter (PC) sets by address
// range (and optionally by transaction ID), and each set counts
// transactions, bytes, valid cycles, busy cycles and read/write latency
// histograms.  Four 64-bit global clock counters stand apart from the PC
// sets.  Everything is set up and read through an APB register file (see
// bm_apb_regs for the map).  This structure follows the monitor
// description.  The port the monitor observes is chosen by a distributor
// outside it (bm_distributor); the DIST_SEL register and CTRL.EN steer it
// through `dist_sel` and `enabled`.
//
// Start and stop: monitoring runs while CTRL.EN is set.  If a trigger is
// enabled, monitoring waits after EN until either `ext_trig` is high (the
// `active` output of another monitor, or any control signal) or a
// transaction to TRIG_ADDR is seen; that transaction is already counted.
// Clearing EN stops monitoring and re-arms the trigger.  `active` is
// brought out so that monitors can be chained.  Interrupt: `irq` rises
// (when CTRL.IRQ_EN) once a PC set's read+write transaction count reaches
// TXN_THR, or when a transaction's latency is at least LAT_THR.  The
// trigger and interrupt conditions are this design's choices; the
// description says only that they exist.
module bus_monitor
  import hbmu_pkg::*;
#(
  parameter int unsigned RD_OT = 8,
  parameter int unsigned WR_OT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_mon_t    bus,
  input  logic        ext_trig,
  input  logic        flush,          // observed bus changed: drop open transactions
  // APB
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        active,
  output logic        irq,
  // to the distributor in front of the monitor
  output logic [7:0]  dist_sel,
  output logic        enabled          // CTRL.EN: freezes the port selection
);

  logic ctrl_en, ext_trig_en, addr_trig_en, pc_clr, untracked;
  logic [NUM_GCC-1:0] gcc_en, gcc_clr;
  logic [AXI_ADDR_W-1:0] trig_addr;
  logic [CNT_W-1:0] txn_thr, lat_thr;
  pc_range_t  range_cfg [NUM_PC];
  logic [CNT_W-1:0] rd_bound [NUM_RD_BINS-1];
  logic [CNT_W-1:0] wr_bound [NUM_WR_BINS-1];
  pc_event_t  ev [NUM_PC];
  pc_counts_t pc_counts [NUM_PC];
  logic [GCC_W-1:0] gcc [NUM_GCC];
  logic ar_fire, aw_fire;
  logic [1:0] irq_set;

  bm_apb_regs u_regs (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .ctrl_en, .ext_trig_en, .addr_trig_en, .gcc_en, .gcc_clr, .pc_clr,
    .trig_addr, .txn_thr, .lat_thr, .dist_sel, .range_cfg, .rd_bound, .wr_bound,
    .active, .untracked, .irq_set, .pc_counts, .gcc, .irq
  );

  bm_txn_detect #(.RD_OT(RD_OT), .WR_OT(WR_OT)) u_detect (
    .clk, .rst_n, .clr(pc_clr), .flush, .bus, .range_cfg, .ev, .ar_fire, .aw_fire, .untracked
  );

  for (genvar p = 0; p < NUM_PC; p++) begin : g_pc
    bm_perf_counter u_pc (
      .clk, .rst_n, .active, .clr(pc_clr), .ev(ev[p]),
      .rd_bound, .wr_bound, .counts(pc_counts[p])
    );
  end

  bm_global_counters u_gcc (
    .clk, .rst_n, .active, .en(gcc_en), .clr(gcc_clr), .cnt(gcc)
  );

  // ------------------------------------------------------------ start/stop
  logic triggered, trig_now;
  assign trig_now = (ext_trig_en && ext_trig) ||
                    (addr_trig_en && ((ar_fire && bus.araddr == trig_addr) ||
                                      (aw_fire && bus.awaddr == trig_addr)));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        triggered <= 1'b0;
    else if (!ctrl_en) triggered <= 1'b0;
    else if (trig_now) triggered <= 1'b1;
  end
  assign enabled = ctrl_en;
  assign active = ctrl_en && ((!ext_trig_en && !addr_trig_en) || triggered || trig_now);

  // ------------------------------------------------------------- interrupt
  logic txn_reached, txn_reached_q, lat_over;
  always_comb begin
    txn_reached = 1'b0;
    lat_over    = 1'b0;
    for (int p = 0; p < NUM_PC; p++) begin
      if (pc_counts[p].tcr_rd + pc_counts[p].tcr_wr >= txn_thr) txn_reached = 1'b1;
      if ((ev[p].rd_first && ev[p].rd_lat >= lat_thr) ||
          (ev[p].wr_resp  && ev[p].wr_lat >= lat_thr)) lat_over = 1'b1;
    end
    txn_reached = txn_reached && (txn_thr != '0);
    lat_over    = lat_over && active && (lat_thr != '0);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) txn_reached_q <= 1'b0;
    else        txn_reached_q <= txn_reached;
  end
  assign irq_set = {lat_over, txn_reached && !txn_reached_q};

  // AXI handshake rules the monitor relies on.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                           bus.arvalid && !bus.arready |=> bus.arvalid)
    else $error("arvalid dropped before arready");
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                bus.awvalid && !bus.awready |=> bus.awvalid)
    else $error("awvalid dropped before awready");

endmodule
