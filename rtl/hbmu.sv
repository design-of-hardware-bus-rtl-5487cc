// hbmu -- hardware bus monitoring unit, the top level.
//
// Two independent measuring units share a clock and reset:
//  * the bus monitor unit (bus_monitor) watches one AXI bus, picked by a
//    distributor (bm_distributor) among the N_BM_PORTS master and slave
//    ports offered to it (8 = 6 + 2 by default), and measures
//    transactions, bytes, latency histograms, valid and busy cycles per
//    address range, plus four global clock counters; software drives it
//    over APB;
//  * the bus contention unit (bcu) watches the arbitration of an AXI
//    interconnect (6 masters x 2 slaves by default), counts per-device
//    conflicts on all five channels and requests clock gating once any
//    count exceeds 4.
// Their results go to the power management and clock generation units:
// the BMU through its registers and interrupt, the BCU through its
// counters, `cg_en` and the gated clock `gclk`.  The contention unit is
// enabled and cleared by the `bcu_en` and `bcu_clr` pins.  The split into
// these two units, the 6 x 2 interconnect and the gating threshold of 4
// come from the unit's published description; the enable/clear pins and
// selecting the monitored port by register are this design's own choices.
module hbmu
  import hbmu_pkg::*;
#(
  parameter int unsigned N_M = 6,
  parameter int unsigned N_S = 2,
  parameter int unsigned RD_OT = 8,
  parameter int unsigned WR_OT = 8,
  parameter logic [CNT_W-1:0] CG_THRESH = CNT_W'(4),
  parameter int unsigned N_BM_PORTS = N_M + N_S,
  localparam int unsigned MW = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SW = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // ---- bus monitor unit
  input  axi_mon_t      bm_ports [N_BM_PORTS],  // ports offered to the bus monitor
  input  logic          bm_ext_trig,
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [11:0]   paddr,
  input  logic [31:0]   pwdata,
  output logic [31:0]   prdata,
  output logic          pready,
  output logic          pslverr,
  output logic          bm_active,
  output logic          bm_irq,
  output logic [7:0]    bm_port_sel,           // port the monitor observes now
  // ---- bus contention unit
  input  logic          bcu_en,
  input  logic          bcu_clr,
  input  logic          m_arvalid [N_M],
  input  logic [SW-1:0] m_ardest  [N_M],
  input  logic          m_awvalid [N_M],
  input  logic [SW-1:0] m_awdest  [N_M],
  input  logic          m_wvalid  [N_M],
  input  logic [SW-1:0] m_wdest   [N_M],
  input  logic          s_arvalid [N_S],
  input  logic          s_arready [N_S],
  input  logic [MW-1:0] s_armaster[N_S],
  input  logic          s_awvalid [N_S],
  input  logic          s_awready [N_S],
  input  logic [MW-1:0] s_awmaster[N_S],
  input  logic          s_wvalid  [N_S],
  input  logic          s_wready  [N_S],
  input  logic          s_wlast   [N_S],
  input  logic [MW-1:0] s_wmaster [N_S],
  input  logic          s_rvalid  [N_S],
  input  logic [MW-1:0] s_rdest   [N_S],
  input  logic          s_bvalid  [N_S],
  input  logic [MW-1:0] s_bdest   [N_S],
  input  logic          m_rvalid  [N_M],
  input  logic          m_rready  [N_M],
  input  logic          m_rlast   [N_M],
  input  logic [SW-1:0] m_rslave  [N_M],
  input  logic          m_bvalid  [N_M],
  input  logic          m_bready  [N_M],
  input  logic [SW-1:0] m_bslave  [N_M],
  output logic [CNT_W-1:0] ar_cnt [N_M],
  output logic [CNT_W-1:0] aw_cnt [N_M],
  output logic [CNT_W-1:0] w_cnt  [N_M],
  output logic [CNT_W-1:0] r_cnt  [N_S],
  output logic [CNT_W-1:0] b_cnt  [N_S],
  output logic [4:0]    conflict,
  output logic          cg_en,
  output logic          gclk
);

  axi_mon_t   bm_bus;
  logic [7:0] dist_sel;
  logic       bm_enabled, bm_switched;

  bm_distributor #(.N_PORTS(N_BM_PORTS)) u_dist (
    .clk, .rst_n, .ports(bm_ports), .sel(dist_sel), .hold(bm_enabled),
    .bus(bm_bus), .sel_used(bm_port_sel), .switched(bm_switched)
  );

  bus_monitor #(.RD_OT(RD_OT), .WR_OT(WR_OT)) u_bmu (
    .clk, .rst_n, .bus(bm_bus), .ext_trig(bm_ext_trig), .flush(bm_switched),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .active(bm_active), .irq(bm_irq), .dist_sel, .enabled(bm_enabled)
  );

  bcu #(.N_M(N_M), .N_S(N_S), .W(CNT_W), .CG_THRESH(CG_THRESH)) u_bcu (
    .clk, .rst_n, .en(bcu_en), .clr(bcu_clr),
    .m_arvalid, .m_ardest, .m_awvalid, .m_awdest, .m_wvalid, .m_wdest,
    .s_arvalid, .s_arready, .s_armaster, .s_awvalid, .s_awready, .s_awmaster,
    .s_wvalid, .s_wready, .s_wlast, .s_wmaster,
    .s_rvalid, .s_rdest, .s_bvalid, .s_bdest,
    .m_rvalid, .m_rready, .m_rlast, .m_rslave, .m_bvalid, .m_bready, .m_bslave,
    .ar_cnt, .aw_cnt, .w_cnt, .r_cnt, .b_cnt, .conflict, .cg_en, .gclk
  );

endmodule
