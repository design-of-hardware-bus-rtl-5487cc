// bcu -- bus contention unit: master and slave contention monitors plus
// contention-driven clock gating.
//
// The master contention monitor counts, per master, conflicts on the read
// address, write address and write data channels; the slave contention
// monitor counts, per slave, conflicts on the read data and write response
// channels (see mcm, scm).  When any of these counters exceeds CG_THRESH
// (4, as in the contention unit description) the unit raises `cg_en` for
// the clock generation unit and stops the gated clock `gclk`.  Counting runs
// while `en` is high; `clr` zeroes every counter, which also withdraws the
// gating request.  The interconnect signals it observes are listed at mcm
// and scm; the 6-master, 2-slave default is the reference configuration.
module bcu #(
  parameter int unsigned N_M = 6,
  parameter int unsigned N_S = 2,
  parameter int unsigned W   = 32,
  parameter logic [W-1:0] CG_THRESH = W'(4),
  localparam int unsigned MW = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SW = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  // master contention monitor
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
  // slave contention monitor
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
  // results
  output logic [W-1:0]  ar_cnt [N_M],
  output logic [W-1:0]  aw_cnt [N_M],
  output logic [W-1:0]  w_cnt  [N_M],
  output logic [W-1:0]  r_cnt  [N_S],
  output logic [W-1:0]  b_cnt  [N_S],
  output logic [4:0]    conflict,     // [0] AR [1] AW [2] W [3] R [4] B this cycle
  output logic          cg_en,
  output logic          gclk
);

  localparam int unsigned N_CNT = 3 * N_M + 2 * N_S;

  logic [2:0] mcm_conflict;
  logic [1:0] scm_conflict;

  mcm #(.N_M(N_M), .N_S(N_S), .W(W)) u_mcm (
    .clk, .rst_n, .en, .clr,
    .m_arvalid, .m_ardest, .m_awvalid, .m_awdest, .m_wvalid, .m_wdest,
    .s_arvalid, .s_arready, .s_armaster, .s_awvalid, .s_awready, .s_awmaster,
    .s_wvalid, .s_wready, .s_wlast, .s_wmaster,
    .ar_cnt, .aw_cnt, .w_cnt, .conflict(mcm_conflict)
  );

  scm #(.N_S(N_S), .N_M(N_M), .W(W)) u_scm (
    .clk, .rst_n, .en, .clr,
    .s_rvalid, .s_rdest, .s_bvalid, .s_bdest,
    .m_rvalid, .m_rready, .m_rlast, .m_rslave, .m_bvalid, .m_bready, .m_bslave,
    .r_cnt, .b_cnt, .conflict(scm_conflict)
  );

  assign conflict = {scm_conflict, mcm_conflict};

  logic [W-1:0] all_cnt [N_CNT];
  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      all_cnt[m]           = ar_cnt[m];
      all_cnt[N_M + m]     = aw_cnt[m];
      all_cnt[2 * N_M + m] = w_cnt[m];
    end
    for (int s = 0; s < N_S; s++) begin
      all_cnt[3 * N_M + s]       = r_cnt[s];
      all_cnt[3 * N_M + N_S + s] = b_cnt[s];
    end
  end

  bcu_clock_gate #(.N(N_CNT), .W(W), .THRESH(CG_THRESH)) u_cg (
    .clk, .rst_n, .cnt(all_cnt), .cg_en, .gclk
  );

endmodule
