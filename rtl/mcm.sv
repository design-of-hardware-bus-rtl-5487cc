// mcm -- master contention monitor of the bus contention unit.
//
// Sits beside an AXI interconnect with N_M masters and N_S slaves (6 x 2 in
// the reference configuration) and counts, for every master Mx, its
// conflicts with other masters on the read address, write address and
// write data channels.  For each slave-side port it observes the transfer
// handshake and the arbiter's grant (which master owns the transfer: the
// "address master" or "write master"), and for each master its valid and
// the router's destination slave.  A conflict is counted for the granted
// master when a transfer starts while another master is requesting the
// same slave.  Read and write address conflicts are kept in separate
// counters; a write burst is counted once, at its first data beat.  The
// channel set and the rule follow the contention monitor description; the
// port shape, the separate AR/AW counters and per-burst counting of W are
// this design's choices.  Counts appear one cycle after the transfer.
module mcm #(
  parameter int unsigned N_M = 6,
  parameter int unsigned N_S = 2,
  parameter int unsigned W   = 32,
  localparam int unsigned MW = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SW = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  // per master: request and routed destination
  input  logic          m_arvalid [N_M],
  input  logic [SW-1:0] m_ardest  [N_M],
  input  logic          m_awvalid [N_M],
  input  logic [SW-1:0] m_awdest  [N_M],
  input  logic          m_wvalid  [N_M],
  input  logic [SW-1:0] m_wdest   [N_M],
  // per slave-side port: handshake and granted master
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
  // conflict counts per master
  output logic [W-1:0]  ar_cnt [N_M],
  output logic [W-1:0]  aw_cnt [N_M],
  output logic [W-1:0]  w_cnt  [N_M],
  output logic [2:0]    conflict       // [0] AR, [1] AW, [2] W this cycle
);

  logic one [N_S];
  always_comb for (int s = 0; s < N_S; s++) one[s] = 1'b1;

  logic [N_S-1:0] c_ar, c_aw, c_w;

  cm_channel #(.N_SRC(N_M), .N_DST(N_S), .W(W), .PER_BURST(1'b0)) u_ar (
    .clk, .rst_n, .en, .clr,
    .src_valid(m_arvalid), .src_dest(m_ardest),
    .dst_valid(s_arvalid), .dst_ready(s_arready), .dst_last(one), .dst_grant(s_armaster),
    .cnt(ar_cnt), .conflict(c_ar)
  );

  cm_channel #(.N_SRC(N_M), .N_DST(N_S), .W(W), .PER_BURST(1'b0)) u_aw (
    .clk, .rst_n, .en, .clr,
    .src_valid(m_awvalid), .src_dest(m_awdest),
    .dst_valid(s_awvalid), .dst_ready(s_awready), .dst_last(one), .dst_grant(s_awmaster),
    .cnt(aw_cnt), .conflict(c_aw)
  );

  cm_channel #(.N_SRC(N_M), .N_DST(N_S), .W(W), .PER_BURST(1'b1)) u_w (
    .clk, .rst_n, .en, .clr,
    .src_valid(m_wvalid), .src_dest(m_wdest),
    .dst_valid(s_wvalid), .dst_ready(s_wready), .dst_last(s_wlast), .dst_grant(s_wmaster),
    .cnt(w_cnt), .conflict(c_w)
  );

  assign conflict = {|c_w, |c_aw, |c_ar};

endmodule
