// scm -- slave contention monitor of the bus contention unit.
//
// The mirror image of the master contention monitor: it counts, for every
// slave Sx of an AXI interconnect with N_S slaves and N_M masters (2 x 6 in
// the reference configuration), its conflicts with other slaves on the read
// data and write response channels.  For each master-side port it observes
// the R (or B) handshake and the arbiter's grant (the "read slave" or
// "response slave" that owns the transfer), and for each slave its valid
// and the router's destination master.  A conflict is counted for the
// granted slave when a transfer starts while another slave is presenting a
// response to the same master.  A read burst is counted once, at its first
// beat.  The channels and the rule follow the contention monitor
// description; the port shape and per-burst counting are this design's
// choices.  Counts appear one cycle after the transfer.
module scm #(
  parameter int unsigned N_S = 2,
  parameter int unsigned N_M = 6,
  parameter int unsigned W   = 32,
  localparam int unsigned MW = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned SW = (N_S > 1) ? $clog2(N_S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  // per slave: response pending and routed destination master
  input  logic          s_rvalid [N_S],
  input  logic [MW-1:0] s_rdest  [N_S],
  input  logic          s_bvalid [N_S],
  input  logic [MW-1:0] s_bdest  [N_S],
  // per master-side port: handshake and granted slave
  input  logic          m_rvalid [N_M],
  input  logic          m_rready [N_M],
  input  logic          m_rlast  [N_M],
  input  logic [SW-1:0] m_rslave [N_M],
  input  logic          m_bvalid [N_M],
  input  logic          m_bready [N_M],
  input  logic [SW-1:0] m_bslave [N_M],
  // conflict counts per slave
  output logic [W-1:0]  r_cnt [N_S],
  output logic [W-1:0]  b_cnt [N_S],
  output logic [1:0]    conflict       // [0] R, [1] B this cycle
);

  logic one [N_M];
  always_comb for (int m = 0; m < N_M; m++) one[m] = 1'b1;

  logic [N_M-1:0] c_r, c_b;

  cm_channel #(.N_SRC(N_S), .N_DST(N_M), .W(W), .PER_BURST(1'b1)) u_r (
    .clk, .rst_n, .en, .clr,
    .src_valid(s_rvalid), .src_dest(s_rdest),
    .dst_valid(m_rvalid), .dst_ready(m_rready), .dst_last(m_rlast), .dst_grant(m_rslave),
    .cnt(r_cnt), .conflict(c_r)
  );

  cm_channel #(.N_SRC(N_S), .N_DST(N_M), .W(W), .PER_BURST(1'b0)) u_b (
    .clk, .rst_n, .en, .clr,
    .src_valid(s_bvalid), .src_dest(s_bdest),
    .dst_valid(m_bvalid), .dst_ready(m_bready), .dst_last(one), .dst_grant(m_bslave),
    .cnt(b_cnt), .conflict(c_b)
  );

  assign conflict = {|c_b, |c_r};

endmodule
