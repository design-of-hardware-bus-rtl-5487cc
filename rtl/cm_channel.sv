// cm_channel -- contention counting on one arbitrated AXI channel.
//
// Several sources (masters on an address or write data channel, slaves on
// a read data or write response channel) compete for destinations through
// the interconnect.  At each destination the interconnect's arbiter gives
// the channel to one source, named by `dst_grant`.  When a transfer starts
// there (valid && ready, and for a burst channel only its first beat) while
// another source also asserts valid towards the same destination (its route
// `src_dest` names it), that is a contention, and the counter of the
// granted source advances by one.  The counter of source x therefore holds
// the number of conflicts between x and the other sources.  This rule
// follows the contention monitor description; counting a burst once, at its
// first beat, is this design's choice.  Counters are 32 bit and wrap; they
// count only while `en` is high and are zeroed by `clr`.  A count shows on
// `cnt` one cycle after the transfer; `conflict` flags it in that cycle.
module cm_channel #(
  parameter int unsigned N_SRC     = 6,
  parameter int unsigned N_DST     = 2,
  parameter int unsigned W         = 32,
  parameter bit          PER_BURST = 1'b0,   // count once per burst (uses dst_last)
  localparam int unsigned SW = (N_SRC > 1) ? $clog2(N_SRC) : 1,
  localparam int unsigned DW = (N_DST > 1) ? $clog2(N_DST) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  logic          src_valid [N_SRC],
  input  logic [DW-1:0] src_dest  [N_SRC],
  input  logic          dst_valid [N_DST],
  input  logic          dst_ready [N_DST],
  input  logic          dst_last  [N_DST],
  input  logic [SW-1:0] dst_grant [N_DST],
  output logic [W-1:0]  cnt       [N_SRC],
  output logic [N_DST-1:0] conflict
);

  logic [N_DST-1:0] in_burst, fire, start;

  always_comb begin
    for (int d = 0; d < N_DST; d++) begin
      fire[d]     = dst_valid[d] && dst_ready[d];
      start[d]    = fire[d] && (!PER_BURST || !in_burst[d]);
      conflict[d] = 1'b0;
      for (int i = 0; i < N_SRC; i++) begin
        if (start[d] && (SW'(i) != dst_grant[d]) && src_valid[i] &&
            (src_dest[i] == DW'(d)))
          conflict[d] = 1'b1;
      end
    end
  end

  // Conflicts charged to each source this cycle (one per destination).
  logic [W-1:0] inc [N_SRC];
  always_comb begin
    for (int i = 0; i < N_SRC; i++) begin
      inc[i] = '0;
      for (int d = 0; d < N_DST; d++)
        if (conflict[d] && (dst_grant[d] == SW'(i))) inc[i] = inc[i] + W'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_burst <= '0;
      for (int i = 0; i < N_SRC; i++) cnt[i] <= '0;
    end else begin
      for (int d = 0; d < N_DST; d++)
        if (fire[d]) in_burst[d] <= PER_BURST && !dst_last[d];
      if (clr) begin
        for (int i = 0; i < N_SRC; i++) cnt[i] <= '0;
      end else if (en) begin
        for (int i = 0; i < N_SRC; i++) cnt[i] <= cnt[i] + inc[i];
      end
    end
  end

endmodule
