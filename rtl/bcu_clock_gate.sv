// bcu_clock_gate -- contention-driven clock gating of the bus contention unit.
//
// Watches all contention counters and requests clock gating as soon as any
// of them is greater than the threshold (4 by default, the value the
// contention unit description uses).  `cg_en` is registered and stays high
// until the counters are cleared below the threshold.  It goes to the clock
// generation unit, and a glitch-free gate is provided here as well: the
// enable of `gclk` is sampled on the falling edge of `clk`, so `gclk`
// (clk AND enable) stops low, in whole cycles, while gating is requested.
// Which clock domain the gated clock drives is not given by the
// description; the threshold compare follows it, the gate cell is this
// design's choice.  cg_en follows the counters by one cycle, gclk stops
// half a cycle after that.
module bcu_clock_gate #(
  parameter int unsigned N      = 22,
  parameter int unsigned W      = 32,
  parameter logic [W-1:0] THRESH = W'(4)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] cnt [N],
  output logic         cg_en,
  output logic         gclk
);

  logic over;
  always_comb begin
    over = 1'b0;
    for (int i = 0; i < N; i++) if (cnt[i] > THRESH) over = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cg_en <= 1'b0;
    else        cg_en <= over;
  end

  logic run_q;   // clock enable, changes only while clk is low
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) run_q <= 1'b1;
    else        run_q <= !cg_en;
  end
  assign gclk = clk && run_q;

endmodule
