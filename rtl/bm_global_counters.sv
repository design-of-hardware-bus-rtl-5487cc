// bm_global_counters -- the bus monitor's four general-purpose 64-bit clock
// counters.
//
// Each counter measures the number of clock cycles of a chosen interval: it
// advances by one in every cycle in which its enable is high and the monitor
// is active, and is cleared by its clear bit (clear wins over counting).
// They sit outside the performance counter sets, as in the monitor
// description.  Count and width follow that description; the per-counter
// enable/clear interface is this design's choice.  A count is visible on
// `cnt` in the cycle after the clock edge that made it.
module bm_global_counters
  import hbmu_pkg::*;
#(
  parameter int unsigned N = NUM_GCC,
  parameter int unsigned W = GCC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active,   // monitoring is running
  input  logic [N-1:0] en,       // per-counter enable
  input  logic [N-1:0] clr,      // per-counter synchronous clear
  output logic [W-1:0] cnt [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clr[i])                cnt[i] <= '0;
        else if (active && en[i])  cnt[i] <= cnt[i] + W'(1);
      end
    end
  end

endmodule
