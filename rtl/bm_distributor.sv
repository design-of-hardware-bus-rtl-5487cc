// bm_distributor -- connects one of several AXI ports to a bus monitor.
//
// Instead of one bus monitor per port, the master and slave ports of the
// interconnect are brought to a distributor, and software picks the port
// that the monitor observes, so fewer monitors are needed.  Only that
// purpose is given in the monitor description; the simplest form is built
// here: a multiplexer of N_PORTS observed buses, steered by `sel` (the
// DIST_SEL register).  The selection is registered and only taken over
// while `hold` is low (the monitor is not enabled), so that the observed
// bus never changes in the middle of a measurement.  Out-of-range
// selections observe an idle bus.  `bus` is combinational from the
// selected port; a new selection is used from the cycle after it is taken,
// and `switched` marks that cycle so the monitor can drop transactions it
// was tracking on the old port.
module bm_distributor
  import hbmu_pkg::*;
#(
  parameter int unsigned N_PORTS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_mon_t ports [N_PORTS],
  input  logic [7:0] sel,
  input  logic     hold,
  output axi_mon_t bus,
  output logic [7:0] sel_used,
  output logic     switched       // one cycle: a new port is observed from now
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_used <= '0;
      switched <= 1'b0;
    end else begin
      switched <= !hold && (sel != sel_used);
      if (!hold) sel_used <= sel;
    end
  end

  always_comb begin
    bus = '0;
    for (int p = 0; p < N_PORTS; p++)
      if (sel_used == 8'(p)) bus = ports[p];
  end

endmodule
