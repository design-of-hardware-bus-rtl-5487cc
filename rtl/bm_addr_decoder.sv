// bm_addr_decoder -- routes an observed AXI transaction to one performance
// counter (PC) set.
//
// The bus monitor keeps one PC set per programmable address range so that
// the traffic of a master can be split by destination; an optional ID match
// per set restricts a set to one source when the monitor sits on a slave
// bus.  A set matches when base <= addr <= limit and, if its ID filter is
// enabled, the transaction ID equals the programmed ID.  When ranges
// overlap the lowest-numbered matching set wins, so a transaction is counted
// at most once (this priority is a design choice).  Purely combinational.
module bm_addr_decoder
  import hbmu_pkg::*;
#(
  parameter int unsigned N_PC = NUM_PC
) (
  input  logic [AXI_ADDR_W-1:0] addr,
  input  logic [AXI_ID_W-1:0]   id,
  input  pc_range_t             range_cfg [N_PC],
  output logic [N_PC-1:0]       hit        // one-hot or zero
);

  logic [N_PC-1:0] match;

  always_comb begin
    for (int i = 0; i < N_PC; i++) begin
      match[i] = (addr >= range_cfg[i].base) && (addr <= range_cfg[i].limit) &&
                 (!range_cfg[i].id_en || (id == range_cfg[i].id));
    end
    hit = '0;
    for (int i = N_PC - 1; i >= 0; i--) begin
      if (match[i]) hit = N_PC'(1) << i;
    end
  end

endmodule
