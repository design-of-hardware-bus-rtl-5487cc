// bm_apb_regs -- APB register file of the bus monitor.
//
// Software starts and stops monitoring, programs the monitoring conditions
// (address ranges, ID filters, latency interval limits, triggers, interrupt
// thresholds) and fetches the measured values through this APB slave.  The
// monitor description gives only that a control register with an APB
// interface and a set of set-up and result registers exist; the map below,
// the bit layout and the reset values are this design's choices.
//
// Byte offsets (32-bit registers, paddr[1:0] ignored):
//   0x000 CTRL    [0] EN  [1] EXT_TRIG_EN  [2] ADDR_TRIG_EN  [3] IRQ_EN
//                 [7:4] GCC_EN; write-only pulses: [8] CLR (all PC sets and
//                 the untracked flag), [15:12] GCC_CLR
//   0x004 STATUS  [0] transaction-count interrupt, [1] latency interrupt
//                 (write 1 to clear); [2] ACTIVE, [3] UNTRACKED (read-only)
//   0x008 TRIG_ADDR  0x00C TXN_THR  0x010 LAT_THR   (threshold 0 = off)
//   0x014 DIST_SEL [7:0] port the distributor connects to the monitor
//   0x020+0x10*i  BASE_i, +0x4 LIMIT_i, +0x8 ID_i ([31] enable, [3:0] ID)
//   0x060+4*k     RD_BOUND_k (k = 0..6)   0x080+4*k  WR_BOUND_k (k = 0..2)
//   0x100+8*g     GCC_g low word, +0x4 high word (g = 0..3)
//   0x200+0x80*p  PC set p: +00 TCR_RD +04 TCR_WR +08 TSR_RD +0C TSR_WR
//                 +10 VC_RD +14 VC_WR +18 BC_RD +1C BC_WR
//                 +20..+3C RLC_0..7  +40..+4C WLC_0..3
// Unmapped offsets read 0 and ignore writes.  PREADY is always high (no
// wait states), PSLVERR always low; read data is combinational from PADDR
// during the access.  A 64-bit counter is read as two words without a
// snapshot.
module bm_apb_regs
  import hbmu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // configuration to the monitor
  output logic        ctrl_en,
  output logic        ext_trig_en,
  output logic        addr_trig_en,
  output logic [NUM_GCC-1:0] gcc_en,
  output logic [NUM_GCC-1:0] gcc_clr,
  output logic        pc_clr,
  output logic [AXI_ADDR_W-1:0] trig_addr,
  output logic [CNT_W-1:0]      txn_thr,
  output logic [CNT_W-1:0]      lat_thr,
  output logic [7:0]            dist_sel,
  output pc_range_t   range_cfg [NUM_PC],
  output logic [CNT_W-1:0] rd_bound [NUM_RD_BINS-1],
  output logic [CNT_W-1:0] wr_bound [NUM_WR_BINS-1],
  // status and results from the monitor
  input  logic        active,
  input  logic        untracked,
  input  logic [1:0]  irq_set,       // [0] transaction count, [1] latency
  input  pc_counts_t  pc_counts [NUM_PC],
  input  logic [GCC_W-1:0] gcc [NUM_GCC],
  output logic        irq
);

  logic       irq_en;
  logic [1:0] irq_stat;
  logic       wr_acc, rd_acc;
  logic [9:0] widx;                      // word index
  assign wr_acc = psel && penable && pwrite;
  assign rd_acc = psel && !pwrite;
  assign widx   = paddr[11:2];
  assign pready  = 1'b1;
  assign pslverr = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_en <= 1'b0; ext_trig_en <= 1'b0; addr_trig_en <= 1'b0; irq_en <= 1'b0;
      gcc_en <= '0; gcc_clr <= '0; pc_clr <= 1'b0; irq_stat <= '0;
      trig_addr <= '0; txn_thr <= '0; lat_thr <= '0; dist_sel <= '0;
      for (int i = 0; i < NUM_PC; i++) begin
        range_cfg[i].base  <= AXI_ADDR_W'(i) << (AXI_ADDR_W - 2);
        range_cfg[i].limit <= (i == NUM_PC - 1) ? '1
                              : (AXI_ADDR_W'(i + 1) << (AXI_ADDR_W - 2)) - AXI_ADDR_W'(1);
        range_cfg[i].id_en <= 1'b0;
        range_cfg[i].id    <= '0;
      end
      for (int k = 0; k < NUM_RD_BINS - 1; k++) rd_bound[k] <= CNT_W'(4) << k;
      for (int k = 0; k < NUM_WR_BINS - 1; k++) wr_bound[k] <= CNT_W'(8) << (2 * k);
    end else begin
      gcc_clr <= '0;
      pc_clr  <= 1'b0;
      irq_stat <= irq_stat | irq_set;
      if (wr_acc) begin
        case (widx)
          10'h000: begin
            ctrl_en      <= pwdata[0];
            ext_trig_en  <= pwdata[1];
            addr_trig_en <= pwdata[2];
            irq_en       <= pwdata[3];
            gcc_en       <= pwdata[7:4];
            pc_clr       <= pwdata[8];
            gcc_clr      <= pwdata[15:12];
          end
          10'h001: irq_stat <= (irq_stat & ~pwdata[1:0]) | irq_set;
          10'h002: trig_addr <= pwdata;
          10'h003: txn_thr   <= pwdata;
          10'h004: lat_thr   <= pwdata;
          10'h005: dist_sel  <= pwdata[7:0];
          default: begin
            for (int i = 0; i < NUM_PC; i++) begin
              if (widx == 10'(8 + 4 * i)) range_cfg[i].base  <= pwdata;
              if (widx == 10'(9 + 4 * i)) range_cfg[i].limit <= pwdata;
              if (widx == 10'(10 + 4 * i)) begin
                range_cfg[i].id_en <= pwdata[31];
                range_cfg[i].id    <= pwdata[AXI_ID_W-1:0];
              end
            end
            for (int k = 0; k < NUM_RD_BINS - 1; k++)
              if (widx == 10'(24 + k)) rd_bound[k] <= pwdata;
            for (int k = 0; k < NUM_WR_BINS - 1; k++)
              if (widx == 10'(32 + k)) wr_bound[k] <= pwdata;
          end
        endcase
      end
    end
  end

  assign irq = irq_en && (irq_stat != '0);

  // Result word k (0..27) of a PC set.
  function automatic logic [31:0] pc_word(input pc_counts_t c, input logic [4:0] k);
    case (k)
      5'd0: return c.tcr_rd;
      5'd1: return c.tcr_wr;
      5'd2: return c.tsr_rd;
      5'd3: return c.tsr_wr;
      5'd4: return c.vc_rd;
      5'd5: return c.vc_wr;
      5'd6: return c.bc_rd;
      5'd7: return c.bc_wr;
      default: begin
        if (k < 5'd16)      return c.rlc[k[2:0]];
        else if (k < 5'd20) return c.wlc[k[1:0]];
        else                return '0;
      end
    endcase
  endfunction

  always_comb begin
    prdata = '0;
    if (rd_acc) begin
      case (widx)
        10'h000: prdata = {16'h0, 8'h0, gcc_en, irq_en, addr_trig_en, ext_trig_en, ctrl_en};
        10'h001: prdata = {28'h0, untracked, active, irq_stat};
        10'h002: prdata = trig_addr;
        10'h003: prdata = txn_thr;
        10'h004: prdata = lat_thr;
        10'h005: prdata = {24'h0, dist_sel};
        default: begin
          for (int i = 0; i < NUM_PC; i++) begin
            if (widx == 10'(8 + 4 * i))  prdata = range_cfg[i].base;
            if (widx == 10'(9 + 4 * i))  prdata = range_cfg[i].limit;
            if (widx == 10'(10 + 4 * i)) prdata = {range_cfg[i].id_en, 27'h0, range_cfg[i].id};
          end
          for (int k = 0; k < NUM_RD_BINS - 1; k++)
            if (widx == 10'(24 + k)) prdata = rd_bound[k];
          for (int k = 0; k < NUM_WR_BINS - 1; k++)
            if (widx == 10'(32 + k)) prdata = wr_bound[k];
          for (int g = 0; g < NUM_GCC; g++) begin
            if (widx == 10'(64 + 2 * g)) prdata = gcc[g][31:0];
            if (widx == 10'(65 + 2 * g)) prdata = gcc[g][63:32];
          end
          for (int p = 0; p < NUM_PC; p++)
            if (widx >= 10'(128 + 32 * p) && widx < 10'(128 + 32 * p + 20))
              prdata = pc_word(pc_counts[p], 5'(widx - 10'(128 + 32 * p)));
        end
      endcase
    end
  end

  // APB protocol: the access phase follows a setup phase with stable
  // address and direction.
  logic setup_q;
  logic [11:0] paddr_q;
  logic pwrite_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      setup_q <= 1'b0; paddr_q <= '0; pwrite_q <= 1'b0;
    end else begin
      setup_q  <= psel && !penable;
      paddr_q  <= paddr;
      pwrite_q <= pwrite;
    end
  end
  a_apb_setup: assert property (@(posedge clk) disable iff (!rst_n)
                                psel && penable |-> setup_q && paddr == paddr_q && pwrite == pwrite_q)
    else $error("APB access phase without a matching setup phase");

endmodule
