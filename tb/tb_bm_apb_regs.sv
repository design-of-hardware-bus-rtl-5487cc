// tb_bm_apb_regs -- self-checking test of the bus monitor register file.
// Checks reset values, write/read-back of every set-up register, that the
// configuration outputs follow the writes, the one-cycle clear pulses, the
// read-out of every result word of every PC set and of the 64-bit global
// counters (inputs filled with distinct patterns), and the sticky
// write-1-to-clear interrupt status with its enable.
module tb_bm_apb_regs;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr;
  logic ctrl_en, ext_trig_en, addr_trig_en, pc_clr, irq;
  logic [NUM_GCC-1:0] gcc_en, gcc_clr;
  logic [AXI_ADDR_W-1:0] trig_addr;
  logic [CNT_W-1:0] txn_thr, lat_thr;
  logic [7:0] dist_sel;
  pc_range_t range_cfg [NUM_PC];
  logic [CNT_W-1:0] rd_bound [NUM_RD_BINS-1];
  logic [CNT_W-1:0] wr_bound [NUM_WR_BINS-1];
  logic active = 0, untracked = 0;
  logic [1:0] irq_set = 0;
  pc_counts_t pc_counts [NUM_PC];
  logic [GCC_W-1:0] gcc [NUM_GCC];
  int checks = 0, failures = 0;

  bm_apb_regs dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string tag);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", tag); end
  endtask

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    #1 d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  // value of result word k of PC set p, as filled below
  function automatic logic [31:0] pattern(int p, int k);
    return 32'hA000_0000 | (p << 8) | k;
  endfunction

  initial begin
    logic [31:0] d;
    for (int p = 0; p < NUM_PC; p++) begin
      pc_counts[p].tcr_rd = pattern(p, 0); pc_counts[p].tcr_wr = pattern(p, 1);
      pc_counts[p].tsr_rd = pattern(p, 2); pc_counts[p].tsr_wr = pattern(p, 3);
      pc_counts[p].vc_rd  = pattern(p, 4); pc_counts[p].vc_wr  = pattern(p, 5);
      pc_counts[p].bc_rd  = pattern(p, 6); pc_counts[p].bc_wr  = pattern(p, 7);
      for (int k = 0; k < NUM_RD_BINS; k++) pc_counts[p].rlc[k] = pattern(p, 8 + k);
      for (int k = 0; k < NUM_WR_BINS; k++) pc_counts[p].wlc[k] = pattern(p, 16 + k);
    end
    for (int g = 0; g < NUM_GCC; g++) gcc[g] = {32'h5000_0000 | g, 32'h0C00_0000 | g};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // reset values
    apb_read(12'h000, d); check(d == 0, "CTRL reset");
    apb_read(12'h020, d); check(d == 32'h0000_0000, "BASE0 reset");
    apb_read(12'h024, d); check(d == 32'h3FFF_FFFF, "LIMIT0 reset");
    apb_read(12'h040, d); check(d == 32'h8000_0000, "BASE2 reset");
    apb_read(12'h044, d); check(d == 32'hFFFF_FFFF, "LIMIT2 reset");
    apb_read(12'h060, d); check(d == 4, "RD_BOUND0 reset");
    apb_read(12'h078, d); check(d == 256, "RD_BOUND6 reset");
    apb_read(12'h088, d); check(d == 128, "WR_BOUND2 reset");
    check(pready && !pslverr, "no wait states");

    // set-up registers
    apb_write(12'h008, 32'h1234_5678); apb_read(12'h008, d);
    check(d == 32'h1234_5678 && trig_addr == 32'h1234_5678, "TRIG_ADDR");
    apb_write(12'h00C, 32'd77); apb_read(12'h00C, d); check(d == 77 && txn_thr == 77, "TXN_THR");
    apb_write(12'h010, 32'd99); apb_read(12'h010, d); check(d == 99 && lat_thr == 99, "LAT_THR");
    apb_write(12'h014, 32'h1A5); apb_read(12'h014, d); check(d == 32'hA5 && dist_sel == 8'hA5, "DIST_SEL");
    for (int i = 0; i < NUM_PC; i++) begin
      apb_write(12'(32'h020 + 16 * i), 32'h100 * (i + 1));
      apb_write(12'(32'h024 + 16 * i), 32'h100 * (i + 1) + 32'hFF);
      apb_write(12'(32'h028 + 16 * i), 32'h8000_0000 | (i + 3));
      check(range_cfg[i].base == 32'h100 * (i + 1) && range_cfg[i].limit == 32'h100 * (i + 1) + 32'hFF &&
            range_cfg[i].id_en && range_cfg[i].id == 4'(i + 3), "range outputs");
      apb_read(12'(32'h028 + 16 * i), d); check(d == (32'h8000_0000 | (i + 3)), "ID readback");
    end
    for (int k = 0; k < NUM_RD_BINS - 1; k++) apb_write(12'(32'h060 + 4 * k), 32'(10 * (k + 1)));
    for (int k = 0; k < NUM_WR_BINS - 1; k++) apb_write(12'(32'h080 + 4 * k), 32'(100 * (k + 1)));
    for (int k = 0; k < NUM_RD_BINS - 1; k++) check(rd_bound[k] == 32'(10 * (k + 1)), "rd_bound");
    for (int k = 0; k < NUM_WR_BINS - 1; k++) check(wr_bound[k] == 32'(100 * (k + 1)), "wr_bound");
    apb_read(12'h064, d); check(d == 20, "RD_BOUND1 readback");

    // control and pulses
    apb_write(12'h000, 32'h0000_00AF);
    check(ctrl_en && ext_trig_en && addr_trig_en && gcc_en == 4'hA && !pc_clr, "CTRL fields");
    @(negedge clk);
    psel = 1; pwrite = 1; paddr = 12'h000; pwdata = 32'h0000_5101;
    @(negedge clk); penable = 1;
    @(posedge clk); #1;
    check(pc_clr && gcc_clr == 4'h5, "clear pulses");
    @(negedge clk); psel = 0; penable = 0;
    @(posedge clk); #1;
    check(!pc_clr && gcc_clr == 0, "pulses last one cycle");

    // results
    for (int p = 0; p < NUM_PC; p++)
      for (int k = 0; k < 20; k++) begin
        apb_read(12'(32'h200 + 32'h80 * p + 4 * k), d);
        check(d == pattern(p, k), $sformatf("PC%0d word %0d", p, k));
      end
    for (int g = 0; g < NUM_GCC; g++) begin
      apb_read(12'(32'h100 + 8 * g), d); check(d == (32'h0C00_0000 | g), "GCC low");
      apb_read(12'(32'h104 + 8 * g), d); check(d == (32'h5000_0000 | g), "GCC high");
    end
    apb_read(12'h3FC, d); check(d == 0, "unmapped reads 0");

    // interrupt status
    active = 1; untracked = 1;
    apb_write(12'h000, 32'h0000_0009);         // EN + IRQ_EN
    check(!irq, "no interrupt yet");
    @(negedge clk); irq_set = 2'b10; @(negedge clk); irq_set = 0;
    check(irq, "latency interrupt raised");
    apb_read(12'h004, d); check(d == 32'b1110, "STATUS bits");
    apb_write(12'h004, 32'h2);
    check(!irq, "write 1 clears");
    @(negedge clk); irq_set = 2'b01; @(negedge clk); irq_set = 0;
    apb_write(12'h000, 32'h0000_0001);         // IRQ_EN off
    check(!irq, "masked");
    apb_read(12'h004, d); check(d[1:0] == 2'b01, "status kept while masked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
