// tb_bus_monitor -- self-checking test of the whole bus monitor unit.
// A behavioural AXI master/slave pair in this file issues random read and
// write bursts one at a time (random address, ID, length, size, address
// wait, data stalls and latencies) while a model here keeps the expected
// counters of the three PC sets, using the measuring definitions of the
// monitor: latency from address handshake to first read beat / write
// response, busy length from address handshake to last data beat, valid
// count = data beats.  All results are then read over APB and compared.
// Further phases check the global clock counter against the number of
// monitored cycles, the address trigger, the external trigger, both
// interrupt sources and the clear pulse.
module tb_bus_monitor;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0;
  axi_mon_t bus;
  logic ext_trig = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr, active, irq, enabled;
  logic [7:0] dist_sel;
  int checks = 0, failures = 0;

  logic flush = 0;
  bus_monitor dut (.clk, .rst_n, .bus, .ext_trig, .flush, .psel, .penable, .pwrite, .paddr, .pwdata,
                   .prdata, .pready, .pslverr, .active, .irq,
                   .dist_sel, .enabled);

  always #5 clk = !clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string tag);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", tag); end
  endtask

  // ----------------------------------------------------------------- APB
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

  // --------------------------------------------------------------- model
  localparam logic [31:0] BASE [3]  = '{32'h0000_0000, 32'h1000_0000, 32'h2000_0000};
  localparam logic [31:0] LIMIT [3] = '{32'h0FFF_FFFF, 32'h1FFF_FFFF, 32'h2FFF_FFFF};
  localparam logic [3:0]  PC1_ID = 4'd3;
  localparam int RD_LO [7] = '{4, 8, 16, 32, 64, 128, 256};   // reset limits
  localparam int WR_LO [3] = '{8, 32, 128};

  pc_counts_t exp_c [NUM_PC];
  bit model_on = 0;
  bit lat_irq_exp = 0;
  int lat_thr = 0;

  function automatic int pc_of(logic [31:0] a, logic [3:0] id);
    for (int p = 0; p < NUM_PC; p++)
      if (a >= BASE[p] && a <= LIMIT[p] && (p != 1 || id == PC1_ID)) return p;
    return -1;
  endfunction

  function automatic int rbin(int lat);
    for (int k = 6; k >= 0; k--) if (lat >= RD_LO[k]) return k + 1;
    return 0;
  endfunction
  function automatic int wbin(int lat);
    for (int k = 2; k >= 0; k--) if (lat >= WR_LO[k]) return k + 1;
    return 0;
  endfunction

  int bins_rd_seen [8];
  int bins_wr_seen [4];

  // ------------------------------------------------------- AXI traffic
  task automatic idle_cycle();
    @(negedge clk);
    bus.arvalid = 0; bus.awvalid = 0; bus.rvalid = 0; bus.wvalid = 0; bus.bvalid = 0;
    bus.arready = 0; bus.awready = 0; bus.rready = 0; bus.wready = 0; bus.bready = 0;
    bus.rlast = 0; bus.wlast = 0;
  endtask

  task automatic read_burst(logic [31:0] a, logic [3:0] id, int len, int size, int lat);
    int t0, tf, tl, p;
    idle_cycle();
    bus.araddr = a; bus.arid = id; bus.arlen = 8'(len); bus.arsize = 3'(size);
    bus.arvalid = 1;
    if ($urandom % 3 == 0) begin bus.arready = 0; @(negedge clk); end   // address wait
    bus.arready = 1; t0 = cyc;
    repeat (lat) idle_cycle();
    for (int b = 0; b <= len; b++) begin
      if ($urandom % 4 == 0) begin bus.rvalid = 1; bus.rready = 0; idle_cycle(); end
      bus.rvalid = 1; bus.rready = 1; bus.rlast = (b == len);
      if (b == 0) tf = cyc;
      if (b == len) tl = cyc;
      if (b != len) idle_cycle();
    end
    idle_cycle();
    p = pc_of(a, id);
    if (model_on && p >= 0) begin
      exp_c[p].tcr_rd += 1;
      exp_c[p].tsr_rd += (len + 1) << size;
      exp_c[p].vc_rd  += len + 1;
      exp_c[p].bc_rd  += tl - t0 + 1;
      exp_c[p].rlc[rbin(tf - t0)] += 1;
      bins_rd_seen[rbin(tf - t0)]++;
      if (lat_thr != 0 && tf - t0 >= lat_thr) lat_irq_exp = 1;
    end
  endtask

  task automatic write_burst(logic [31:0] a, logic [3:0] id, int len, int size, int dly, int rsp);
    int t0, tl, tb, p;
    idle_cycle();
    bus.awaddr = a; bus.awid = id; bus.awlen = 8'(len); bus.awsize = 3'(size);
    bus.awvalid = 1; bus.awready = 1; t0 = cyc;
    for (int b = 0; b <= len; b++) begin
      if (b == 0) repeat (dly) idle_cycle();
      else idle_cycle();
      if ($urandom % 4 == 0 && !(b == 0 && dly == 0)) begin
        bus.wvalid = 1; bus.wready = 0; idle_cycle();
      end
      bus.wvalid = 1; bus.wready = 1; bus.wlast = (b == len);
      if (b == len) tl = cyc;
    end
    repeat (rsp) idle_cycle();
    bus.bvalid = 1; bus.bready = 1; tb = cyc;
    idle_cycle();
    p = pc_of(a, id);
    if (model_on && p >= 0) begin
      exp_c[p].tcr_wr += 1;
      exp_c[p].tsr_wr += (len + 1) << size;
      exp_c[p].vc_wr  += len + 1;
      exp_c[p].bc_wr  += tl - t0 + 1;
      exp_c[p].wlc[wbin(tb - t0)] += 1;
      bins_wr_seen[wbin(tb - t0)]++;
      if (lat_thr != 0 && tb - t0 >= lat_thr) lat_irq_exp = 1;
    end
  endtask

  function automatic logic [31:0] rand_addr();
    return {2'b00, 30'($urandom)} & 32'h3FFF_FFFC;
  endfunction

  task automatic random_txn();
    logic [31:0] a;
    logic [3:0] id;
    a  = rand_addr();
    id = ($urandom % 2) ? PC1_ID : 4'($urandom);
    if ($urandom % 2)
      read_burst(a, id, $urandom % 8, $urandom % 4, 1 + (($urandom % 2) ? $urandom % 12 : $urandom % 300));
    else
      write_burst(a, id, $urandom % 8, $urandom % 4, $urandom % 3, 1 + (($urandom % 2) ? $urandom % 10 : $urandom % 200));
  endtask

  task automatic compare_all(string tag);
    logic [31:0] d;
    for (int p = 0; p < NUM_PC; p++) begin
      logic [31:0] w [20];
      w[0] = exp_c[p].tcr_rd; w[1] = exp_c[p].tcr_wr; w[2] = exp_c[p].tsr_rd;
      w[3] = exp_c[p].tsr_wr; w[4] = exp_c[p].vc_rd;  w[5] = exp_c[p].vc_wr;
      w[6] = exp_c[p].bc_rd;  w[7] = exp_c[p].bc_wr;
      for (int k = 0; k < 8; k++) w[8 + k] = exp_c[p].rlc[k];
      for (int k = 0; k < 4; k++) w[16 + k] = exp_c[p].wlc[k];
      for (int k = 0; k < 20; k++) begin
        apb_read(12'(32'h200 + 32'h80 * p + 4 * k), d);
        checks++;
        if (d != w[k]) begin
          failures++;
          $display("FAIL %s PC%0d word %0d: %0d expected %0d", tag, p, k, d, w[k]);
        end
      end
    end
  endtask

  function automatic int total_txn(int p);
    return exp_c[p].tcr_rd + exp_c[p].tcr_wr;
  endfunction

  // ---------------------------------------------------------------- test
  int gcc_exp = 0;
  bit counting_gcc = 0;
  always @(posedge clk) if (counting_gcc) gcc_exp <= gcc_exp + 1;

  initial begin
    logic [31:0] d, lo, hi;
    bus = '0;
    for (int p = 0; p < NUM_PC; p++) exp_c[p] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // set-up: ranges, ID filter on set 1, thresholds
    for (int p = 0; p < NUM_PC; p++) begin
      apb_write(12'(32'h020 + 16 * p), BASE[p]);
      apb_write(12'(32'h024 + 16 * p), LIMIT[p]);
    end
    apb_write(12'h030 + 12'h8, 32'h8000_0000 | PC1_ID);
    apb_write(12'h00C, 32'd10);                       // TXN_THR
    lat_thr = 200;
    apb_write(12'h010, 32'(lat_thr));                 // LAT_THR

    // not enabled yet: nothing is counted
    repeat (5) random_txn();

    // ---- phase A: free-running monitoring
    apb_write(12'h000, 32'h0000_0019);                // EN, IRQ_EN, GCC0
    counting_gcc = 1; model_on = 1;
    check(active && enabled, "active after EN");
    repeat (250) random_txn();
    read_burst(32'h0000_1000, 0, 0, 2, 250);          // one certain long latency
    apb_write(12'h000, 32'h0000_0008);                // stop, keep IRQ_EN
    counting_gcc = 0; model_on = 0;
    check(!active && !enabled, "inactive after stop");
    apb_write(12'h014, 32'd6);
    check(dist_sel == 6, "distributor selection out");
    repeat (3) random_txn();                           // stopped: not counted
    compare_all("phase A");
    apb_read(12'h100, lo); apb_read(12'h104, hi);
    check({hi, lo} == 64'(gcc_exp), $sformatf("GCC0 %0d expected %0d", lo, gcc_exp));
    apb_read(12'h108, lo); check(lo == 0, "GCC1 disabled");
    apb_read(12'h004, d);
    check(d[0] == (total_txn(0) >= 10 || total_txn(1) >= 10 || total_txn(2) >= 10),
          "transaction-count interrupt status");
    check(d[1] == lat_irq_exp && lat_irq_exp, "latency interrupt status");
    check(irq, "interrupt line");
    apb_write(12'h004, 32'h3);
    check(!irq, "interrupt cleared");
    for (int k = 0; k < 8; k++) check(bins_rd_seen[k] > 0, $sformatf("read interval %0d reached", k));
    for (int k = 0; k < 4; k++) check(bins_wr_seen[k] > 0, $sformatf("write interval %0d reached", k));

    // ---- clear
    apb_write(12'h000, 32'h0000_0100);
    for (int p = 0; p < NUM_PC; p++) exp_c[p] = '0;
    lat_thr = 0;
    apb_write(12'h010, 32'd0);
    compare_all("after clear");

    // ---- phase B: start on a transaction to TRIG_ADDR
    apb_write(12'h008, 32'h2000_0040);
    apb_write(12'h000, 32'h0000_0005);                // EN + ADDR_TRIG_EN
    check(!active, "armed, waiting for the trigger address");
    read_burst(32'h2000_0044, 0, 1, 2, 3);
    write_burst(32'h0000_0040, 0, 0, 2, 0, 2);
    check(!active, "other addresses do not trigger");
    model_on = 1;
    write_burst(32'h2000_0040, 0, 1, 2, 1, 3);        // the trigger, counted
    check(active, "triggered");
    read_burst(32'h2000_0100, 0, 3, 2, 5);
    apb_write(12'h000, 32'h0000_0000);
    model_on = 0;
    compare_all("phase B");
    apb_read(12'h200 + 12'h100, d);
    check(d == 1, "one read after trigger in set 2");

    // ---- phase C: start on the external trigger
    apb_write(12'h000, 32'h0000_0100);
    for (int p = 0; p < NUM_PC; p++) exp_c[p] = '0;
    apb_write(12'h000, 32'h0000_0003);                // EN + EXT_TRIG_EN
    read_burst(32'h0000_0200, 0, 0, 2, 4);
    check(!active, "waiting for external trigger");
    @(negedge clk); ext_trig = 1; @(negedge clk); ext_trig = 0;
    check(active, "external trigger started monitoring");
    model_on = 1;
    read_burst(32'h0000_0200, 0, 0, 2, 4);
    write_burst(32'h2000_0000, 0, 2, 1, 0, 1);
    apb_write(12'h000, 32'h0000_0000);
    model_on = 0;
    compare_all("phase C");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
