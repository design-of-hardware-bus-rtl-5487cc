// tb_hbmu -- end-to-end test of the hardware bus monitoring unit at its
// default parameters (6 masters x 2 slaves, 3 PC sets, 8 + 4 latency
// intervals, 4 global counters, contention threshold 4).
// Two behavioural environments run side by side:
//  * an AXI master/slave pair issues random bursts on the monitored bus
//    while a model keeps the expected bus monitor counters; they are read
//    back over APB (phases: free-running, address trigger, external
//    trigger, interrupts, clear);
//  * a 6x2 interconnect arbitration model makes masters and slaves request
//    the same destinations at random on all five channels and grants one
//    requester per destination; a model counts the expected conflicts of
//    every device, and the clock-gating request and gated clock are checked
//    against "any count above 4".
// Every mechanism of the design is counted as it happens, and one that
// never happened counts as a failure.
module tb_hbmu;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0;
  axi_mon_t bus;
  logic ext_trig = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr, active, irq;
  // The monitored traffic is offered on port 3 of the distributor; port 0
  // carries a read handshake in every cycle, which must never be counted.
  localparam int BM_PORT = 3;
  axi_mon_t bm_ports [8];
  logic [7:0] bm_port_sel;
  always_comb begin
    for (int p = 0; p < 8; p++) bm_ports[p] = '0;
    bm_ports[0].arvalid = 1'b1; bm_ports[0].arready = 1'b1;
    bm_ports[BM_PORT] = bus;
  end
  int checks = 0, failures = 0;

  localparam int NM = 6, NS = 2;
  logic bcu_en = 1, bcu_clr = 0;
  logic       m_arvalid [NM], m_awvalid [NM], m_wvalid [NM];
  logic [0:0] m_ardest [NM], m_awdest [NM], m_wdest [NM];
  logic       s_arvalid [NS], s_arready [NS], s_awvalid [NS], s_awready [NS];
  logic       s_wvalid [NS], s_wready [NS], s_wlast [NS];
  logic [2:0] s_armaster [NS], s_awmaster [NS], s_wmaster [NS];
  logic       s_rvalid [NS], s_bvalid [NS];
  logic [2:0] s_rdest [NS], s_bdest [NS];
  logic       m_rvalid [NM], m_rready [NM], m_rlast [NM], m_bvalid [NM], m_bready [NM];
  logic [0:0] m_rslave [NM], m_bslave [NM];
  logic [31:0] ar_cnt [NM], aw_cnt [NM], w_cnt [NM], r_cnt [NS], b_cnt [NS];
  logic [4:0] conflict;
  logic cg_en, gclk;

  hbmu dut (
    .clk, .rst_n, .bm_ports, .bm_ext_trig(ext_trig), .bm_port_sel,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .bm_active(active), .bm_irq(irq), .bcu_en, .bcu_clr,
    .m_arvalid, .m_ardest, .m_awvalid, .m_awdest, .m_wvalid, .m_wdest,
    .s_arvalid, .s_arready, .s_armaster, .s_awvalid, .s_awready, .s_awmaster,
    .s_wvalid, .s_wready, .s_wlast, .s_wmaster, .s_rvalid, .s_rdest, .s_bvalid, .s_bdest,
    .m_rvalid, .m_rready, .m_rlast, .m_rslave, .m_bvalid, .m_bready, .m_bslave,
    .ar_cnt, .aw_cnt, .w_cnt, .r_cnt, .b_cnt, .conflict, .cg_en, .gclk
  );

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
    if (model_on && p >= 0) n_pc_hit[p]++;
    if (model_on && p < 0) n_miss++;
    if (model_on && p < 0 && a >= BASE[1] && a <= LIMIT[1]) n_idmiss++;
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
    if (model_on && p >= 0) n_pc_hit[p]++;
    if (model_on && p < 0) n_miss++;
    if (model_on && p < 0 && a >= BASE[1] && a <= LIMIT[1]) n_idmiss++;
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

  // ------------------------------------------- interconnect arbitration
  // mechanisms seen
  int n_conf [5];          // AR, AW, W, R, B conflicts
  int n_cg = 0, n_gclk_stopped = 0, n_pc_hit [3], n_miss = 0, n_idmiss = 0;
  longint e_ar [NM], e_aw [NM], e_w [NM], e_r [NS], e_b [NS];
  bit wburst [NS], rburst [NM];
  bit bcu_run = 1;

  // Pick one requester of destination d at random; -1 if none.
  function automatic int pick(input logic v [], input logic [2:0] dst [], input int d);
    int c [$];
    for (int i = 0; i < v.size(); i++) if (v[i] && dst[i] == 3'(d)) c.push_back(i);
    if (c.size() == 0) return -1;
    return c[$urandom % c.size()];
  endfunction

  function automatic bit rival(input logic v [], input logic [2:0] dst [], input int g, input int d);
    for (int i = 0; i < v.size(); i++) if (i != g && v[i] && dst[i] == 3'(d)) return 1;
    return 0;
  endfunction

  task automatic bcu_drive();
    logic v [];
    logic [2:0] dd [];
    int g;
    // masters request slaves; sparse so that conflicts stay countable
    for (int i = 0; i < NM; i++) begin
      m_arvalid[i] = ($urandom % 6) == 0; m_ardest[i] = 1'($urandom);
      m_awvalid[i] = ($urandom % 6) == 0; m_awdest[i] = 1'($urandom);
      m_wvalid[i]  = ($urandom % 6) == 0; m_wdest[i]  = 1'($urandom);
    end
    for (int s = 0; s < NS; s++) begin
      s_rvalid[s] = ($urandom % 3) == 0; s_rdest[s] = 3'($urandom % NM);
      s_bvalid[s] = ($urandom % 3) == 0; s_bdest[s] = 3'($urandom % NM);
    end
    v = new[NM]; dd = new[NM];
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < NM; i++) begin v[i] = m_arvalid[i]; dd[i] = 3'(m_ardest[i]); end
      g = pick(v, dd, s);
      s_arvalid[s] = g >= 0; s_arready[s] = $urandom % 2; s_armaster[s] = (g >= 0) ? 3'(g) : 0;
      for (int i = 0; i < NM; i++) begin v[i] = m_awvalid[i]; dd[i] = 3'(m_awdest[i]); end
      g = pick(v, dd, s);
      s_awvalid[s] = g >= 0; s_awready[s] = $urandom % 2; s_awmaster[s] = (g >= 0) ? 3'(g) : 0;
      for (int i = 0; i < NM; i++) begin v[i] = m_wvalid[i]; dd[i] = 3'(m_wdest[i]); end
      g = pick(v, dd, s);
      s_wvalid[s] = g >= 0; s_wready[s] = $urandom % 2; s_wmaster[s] = (g >= 0) ? 3'(g) : 0;
      s_wlast[s] = ($urandom % 3) == 0;
    end
    v = new[NS]; dd = new[NS];
    for (int m = 0; m < NM; m++) begin
      for (int s = 0; s < NS; s++) begin v[s] = s_rvalid[s]; dd[s] = s_rdest[s]; end
      g = pick(v, dd, m);
      m_rvalid[m] = g >= 0; m_rready[m] = $urandom % 2; m_rslave[m] = (g >= 0) ? 1'(g) : 0;
      m_rlast[m] = ($urandom % 3) == 0;
      for (int s = 0; s < NS; s++) begin v[s] = s_bvalid[s]; dd[s] = s_bdest[s]; end
      g = pick(v, dd, m);
      m_bvalid[m] = g >= 0; m_bready[m] = $urandom % 2; m_bslave[m] = (g >= 0) ? 1'(g) : 0;
    end
  endtask

  task automatic bcu_model();
    logic v [];
    logic [2:0] dd [];
    v = new[NM]; dd = new[NM];
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < NM; i++) begin v[i] = m_arvalid[i]; dd[i] = 3'(m_ardest[i]); end
      if (s_arvalid[s] && s_arready[s] && rival(v, dd, s_armaster[s], s)) begin
        e_ar[s_armaster[s]]++; n_conf[0]++;
      end
      for (int i = 0; i < NM; i++) begin v[i] = m_awvalid[i]; dd[i] = 3'(m_awdest[i]); end
      if (s_awvalid[s] && s_awready[s] && rival(v, dd, s_awmaster[s], s)) begin
        e_aw[s_awmaster[s]]++; n_conf[1]++;
      end
      for (int i = 0; i < NM; i++) begin v[i] = m_wvalid[i]; dd[i] = 3'(m_wdest[i]); end
      if (s_wvalid[s] && s_wready[s] && !wburst[s] && rival(v, dd, s_wmaster[s], s)) begin
        e_w[s_wmaster[s]]++; n_conf[2]++;
      end
      if (s_wvalid[s] && s_wready[s]) wburst[s] = !s_wlast[s];
    end
    v = new[NS]; dd = new[NS];
    for (int m = 0; m < NM; m++) begin
      for (int s = 0; s < NS; s++) begin v[s] = s_rvalid[s]; dd[s] = s_rdest[s]; end
      if (m_rvalid[m] && m_rready[m] && !rburst[m] && rival(v, dd, m_rslave[m], m)) begin
        e_r[m_rslave[m]]++; n_conf[3]++;
      end
      if (m_rvalid[m] && m_rready[m]) rburst[m] = !m_rlast[m];
      for (int s = 0; s < NS; s++) begin v[s] = s_bvalid[s]; dd[s] = s_bdest[s]; end
      if (m_bvalid[m] && m_bready[m] && rival(v, dd, m_bslave[m], m)) begin
        e_b[m_bslave[m]]++; n_conf[4]++;
      end
    end
  endtask

  function automatic bit any_over();
    for (int i = 0; i < NM; i++) if (e_ar[i] > 4 || e_aw[i] > 4 || e_w[i] > 4) return 1;
    for (int s = 0; s < NS; s++) if (e_r[s] > 4 || e_b[s] > 4) return 1;
    return 0;
  endfunction

  task automatic bcu_compare(string tag);
    bit bad = 0;
    for (int i = 0; i < NM; i++)
      if (ar_cnt[i] != 32'(e_ar[i]) || aw_cnt[i] != 32'(e_aw[i]) || w_cnt[i] != 32'(e_w[i])) bad = 1;
    for (int s = 0; s < NS; s++)
      if (r_cnt[s] != 32'(e_r[s]) || b_cnt[s] != 32'(e_b[s])) bad = 1;
    checks++;
    if (bad) begin failures++; if (failures < 10) $display("FAIL %s: contention counts", tag); end
  endtask

  int gclk_edges = 0;
  always @(posedge gclk) gclk_edges++;

  // The contention environment: a burst of traffic, checks, a clear, repeat.
  initial begin
    bit cg_q;
    int ge;
    for (int i = 0; i < NM; i++) begin e_ar[i] = 0; e_aw[i] = 0; e_w[i] = 0; rburst[i] = 0; end
    for (int s = 0; s < NS; s++) begin e_r[s] = 0; e_b[s] = 0; wburst[s] = 0; end
    for (int k = 0; k < 5; k++) n_conf[k] = 0;
    bcu_drive();
    for (int i = 0; i < NM; i++) begin m_arvalid[i] = 0; m_awvalid[i] = 0; m_wvalid[i] = 0;
      m_rvalid[i] = 0; m_bvalid[i] = 0; end
    for (int s = 0; s < NS; s++) begin s_arvalid[s] = 0; s_awvalid[s] = 0; s_wvalid[s] = 0;
      s_rvalid[s] = 0; s_bvalid[s] = 0; end
    @(posedge rst_n);
    cg_q = 0;
    for (int round = 0; round < 6; round++) begin
      // traffic until gating has been requested for a while
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        bcu_drive();
        @(posedge clk);
        bcu_model();
        // cg_en is registered: it shows the counts of one edge earlier
        #1 bcu_compare("traffic");
        checks++;
        if (cg_en !== cg_q) begin failures++; $display("FAIL cg_en %b expected %b", cg_en, cg_q); end
        if (cg_en) n_cg++;
        cg_q = any_over();
      end
      // quiet: gated clock must be stopped while gating is requested
      for (int i = 0; i < NM; i++) begin m_arvalid[i] = 0; m_awvalid[i] = 0; m_wvalid[i] = 0;
        m_rvalid[i] = 0; m_bvalid[i] = 0; end
      for (int s = 0; s < NS; s++) begin s_arvalid[s] = 0; s_awvalid[s] = 0; s_wvalid[s] = 0;
        s_rvalid[s] = 0; s_bvalid[s] = 0; end
      @(negedge clk);
      ge = gclk_edges;
      repeat (5) @(negedge clk);
      checks++;
      if (cg_en && gclk_edges != ge) begin failures++; $display("FAIL gated clock ran"); end
      if (!cg_en && gclk_edges != ge + 5) begin failures++; $display("FAIL clock missing"); end
      if (cg_en) n_gclk_stopped++;
      // clear
      bcu_clr = 1; @(negedge clk); bcu_clr = 0;
      for (int i = 0; i < NM; i++) begin e_ar[i] = 0; e_aw[i] = 0; e_w[i] = 0; end
      for (int s = 0; s < NS; s++) begin e_r[s] = 0; e_b[s] = 0; end
      @(negedge clk);
      bcu_compare("after clear");
      checks++;
      if (cg_en) begin failures++; $display("FAIL gating not released by clear"); end
      cg_q = 0;
    end
    bcu_run = 0;
  end

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
    apb_write(12'h014, 32'(BM_PORT));                  // distributor: observe port 3
    @(negedge clk);
    check(bm_port_sel == 8'(BM_PORT), "distributor selects port 3");

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
    check(active, "active after EN");
    repeat (75) random_txn();
    apb_write(12'h014, 32'd0);                        // deferred while enabled
    check(bm_port_sel == 8'(BM_PORT), "port selection frozen while monitoring");
    apb_write(12'h014, 32'(BM_PORT));
    repeat (75) random_txn();
    read_burst(32'h0000_1000, 0, 0, 2, 250);          // one certain long latency
    apb_write(12'h000, 32'h0000_0008);                // stop, keep IRQ_EN
    counting_gcc = 0; model_on = 0;
    check(!active, "inactive after stop");
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

    wait (!bcu_run);
    // every mechanism must have happened
    begin
      string names [5] = '{"AR conflict", "AW conflict", "W conflict", "R conflict", "B conflict"};
      for (int k = 0; k < 5; k++) begin
        $display("mechanism %s: %0d", names[k], n_conf[k]);
        check(n_conf[k] > 0, names[k]);
      end
    end
    $display("mechanism clock gating requested: %0d cycles, gated clock seen stopped: %0d",
             n_cg, n_gclk_stopped);
    check(n_cg > 0 && n_gclk_stopped > 0, "clock gating");
    for (int p = 0; p < 3; p++) begin
      $display("mechanism PC set %0d transactions: %0d", p, n_pc_hit[p]);
      check(n_pc_hit[p] > 0, "PC set hit");
    end
    $display("mechanism out of range: %0d, ID filtered: %0d", n_miss, n_idmiss);
    check(n_miss > 0 && n_idmiss > 0, "range miss and ID filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
