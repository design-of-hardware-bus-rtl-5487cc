// tb_hbmu_cases -- the reference simulation cases of the HBMU, replayed on
// the top level at default parameters.
// Bus monitor: read bursts of given arlen/arsize (transaction count and
// size), write bursts of given awlen/awsize, a read and a write with a
// known latency and length (latency interval, valid count, busy count).
// Contention unit, with the device indices of the reference cases:
//   read address won by master 2, write address by master 5, write data by
//   master 1, read data by slave 0, write response by slave 1;
// then the clock-gating cases: read address master 0, write address
// master 1, write data master 2, read data slave 0, write response slave 1,
// each repeated until its count is 5 (> 4) -- gating must be requested then
// and not at 4.  Expected values are worked out by hand in this file.
module tb_hbmu_cases;
  import hbmu_pkg::*;
  localparam int NM = 6, NS = 2;

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
  int checks = 0, failures = 0;

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
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic bus_idle();
    @(negedge clk);
    bus.arvalid = 0; bus.arready = 0; bus.awvalid = 0; bus.awready = 0;
    bus.rvalid = 0; bus.rready = 0; bus.rlast = 0;
    bus.wvalid = 0; bus.wready = 0; bus.wlast = 0; bus.bvalid = 0; bus.bready = 0;
  endtask

  // read burst: address, then data after `lat` cycles, one beat per cycle
  task automatic rd(logic [31:0] a, int len, int size, int lat);
    bus_idle();
    bus.araddr = a; bus.arlen = 8'(len); bus.arsize = 3'(size); bus.arvalid = 1; bus.arready = 1;
    repeat (lat) bus_idle();
    for (int b = 0; b <= len; b++) begin
      bus.rvalid = 1; bus.rready = 1; bus.rlast = (b == len);
      if (b != len) bus_idle();
    end
    bus_idle();
  endtask

  // write burst: address with the first beat, one beat per cycle, response
  // `rsp` cycles after the last beat
  task automatic wr(logic [31:0] a, int len, int size, int rsp);
    bus_idle();
    bus.awaddr = a; bus.awlen = 8'(len); bus.awsize = 3'(size); bus.awvalid = 1; bus.awready = 1;
    for (int b = 0; b <= len; b++) begin
      if (b != 0) bus_idle();
      bus.wvalid = 1; bus.wready = 1; bus.wlast = (b == len);
    end
    repeat (rsp) bus_idle();
    bus.bvalid = 1; bus.bready = 1;
    bus_idle();
  endtask

  task automatic icn_idle();
    for (int i = 0; i < NM; i++) begin
      m_arvalid[i] = 0; m_awvalid[i] = 0; m_wvalid[i] = 0;
      m_ardest[i] = 0; m_awdest[i] = 0; m_wdest[i] = 0;
      m_rvalid[i] = 0; m_rready[i] = 0; m_rlast[i] = 1; m_bvalid[i] = 0; m_bready[i] = 0;
      m_rslave[i] = 0; m_bslave[i] = 0;
    end
    for (int s = 0; s < NS; s++) begin
      s_arvalid[s] = 0; s_arready[s] = 0; s_awvalid[s] = 0; s_awready[s] = 0;
      s_wvalid[s] = 0; s_wready[s] = 0; s_wlast[s] = 1;
      s_armaster[s] = 0; s_awmaster[s] = 0; s_wmaster[s] = 0;
      s_rvalid[s] = 0; s_bvalid[s] = 0; s_rdest[s] = 0; s_bdest[s] = 0;
    end
  endtask

  // One contended transfer on channel ch (0 AR, 1 AW, 2 W, 3 R, 4 B): device
  // `win` owns the transfer at destination 0, all other devices of that side
  // request destination 0 too.
  task automatic contend(int ch, int win);
    @(negedge clk);
    icn_idle();
    case (ch)
      0: begin for (int i = 0; i < NM; i++) m_arvalid[i] = 1;
               s_arvalid[0] = 1; s_arready[0] = 1; s_armaster[0] = 3'(win); end
      1: begin for (int i = 0; i < NM; i++) m_awvalid[i] = 1;
               s_awvalid[0] = 1; s_awready[0] = 1; s_awmaster[0] = 3'(win); end
      2: begin for (int i = 0; i < NM; i++) m_wvalid[i] = 1;
               s_wvalid[0] = 1; s_wready[0] = 1; s_wlast[0] = 1; s_wmaster[0] = 3'(win); end
      3: begin for (int s = 0; s < NS; s++) begin s_rvalid[s] = 1; s_rdest[s] = 0; end
               m_rvalid[0] = 1; m_rready[0] = 1; m_rlast[0] = 1; m_rslave[0] = 1'(win); end
      default: begin for (int s = 0; s < NS; s++) begin s_bvalid[s] = 1; s_bdest[s] = 0; end
               m_bvalid[0] = 1; m_bready[0] = 1; m_bslave[0] = 1'(win); end
    endcase
    @(negedge clk);
    icn_idle();
  endtask

  function automatic logic [31:0] count_of(int ch, int dev);
    case (ch)
      0: return ar_cnt[dev];
      1: return aw_cnt[dev];
      2: return w_cnt[dev];
      3: return r_cnt[dev];
      default: return b_cnt[dev];
    endcase
  endfunction

  task automatic clear_bcu();
    @(negedge clk); bcu_clr = 1;
    @(negedge clk); bcu_clr = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    string chn [5] = '{"AR", "AW", "W", "R", "B"};
    int    win [5] = '{2, 5, 1, 0, 1};   // reference cases without gating
    int    gwin [5] = '{0, 1, 2, 0, 1};  // reference cases with gating
    bus = '0;
    icn_idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    apb_write(12'h014, 32'(BM_PORT));                  // distributor: observe port 3
    @(negedge clk);
    check(bm_port_sel == 8'(BM_PORT), "distributor selects port 3");

    // ---- bus monitor cases
    apb_write(12'h000, 32'h1);                               // EN
    rd(32'h0000_1000, 3, 2, 2);                              // 4 x 4 B, latency 2
    rd(32'h0000_2000, 7, 3, 20);                             // 8 x 8 B, latency 20
    wr(32'h0000_3000, 1, 2, 3);                              // 2 x 4 B
    wr(32'h0000_4000, 15, 1, 40);                            // 16 x 2 B
    apb_write(12'h000, 32'h0);
    apb_read(12'h200, d); check(d == 2,  "read transaction count");
    apb_read(12'h208, d); check(d == 80, "read transfer size 16 + 64");
    apb_read(12'h204, d); check(d == 2,  "write transaction count");
    apb_read(12'h20C, d); check(d == 40, "write transfer size 8 + 32");
    apb_read(12'h210, d); check(d == 12, "read valid count 4 + 8");
    apb_read(12'h214, d); check(d == 18, "write valid count 2 + 16");
    // busy: latency + beats (2 + 4) + (20 + 8); writes: beats (2) + (16)
    apb_read(12'h218, d); check(d == 34, "read busy count");
    apb_read(12'h21C, d); check(d == 18, "write busy count");
    apb_read(12'h220, d); check(d == 1,  "latency 2 in read interval 0 (< 4)");
    apb_read(12'h22C, d); check(d == 1,  "latency 20 in read interval 3 (16..31)");
    // write latency: AW to B = beats - 1 + rsp: 1 + 3 = 4, 15 + 40 = 55
    apb_read(12'h240, d); check(d == 1,  "write latency 4 in interval 0 (< 8)");
    apb_read(12'h248, d); check(d == 1,  "write latency 55 in interval 2 (32..127)");

    // ---- contention cases
    for (int ch = 0; ch < 5; ch++) begin
      contend(ch, win[ch]);
      check(count_of(ch, win[ch]) == 1, $sformatf("%s conflict counted for device %0d", chn[ch], win[ch]));
    end
    check(cg_en == 0, "no gating below threshold");
    for (int ch = 0; ch < 5; ch++) begin
      clear_bcu();
      for (int k = 1; k <= 5; k++) begin
        contend(ch, gwin[ch]);
        @(negedge clk);
        check(count_of(ch, gwin[ch]) == 32'(k), $sformatf("%s count %0d", chn[ch], k));
        check(cg_en == (k == 5), $sformatf("%s gating at count %0d", chn[ch], k));
      end
    end
    clear_bcu();
    check(cg_en == 0, "gating released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
