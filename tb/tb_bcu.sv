// tb_bcu -- self-checking test of the bus contention unit (6 masters,
// 2 slaves).  It creates conflicts on each of the five channels, checks the
// counter of the granted device and the per-channel conflict flag, then
// repeats read-address conflicts of master 0 until its count passes 4 and
// checks that clock gating is requested and the gated clock stops, that
// clearing the counters releases it, and that slave-side conflicts request
// gating as well.
module tb_bcu;
  localparam int NM = 6, NS = 2;

  logic clk = 0, rst_n = 0, en, clr;
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
  int gedges = 0;
  int checks = 0, failures = 0;

  bcu dut (.*);

  always #5 clk = !clk;
  always @(posedge gclk) gedges++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
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

  task automatic check(bit c, string tag);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", tag); end
  endtask

  initial begin
    en = 1; clr = 0; idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // AR: master 2 granted at slave 0, master 0 waiting
    m_arvalid[2] = 1; m_arvalid[0] = 1; s_arvalid[0] = 1; s_arready[0] = 1; s_armaster[0] = 2;
    #1 check(conflict == 5'b00001, "AR flag");
    @(negedge clk); idle();
    check(ar_cnt[2] == 1, "AR count m2");
    // AW: master 5 granted at slave 1, master 1 waiting for slave 1
    m_awvalid[5] = 1; m_awdest[5] = 1; m_awvalid[1] = 1; m_awdest[1] = 1;
    s_awvalid[1] = 1; s_awready[1] = 1; s_awmaster[1] = 5;
    #1 check(conflict == 5'b00010, "AW flag");
    @(negedge clk); idle();
    check(aw_cnt[5] == 1, "AW count m5");
    // W: master 1 granted at slave 0, master 3 waiting
    m_wvalid[1] = 1; m_wvalid[3] = 1; s_wvalid[0] = 1; s_wready[0] = 1; s_wmaster[0] = 1;
    #1 check(conflict == 5'b00100, "W flag");
    @(negedge clk); idle();
    check(w_cnt[1] == 1, "W count m1");
    // R: slave 0 granted to master 4, slave 1 also has data for master 4
    s_rvalid[0] = 1; s_rdest[0] = 4; s_rvalid[1] = 1; s_rdest[1] = 4;
    m_rvalid[4] = 1; m_rready[4] = 1; m_rslave[4] = 0;
    #1 check(conflict == 5'b01000, "R flag");
    @(negedge clk); idle();
    check(r_cnt[0] == 1, "R count s0");
    // B: slave 1 granted to master 0, slave 0 also has a response for master 0
    s_bvalid[1] = 1; s_bdest[1] = 0; s_bvalid[0] = 1; s_bdest[0] = 0;
    m_bvalid[0] = 1; m_bready[0] = 1; m_bslave[0] = 1;
    #1 check(conflict == 5'b10000, "B flag");
    @(negedge clk); idle();
    check(b_cnt[1] == 1, "B count s1");
    check(cg_en == 0, "no gating yet");
    // five read-address conflicts for master 0: count 5 > 4
    for (int k = 0; k < 5; k++) begin
      m_arvalid[0] = 1; m_arvalid[3] = 1; s_arvalid[0] = 1; s_arready[0] = 1; s_armaster[0] = 0;
      @(negedge clk);
      idle();
      if (k == 3) begin
        @(negedge clk);
        check(ar_cnt[0] == 4 && cg_en == 0, "four conflicts: no gating");
      end
    end
    @(negedge clk);
    check(ar_cnt[0] == 5 && cg_en == 1, "five conflicts: gating requested");
    @(negedge clk);
    gedges = 0;
    repeat (8) @(negedge clk);
    check(gedges == 0, "gated clock stopped");
    // disabled: conflicts are not counted
    en = 0;
    m_arvalid[2] = 1; m_arvalid[0] = 1; s_arvalid[0] = 1; s_arready[0] = 1; s_armaster[0] = 2;
    @(negedge clk); idle();
    check(ar_cnt[2] == 1, "disabled: not counted");
    en = 1;
    clr = 1;
    @(negedge clk);
    clr = 0;
    @(negedge clk);
    @(negedge clk);
    check(ar_cnt[0] == 0 && cg_en == 0, "clear releases gating");
    gedges = 0;
    repeat (8) @(negedge clk);
    check(gedges == 8, "gated clock runs again");
    // five write-response conflicts for slave 1 also request gating
    for (int k = 0; k < 5; k++) begin
      s_bvalid[1] = 1; s_bdest[1] = 0; s_bvalid[0] = 1; s_bdest[0] = 0;
      m_bvalid[0] = 1; m_bready[0] = 1; m_bslave[0] = 1;
      @(negedge clk);
      idle();
    end
    @(negedge clk);
    check(b_cnt[1] == 5 && cg_en == 1, "slave conflicts request gating");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
