// tb_mcm -- self-checking test of the master contention monitor (6 masters,
// 2 slaves).  Directed cases follow the monitor's defining examples: with
// master 2 granted on a read address, another master requesting the same
// slave adds one to master 2's read-address count; likewise master 5 on
// write address and master 1 on write data (counted once per burst).  A
// random phase then compares all 18 counters with a model kept here.
module tb_mcm;
  localparam int NM = 6, NS = 2;

  logic clk = 0, rst_n = 0, en, clr;
  logic       m_arvalid [NM], m_awvalid [NM], m_wvalid [NM];
  logic [0:0] m_ardest [NM], m_awdest [NM], m_wdest [NM];
  logic       s_arvalid [NS], s_arready [NS], s_awvalid [NS], s_awready [NS];
  logic       s_wvalid [NS], s_wready [NS], s_wlast [NS];
  logic [2:0] s_armaster [NS], s_awmaster [NS], s_wmaster [NS];
  logic [31:0] ar_cnt [NM], aw_cnt [NM], w_cnt [NM];
  logic [2:0] conflict;
  longint e_ar [NM], e_aw [NM], e_w [NM];
  bit wburst [NS];
  int checks = 0, failures = 0;

  mcm dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int i = 0; i < NM; i++) begin
      m_arvalid[i] = 0; m_awvalid[i] = 0; m_wvalid[i] = 0;
      m_ardest[i] = 0; m_awdest[i] = 0; m_wdest[i] = 0;
    end
    for (int s = 0; s < NS; s++) begin
      s_arvalid[s] = 0; s_arready[s] = 0; s_awvalid[s] = 0; s_awready[s] = 0;
      s_wvalid[s] = 0; s_wready[s] = 0; s_wlast[s] = 1;
      s_armaster[s] = 0; s_awmaster[s] = 0; s_wmaster[s] = 0;
    end
  endtask

  function automatic bit rival(input logic v [NM], input logic [0:0] dst [NM],
                               input int g, input int s);
    for (int i = 0; i < NM; i++) if (i != g && v[i] && dst[i] == 1'(s)) return 1;
    return 0;
  endfunction

  task automatic model_step();
    for (int s = 0; s < NS; s++) begin
      if (en && !clr) begin
        if (s_arvalid[s] && s_arready[s] && rival(m_arvalid, m_ardest, s_armaster[s], s))
          e_ar[s_armaster[s]]++;
        if (s_awvalid[s] && s_awready[s] && rival(m_awvalid, m_awdest, s_awmaster[s], s))
          e_aw[s_awmaster[s]]++;
        if (s_wvalid[s] && s_wready[s] && !wburst[s] && rival(m_wvalid, m_wdest, s_wmaster[s], s))
          e_w[s_wmaster[s]]++;
      end
      if (s_wvalid[s] && s_wready[s]) wburst[s] = !s_wlast[s];
    end
    if (clr) for (int i = 0; i < NM; i++) begin e_ar[i] = 0; e_aw[i] = 0; e_w[i] = 0; end
  endtask

  task automatic cycle();
    @(posedge clk);
    model_step();
    #1;
    for (int i = 0; i < NM; i++) begin
      checks++;
      if (ar_cnt[i] != 32'(e_ar[i]) || aw_cnt[i] != 32'(e_aw[i]) || w_cnt[i] != 32'(e_w[i])) begin
        failures++;
        if (failures < 10)
          $display("FAIL m%0d ar %0d/%0d aw %0d/%0d w %0d/%0d", i, ar_cnt[i], e_ar[i],
                   aw_cnt[i], e_aw[i], w_cnt[i], e_w[i]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    en = 1; clr = 0; idle();
    for (int i = 0; i < NM; i++) begin e_ar[i] = 0; e_aw[i] = 0; e_w[i] = 0; end
    wburst[0] = 0; wburst[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // read address: master 2 granted at slave 0, masters 0 and 3 waiting
    m_arvalid[2] = 1; m_arvalid[0] = 1; m_arvalid[3] = 1;
    s_arvalid[0] = 1; s_arready[0] = 1; s_armaster[0] = 3'd2;
    cycle();
    checks++; if (ar_cnt[2] != 1 || ar_cnt[0] != 0) begin failures++; $display("FAIL AR directed"); end
    idle();
    // write address: master 5 granted at slave 1, master 1 waiting for slave 1
    m_awvalid[5] = 1; m_awdest[5] = 1; m_awvalid[1] = 1; m_awdest[1] = 1;
    s_awvalid[1] = 1; s_awready[1] = 1; s_awmaster[1] = 3'd5;
    cycle();
    checks++; if (aw_cnt[5] != 1) begin failures++; $display("FAIL AW directed"); end
    idle();
    // write data: master 1 sends a 4-beat burst to slave 0, master 4 waits
    m_wvalid[1] = 1; m_wvalid[4] = 1;
    s_wvalid[0] = 1; s_wready[0] = 1; s_wmaster[0] = 3'd1;
    for (int b = 0; b < 4; b++) begin
      s_wlast[0] = (b == 3);
      cycle();
    end
    checks++; if (w_cnt[1] != 1) begin failures++; $display("FAIL W directed %0d", w_cnt[1]); end
    idle();
    for (int n = 0; n < 4000; n++) begin
      en  = ($urandom % 10) != 0;
      clr = ($urandom % 500) == 0;
      for (int i = 0; i < NM; i++) begin
        m_arvalid[i] = ($urandom % 3) == 0; m_ardest[i] = 1'($urandom);
        m_awvalid[i] = ($urandom % 3) == 0; m_awdest[i] = 1'($urandom);
        m_wvalid[i]  = ($urandom % 3) == 0; m_wdest[i]  = 1'($urandom);
      end
      for (int s = 0; s < NS; s++) begin
        s_arvalid[s] = $urandom % 2; s_arready[s] = $urandom % 2; s_armaster[s] = 3'($urandom % NM);
        s_awvalid[s] = $urandom % 2; s_awready[s] = $urandom % 2; s_awmaster[s] = 3'($urandom % NM);
        s_wvalid[s]  = $urandom % 2; s_wready[s]  = $urandom % 2; s_wmaster[s]  = 3'($urandom % NM);
        s_wlast[s]   = ($urandom % 3) == 0;
      end
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
