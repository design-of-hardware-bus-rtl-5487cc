// tb_scm -- self-checking test of the slave contention monitor (2 slaves,
// 6 masters).  Directed cases follow the monitor's defining examples: slave
// 0 granted on the read data channel of a master while slave 1 also has
// read data for that master adds one to slave 0's read count (once per
// burst); slave 1 granted on a write response while slave 0 has a response
// for the same master adds one to slave 1's response count.  A random phase
// compares all counters with a model kept here.
module tb_scm;
  localparam int NM = 6, NS = 2;

  logic clk = 0, rst_n = 0, en, clr;
  logic       s_rvalid [NS], s_bvalid [NS];
  logic [2:0] s_rdest [NS], s_bdest [NS];
  logic       m_rvalid [NM], m_rready [NM], m_rlast [NM], m_bvalid [NM], m_bready [NM];
  logic [0:0] m_rslave [NM], m_bslave [NM];
  logic [31:0] r_cnt [NS], b_cnt [NS];
  logic [1:0] conflict;
  longint e_r [NS], e_b [NS];
  bit rburst [NM];
  int checks = 0, failures = 0;

  scm dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int s = 0; s < NS; s++) begin
      s_rvalid[s] = 0; s_bvalid[s] = 0; s_rdest[s] = 0; s_bdest[s] = 0;
    end
    for (int m = 0; m < NM; m++) begin
      m_rvalid[m] = 0; m_rready[m] = 0; m_rlast[m] = 1; m_bvalid[m] = 0; m_bready[m] = 0;
      m_rslave[m] = 0; m_bslave[m] = 0;
    end
  endtask

  function automatic bit rival(input logic v [NS], input logic [2:0] dst [NS],
                               input int g, input int m);
    for (int i = 0; i < NS; i++) if (i != g && v[i] && dst[i] == 3'(m)) return 1;
    return 0;
  endfunction

  task automatic model_step();
    for (int m = 0; m < NM; m++) begin
      if (en && !clr) begin
        if (m_rvalid[m] && m_rready[m] && !rburst[m] && rival(s_rvalid, s_rdest, m_rslave[m], m))
          e_r[m_rslave[m]]++;
        if (m_bvalid[m] && m_bready[m] && rival(s_bvalid, s_bdest, m_bslave[m], m))
          e_b[m_bslave[m]]++;
      end
      if (m_rvalid[m] && m_rready[m]) rburst[m] = !m_rlast[m];
    end
    if (clr) for (int s = 0; s < NS; s++) begin e_r[s] = 0; e_b[s] = 0; end
  endtask

  task automatic cycle();
    @(posedge clk);
    model_step();
    #1;
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (r_cnt[s] != 32'(e_r[s]) || b_cnt[s] != 32'(e_b[s])) begin
        failures++;
        if (failures < 10)
          $display("FAIL s%0d r %0d/%0d b %0d/%0d", s, r_cnt[s], e_r[s], b_cnt[s], e_b[s]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    en = 1; clr = 0; idle();
    for (int s = 0; s < NS; s++) begin e_r[s] = 0; e_b[s] = 0; end
    for (int m = 0; m < NM; m++) rburst[m] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // read data to master 3: slave 0 granted for a 3-beat burst, slave 1 waits
    s_rvalid[0] = 1; s_rdest[0] = 3'd3; s_rvalid[1] = 1; s_rdest[1] = 3'd3;
    m_rvalid[3] = 1; m_rready[3] = 1; m_rslave[3] = 1'b0;
    for (int b = 0; b < 3; b++) begin
      m_rlast[3] = (b == 2);
      cycle();
    end
    checks++; if (r_cnt[0] != 1 || r_cnt[1] != 0) begin failures++; $display("FAIL R directed"); end
    idle();
    // write response to master 0: slave 1 granted, slave 0 waits; slave 0 to
    // master 2 alone is no conflict
    s_bvalid[1] = 1; s_bdest[1] = 3'd0; s_bvalid[0] = 1; s_bdest[0] = 3'd0;
    m_bvalid[0] = 1; m_bready[0] = 1; m_bslave[0] = 1'b1;
    cycle();
    s_bvalid[1] = 0; s_bdest[0] = 3'd2; m_bvalid[0] = 0;
    m_bvalid[2] = 1; m_bready[2] = 1; m_bslave[2] = 1'b0;
    cycle();
    checks++; if (b_cnt[1] != 1 || b_cnt[0] != 0) begin failures++; $display("FAIL B directed"); end
    idle();
    for (int n = 0; n < 4000; n++) begin
      en  = ($urandom % 10) != 0;
      clr = ($urandom % 500) == 0;
      for (int s = 0; s < NS; s++) begin
        s_rvalid[s] = $urandom % 2; s_rdest[s] = 3'($urandom % NM);
        s_bvalid[s] = $urandom % 2; s_bdest[s] = 3'($urandom % NM);
      end
      for (int m = 0; m < NM; m++) begin
        m_rvalid[m] = $urandom % 2; m_rready[m] = $urandom % 2; m_rlast[m] = ($urandom % 3) == 0;
        m_rslave[m] = 1'($urandom);
        m_bvalid[m] = $urandom % 2; m_bready[m] = $urandom % 2; m_bslave[m] = 1'($urandom);
      end
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
