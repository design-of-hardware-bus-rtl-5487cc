// tb_bm_perf_counter -- self-checking test of one performance counter set.
// Random events (with random latencies and burst sizes) and random
// ascending interval limits are applied; a model here keeps the expected
// counters, putting each latency into the interval [lo, hi) that holds it.
module tb_bm_perf_counter;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0, active, clr;
  pc_event_t  ev;
  logic [CNT_W-1:0] rd_bound [NUM_RD_BINS-1];
  logic [CNT_W-1:0] wr_bound [NUM_WR_BINS-1];
  pc_counts_t counts, exp_c;
  int checks = 0, failures = 0;

  bm_perf_counter dut (.clk, .rst_n, .active, .clr, .ev, .rd_bound, .wr_bound, .counts);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interval of a latency given the lower limits of intervals 1..n-1
  function automatic int interval(input logic [31:0] lat, input logic [31:0] lo [], input int n);
    for (int i = n - 1; i >= 1; i--) if (lat >= lo[i-1]) return i;
    return 0;
  endfunction

  task automatic randomize_bounds();
    logic [31:0] v;
    v = $urandom % 4;
    for (int k = 0; k < NUM_RD_BINS - 1; k++) begin
      v = v + 1 + ($urandom % 20);
      rd_bound[k] = v;
    end
    v = $urandom % 4;
    for (int k = 0; k < NUM_WR_BINS - 1; k++) begin
      v = v + 1 + ($urandom % 40);
      wr_bound[k] = v;
    end
  endtask

  initial begin
    logic [31:0] rlo [], wlo [];
    rlo = new[NUM_RD_BINS - 1];
    wlo = new[NUM_WR_BINS - 1];
    active = 0; clr = 0; ev = '0; exp_c = '0;
    randomize_bounds();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) randomize_bounds();
      active = ($urandom % 10) != 0;
      clr    = ($urandom % 700) == 0;
      ev = '0;
      ev.rd_req   = $urandom % 2;  ev.rd_bytes = 16'($urandom);
      ev.wr_req   = $urandom % 2;  ev.wr_bytes = 16'($urandom);
      ev.rd_beat  = $urandom % 2;  ev.wr_beat  = $urandom % 2;
      ev.rd_first = $urandom % 2;  ev.rd_lat   = $urandom % 200;
      ev.wr_resp  = $urandom % 2;  ev.wr_lat   = $urandom % 200;
      ev.rd_done  = $urandom % 2;  ev.rd_busy  = $urandom % 300;
      ev.wr_done  = $urandom % 2;  ev.wr_busy  = $urandom % 300;
      for (int k = 0; k < NUM_RD_BINS - 1; k++) rlo[k] = rd_bound[k];
      for (int k = 0; k < NUM_WR_BINS - 1; k++) wlo[k] = wr_bound[k];
      @(posedge clk);
      if (clr) exp_c = '0;
      else if (active) begin
        if (ev.rd_req) begin exp_c.tcr_rd++; exp_c.tsr_rd += ev.rd_bytes; end
        if (ev.wr_req) begin exp_c.tcr_wr++; exp_c.tsr_wr += ev.wr_bytes; end
        if (ev.rd_beat) exp_c.vc_rd++;
        if (ev.wr_beat) exp_c.vc_wr++;
        if (ev.rd_done) exp_c.bc_rd += ev.rd_busy;
        if (ev.wr_done) exp_c.bc_wr += ev.wr_busy;
        if (ev.rd_first) exp_c.rlc[interval(ev.rd_lat, rlo, NUM_RD_BINS)]++;
        if (ev.wr_resp)  exp_c.wlc[interval(ev.wr_lat, wlo, NUM_WR_BINS)]++;
      end
      #1;
      checks++;
      if (counts !== exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: counts differ", n);
      end
    end
    // every interval must have been reached
    for (int k = 0; k < NUM_RD_BINS; k++) begin
      checks++;
      if (exp_c.rlc[k] == 0 && counts.rlc[k] == 0) $display("note: read interval %0d unused", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
