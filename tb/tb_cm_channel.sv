// tb_cm_channel -- self-checking test of the one-channel contention counter.
// Directed case: the granted source is the only requester (no conflict),
// then with one rival (conflict), then a rival routed to another
// destination (no conflict).  Random phase: random requests, routes,
// handshakes, grants and burst ends, for a per-transfer and a per-burst
// instance, against counters kept here.
module tb_cm_channel;
  localparam int NS = 6, ND = 2;

  logic clk = 0, rst_n = 0, en, clr;
  logic       src_valid [NS];
  logic [0:0] src_dest  [NS];
  logic       dst_valid [ND], dst_ready [ND], dst_last [ND];
  logic [2:0] dst_grant [ND];
  logic [31:0] cnt_t [NS], cnt_b [NS];
  logic [ND-1:0] conf_t, conf_b;
  longint exp_t [NS], exp_b [NS];
  bit in_burst [ND];
  int checks = 0, failures = 0;

  cm_channel #(.N_SRC(NS), .N_DST(ND), .PER_BURST(1'b0)) dut_t (
    .clk, .rst_n, .en, .clr, .src_valid, .src_dest, .dst_valid, .dst_ready,
    .dst_last, .dst_grant, .cnt(cnt_t), .conflict(conf_t));
  cm_channel #(.N_SRC(NS), .N_DST(ND), .PER_BURST(1'b1)) dut_b (
    .clk, .rst_n, .en, .clr, .src_valid, .src_dest, .dst_valid, .dst_ready,
    .dst_last, .dst_grant, .cnt(cnt_b), .conflict(conf_b));

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int i = 0; i < NS; i++) begin src_valid[i] = 0; src_dest[i] = 0; end
    for (int d = 0; d < ND; d++) begin
      dst_valid[d] = 0; dst_ready[d] = 0; dst_last[d] = 1; dst_grant[d] = 0;
    end
  endtask

  // model step, applied at the clock edge
  task automatic model_step();
    for (int d = 0; d < ND; d++) begin
      bit fire, rival;
      fire = dst_valid[d] && dst_ready[d];
      rival = 0;
      for (int i = 0; i < NS; i++)
        if (i != dst_grant[d] && src_valid[i] && src_dest[i] == d) rival = 1;
      if (!clr && en && fire && rival) begin
        exp_t[dst_grant[d]]++;
        if (!in_burst[d]) exp_b[dst_grant[d]]++;
      end
      if (fire) in_burst[d] = !dst_last[d];
    end
    if (clr) for (int i = 0; i < NS; i++) begin exp_t[i] = 0; exp_b[i] = 0; end
  endtask

  task automatic compare(string tag);
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (cnt_t[i] != 32'(exp_t[i]) || cnt_b[i] != 32'(exp_b[i])) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s src%0d: %0d/%0d exp %0d/%0d", tag, i, cnt_t[i], cnt_b[i],
                   exp_t[i], exp_b[i]);
      end
    end
  endtask

  task automatic cycle(string tag);
    @(posedge clk);
    model_step();
    #1 compare(tag);
    @(negedge clk);
  endtask

  initial begin
    en = 1; clr = 0; idle();
    for (int i = 0; i < NS; i++) begin exp_t[i] = 0; exp_b[i] = 0; end
    for (int d = 0; d < ND; d++) in_burst[d] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // master 2 alone to slave 0: no conflict
    src_valid[2] = 1; dst_valid[0] = 1; dst_ready[0] = 1; dst_grant[0] = 2;
    cycle("alone");
    checks++; if (cnt_t[2] != 0) failures++;
    // master 2 granted, master 4 waits for slave 0: conflict for m2
    src_valid[4] = 1;
    cycle("rival");
    checks++; if (cnt_t[2] != 1 || cnt_b[2] != 1) failures++;
    // master 4 now routed to slave 1: no conflict at slave 0
    src_dest[4] = 1;
    cycle("other dest");
    checks++; if (cnt_t[2] != 1) failures++;
    idle();
    // random
    for (int n = 0; n < 5000; n++) begin
      en  = ($urandom % 10) != 0;
      clr = ($urandom % 400) == 0;
      for (int i = 0; i < NS; i++) begin
        src_valid[i] = ($urandom % 3) == 0;
        src_dest[i]  = 1'($urandom);
      end
      for (int d = 0; d < ND; d++) begin
        dst_valid[d] = $urandom % 2;
        dst_ready[d] = $urandom % 2;
        dst_last[d]  = ($urandom % 3) == 0;
        dst_grant[d] = 3'($urandom % NS);
      end
      cycle("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
