// tb_bm_txn_detect -- self-checking test of the transaction detector.
// Directed AXI sequences, driven cycle by cycle, with the expected events
// worked out by hand from the cycle on which each handshake is placed:
// single read burst (latency, busy length, bytes), two outstanding reads
// to different PC sets, a write whose first data beat shares the address
// cycle, a write with data and response later, an ID-filtered miss, and a
// read beat with nothing outstanding (untracked flag), and a flush.
module tb_bm_txn_detect;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, flush = 0;
  axi_mon_t  bus;
  pc_range_t cfg [NUM_PC];
  pc_event_t ev [NUM_PC];
  logic ar_fire, aw_fire, untracked;
  int checks = 0, failures = 0;

  bm_txn_detect dut (.clk, .rst_n, .clr, .flush, .bus, .range_cfg(cfg), .ev, .ar_fire, .aw_fire, .untracked);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string tag);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", tag); end
  endtask

  // one clock: signals set at the falling edge, events sampled before the
  // rising edge
  task automatic step();
    @(negedge clk);
    bus = '0;
  endtask

  function automatic int nonzero_sets();
    int n = 0;
    for (int p = 0; p < NUM_PC; p++) if (ev[p] != '0 &&
        (ev[p].rd_req || ev[p].wr_req || ev[p].rd_beat || ev[p].wr_beat || ev[p].wr_resp))
      n++;
    return n;
  endfunction

  initial begin
    bus = '0;
    cfg[0] = '{base: 32'h0000_0000, limit: 32'h0000_0FFF, id_en: 1'b0, id: '0};
    cfg[1] = '{base: 32'h0000_1000, limit: 32'h0000_1FFF, id_en: 1'b0, id: '0};
    cfg[2] = '{base: 32'h0000_2000, limit: 32'h0000_2FFF, id_en: 1'b1, id: 4'd5};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);

    // 1. read of 4 beats x 4 bytes to set 1; data starts 5 cycles later
    bus.araddr = 32'h1010; bus.arlen = 3; bus.arsize = 2; bus.arvalid = 1; bus.arready = 1;
    #1 check(ev[1].rd_req && ev[1].rd_bytes == 16 && !ev[0].rd_req && ar_fire, "read request");
    step();
    repeat (4) step();
    for (int b = 0; b < 4; b++) begin
      bus.rvalid = 1; bus.rready = 1; bus.rlast = (b == 3);
      #1;
      check(ev[1].rd_beat && !ev[0].rd_beat, "read beat set 1");
      check(ev[1].rd_first == (b == 0), "first beat flag");
      if (b == 0) check(ev[1].rd_lat == 5, "read latency 5");
      if (b == 3) check(ev[1].rd_done && ev[1].rd_busy == 9, "read busy 9");
      step();
    end

    // 2. two outstanding reads: A to set 0 (2 beats), B to set 2 with ID 5
    bus.araddr = 32'h0100; bus.arlen = 1; bus.arsize = 3; bus.arvalid = 1; bus.arready = 1;
    #1 check(ev[0].rd_req && ev[0].rd_bytes == 16, "read A request");
    step();
    bus.araddr = 32'h2000; bus.arid = 5; bus.arlen = 0; bus.arsize = 0; bus.arvalid = 1; bus.arready = 1;
    #1 check(ev[2].rd_req && ev[2].rd_bytes == 1, "read B request");
    step();
    step();
    bus.rvalid = 1; bus.rready = 1;
    #1 check(ev[0].rd_first && ev[0].rd_lat == 3, "read A latency 3");
    step();
    bus.rvalid = 1; bus.rready = 0;          // a stalled beat is not a transfer
    #1 check(nonzero_sets() == 0, "stalled beat ignored");
    step();
    bus.rvalid = 1; bus.rready = 1; bus.rlast = 1;
    #1 check(ev[0].rd_done && ev[0].rd_busy == 6, "read A busy 6");
    step();
    bus.rvalid = 1; bus.rready = 1; bus.rlast = 1;
    #1 check(ev[2].rd_first && ev[2].rd_lat == 5 && ev[2].rd_done && ev[2].rd_busy == 6,
             "read B latency 5 busy 6");
    step();

    // 3. single-beat write to set 0, data in the address cycle, response 3 later
    bus.awaddr = 32'h0040; bus.awlen = 0; bus.awsize = 2; bus.awvalid = 1; bus.awready = 1;
    bus.wvalid = 1; bus.wready = 1; bus.wlast = 1;
    #1 check(ev[0].wr_req && ev[0].wr_bytes == 4 && ev[0].wr_beat && ev[0].wr_done &&
             ev[0].wr_busy == 1 && aw_fire, "write with data in address cycle");
    step();
    step(); step();
    bus.bvalid = 1; bus.bready = 1;
    #1 check(ev[0].wr_resp && ev[0].wr_lat == 3, "write latency 3");
    step();

    // 4. write of 2 beats to set 1: data 2 and 4 cycles after AW, response 2 later
    bus.awaddr = 32'h1ff0; bus.awlen = 1; bus.awsize = 1; bus.awvalid = 1; bus.awready = 1;
    #1 check(ev[1].wr_req && ev[1].wr_bytes == 4, "write 2 request");
    step();
    step();
    bus.wvalid = 1; bus.wready = 1;
    #1 check(ev[1].wr_beat && !ev[1].wr_done, "write 2 beat 1");
    step();
    step();
    bus.wvalid = 1; bus.wready = 1; bus.wlast = 1;
    #1 check(ev[1].wr_done && ev[1].wr_busy == 5, "write 2 busy 5");
    step();
    step();
    bus.bvalid = 1; bus.bready = 1;
    #1 check(ev[1].wr_resp && ev[1].wr_lat == 6, "write 2 latency 6");
    step();

    // 5. ID 4 to the set 2 range: filtered out everywhere
    bus.araddr = 32'h2004; bus.arid = 4; bus.arvalid = 1; bus.arready = 1;
    #1 check(nonzero_sets() == 0 && ar_fire, "ID mismatch counted nowhere");
    step();
    bus.rvalid = 1; bus.rready = 1; bus.rlast = 1;
    #1 check(nonzero_sets() == 0, "its data counted nowhere");
    step();
    check(!untracked, "no untracked traffic yet");

    // 6. read data with nothing outstanding
    bus.rvalid = 1; bus.rready = 1; bus.rlast = 1;
    #1 check(nonzero_sets() == 0, "orphan beat ignored");
    step();
    #1 check(untracked, "untracked flag set");
    clr = 1; step(); clr = 0;
    #1 check(!untracked, "untracked flag cleared");

    // 7. flush drops an open read: its data is then untracked
    bus.araddr = 32'h0010; bus.arlen = 0; bus.arvalid = 1; bus.arready = 1;
    step();
    flush = 1; step(); flush = 0;
    bus.rvalid = 1; bus.rready = 1; bus.rlast = 1;
    #1 check(nonzero_sets() == 0, "flushed read not charged");
    step();
    #1 check(untracked, "beat after flush is untracked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
