// tb_bcu_clock_gate -- self-checking test of the contention clock gate.
// With 22 counters and the default threshold 4: a counter at 4 must not
// request gating, a counter at 5 must (one cycle later), and the gated
// clock must then deliver no rising edge; lowering the counters must
// restart it.  Random counter values are checked against "any > 4".
module tb_bcu_clock_gate;
  localparam int N = 22;

  logic clk = 0, rst_n = 0;
  logic [31:0] cnt [N];
  logic cg_en, gclk;
  int gedges = 0;
  int checks = 0, failures = 0;

  bcu_clock_gate dut (.clk, .rst_n, .cnt, .cg_en, .gclk);

  always #5 clk = !clk;
  always @(posedge gclk) gedges++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cg(bit e, string tag);
    checks++;
    if (cg_en !== e) begin
      failures++;
      $display("FAIL %s: cg_en=%b", tag, cg_en);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) cnt[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    cnt[7] = 4;
    repeat (3) @(negedge clk);
    expect_cg(0, "equal to threshold");
    gedges = 0;
    repeat (10) @(negedge clk);
    checks++; if (gedges != 10) begin failures++; $display("FAIL gclk ran %0d/10", gedges); end
    cnt[7] = 5;
    @(negedge clk);
    expect_cg(1, "above threshold, next cycle");
    @(negedge clk);
    gedges = 0;
    repeat (10) @(negedge clk);
    checks++; if (gedges != 0) begin failures++; $display("FAIL gclk not stopped: %0d", gedges); end
    cnt[7] = 0;
    repeat (2) @(negedge clk);
    expect_cg(0, "released");
    gedges = 0;
    repeat (10) @(negedge clk);
    checks++; if (gedges != 10) begin failures++; $display("FAIL gclk not restarted: %0d", gedges); end
    for (int n = 0; n < 500; n++) begin
      bit exp;
      exp = 0;
      for (int i = 0; i < N; i++) begin
        cnt[i] = ($urandom % 4 == 0) ? $urandom % 8 : $urandom % 5;
        if (cnt[i] > 4) exp = 1;
      end
      @(negedge clk);
      expect_cg(exp, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
