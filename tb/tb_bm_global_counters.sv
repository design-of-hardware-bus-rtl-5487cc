// tb_bm_global_counters -- self-checking test of the four 64-bit global
// clock counters: random enables, clears and monitor activity, compared
// every cycle with counters kept here.
module tb_bm_global_counters;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0, active;
  logic [NUM_GCC-1:0] en, clr;
  logic [GCC_W-1:0] cnt [NUM_GCC];
  logic [GCC_W-1:0] exp_cnt [NUM_GCC];
  int checks = 0, failures = 0;

  bm_global_counters dut (.clk, .rst_n, .active, .en, .clr, .cnt);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    active = 0; en = '0; clr = '0;
    for (int g = 0; g < NUM_GCC; g++) exp_cnt[g] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      active = ($urandom % 8) != 0;
      en     = NUM_GCC'($urandom);
      clr    = (($urandom % 50) == 0) ? NUM_GCC'($urandom) : '0;
      @(posedge clk);
      for (int g = 0; g < NUM_GCC; g++) begin
        if (clr[g]) exp_cnt[g] = '0;
        else if (active && en[g]) exp_cnt[g] = exp_cnt[g] + 64'd1;
      end
      #1;
      for (int g = 0; g < NUM_GCC; g++) begin
        checks++;
        if (cnt[g] !== exp_cnt[g]) begin
          failures++;
          $display("FAIL gcc%0d=%0d exp=%0d", g, cnt[g], exp_cnt[g]);
        end
      end
    end
    // a fixed interval: counter 2 alone for exactly 37 cycles
    @(negedge clk); clr = '1; en = '0;
    @(negedge clk); clr = '0; en = 4'b0100; active = 1;
    repeat (37) @(negedge clk);
    en = '0;
    @(negedge clk);
    checks++;
    if (cnt[2] !== 64'd37 || cnt[0] !== 64'd0) begin
      failures++;
      $display("FAIL interval count %0d", cnt[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
