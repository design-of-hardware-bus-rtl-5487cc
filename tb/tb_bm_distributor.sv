// tb_bm_distributor -- self-checking test of the port distributor.
// Eight ports carry different random bus values every cycle; the output
// must equal the port whose number was taken over from `sel` while `hold`
// was low, a selection made while `hold` is high must wait until it drops,
// an out-of-range selection must give an idle bus, and `switched` must
// flag exactly the cycles in which a new port is taken over.
module tb_bm_distributor;
  import hbmu_pkg::*;

  logic clk = 0, rst_n = 0, hold = 0;
  axi_mon_t ports [8];
  logic [7:0] sel = 0, sel_used;
  logic switched;
  int n_switch = 0;
  axi_mon_t bus;
  int exp_sel = 0;
  int checks = 0, failures = 0;

  bm_distributor dut (.clk, .rst_n, .ports, .sel, .hold, .bus, .sel_used, .switched);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 8; p++)
        ports[p] = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom % 5 == 0) sel = ($urandom % 8 == 0) ? 8'(8 + $urandom % 4) : 8'($urandom % 8);
      hold = ($urandom % 3) == 0;
      @(posedge clk);
      begin
        bit sw;
        sw = !hold && sel != 8'(exp_sel);
        if (!hold) exp_sel = sel;
        #1;
        checks++;
        if (switched !== sw) begin failures++; $display("FAIL switched=%b expected %b", switched, sw); end
        if (sw) n_switch++;
      end
      @(negedge clk);
      #1;
      checks++;
      if (sel_used != 8'(exp_sel) ||
          bus !== ((exp_sel < 8) ? ports[exp_sel] : axi_mon_t'('0))) begin
        failures++;
        if (failures < 10) $display("FAIL sel_used=%0d expected %0d", sel_used, exp_sel);
      end
    end
    checks++;
    if (n_switch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
