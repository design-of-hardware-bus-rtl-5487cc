// tb_bm_addr_decoder -- self-checking test of the address decoder.
// Random ranges, IDs and addresses (plus addresses on the range edges) are
// applied; the expected one-hot hit is worked out here from the
// definition: first set, in index order, whose range holds the address and
// whose ID filter (if on) matches.
module tb_bm_addr_decoder;
  import hbmu_pkg::*;

  logic [AXI_ADDR_W-1:0] addr;
  logic [AXI_ID_W-1:0]   id;
  pc_range_t             cfg [NUM_PC];
  logic [NUM_PC-1:0]     hit;
  int checks = 0, failures = 0;

  bm_addr_decoder dut (.addr, .id, .range_cfg(cfg), .hit);

  function automatic logic [NUM_PC-1:0] model();
    for (int i = 0; i < NUM_PC; i++) begin
      if (addr >= cfg[i].base && addr <= cfg[i].limit &&
          (!cfg[i].id_en || cfg[i].id == id))
        return NUM_PC'(1) << i;
    end
    return '0;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (hit !== model()) begin
      failures++;
      $display("FAIL addr=%h id=%0d hit=%b exp=%b", addr, id, hit, model());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: three disjoint ranges, ID filter on set 1
    cfg[0] = '{base: 32'h0000_0000, limit: 32'h0000_0FFF, id_en: 1'b0, id: '0};
    cfg[1] = '{base: 32'h0000_1000, limit: 32'h0000_1FFF, id_en: 1'b1, id: 4'd3};
    cfg[2] = '{base: 32'h0000_0800, limit: 32'h0000_2FFF, id_en: 1'b0, id: '0};
    addr = 32'h0000_0FFF; id = 0; check();
    if (hit !== 3'b001) failures++;
    addr = 32'h0000_1000; id = 3; check();
    if (hit !== 3'b010) failures++;
    addr = 32'h0000_1000; id = 2; check();   // ID mismatch: falls to set 2
    if (hit !== 3'b100) failures++;
    addr = 32'h0000_3000; id = 3; check();
    if (hit !== 3'b000) failures++;
    checks += 4;
    // random
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NUM_PC; i++) begin
        logic [31:0] a, b;
        a = $urandom & 32'h0000_FFFF;
        b = $urandom & 32'h0000_FFFF;
        cfg[i].base  = (a < b) ? a : b;
        cfg[i].limit = (a < b) ? b : a;
        cfg[i].id_en = ($urandom % 3) == 0;
        cfg[i].id    = 4'($urandom);
      end
      case ($urandom % 3)
        0: addr = $urandom & 32'h0000_FFFF;
        1: addr = cfg[$urandom % NUM_PC].base;
        default: addr = cfg[$urandom % NUM_PC].limit + 32'($urandom % 2);
      endcase
      id = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
