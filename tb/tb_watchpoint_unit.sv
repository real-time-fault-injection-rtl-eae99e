// tb_watchpoint_unit: random CPU bus traffic against every watchpoint kind.
// A reference model computes the expected match of each bus cycle; hit,
// brk_hit and hit_addr are checked one cycle later (registered compare).
module tb_watchpoint_unit;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW-1:0] wp_addr;
  wp_ctrl_t      wp_ctrl;
  logic          if_valid, re, we;
  logic [AW-1:0] pc, maddr;
  logic          hit, brk_hit;
  logic [AW-1:0] hit_addr;

  watchpoint_unit dut (.clk, .rst_n, .wp_addr, .wp_ctrl, .cpu_if_valid(if_valid), .cpu_pc(pc),
    .cpu_mem_re(re), .cpu_mem_we(we), .cpu_mem_addr(maddr), .hit, .brk_hit, .hit_addr);

  function automatic logic model(wp_ctrl_t c, logic [AW-1:0] wa, logic iv, logic [AW-1:0] p,
                                 logic r, logic w, logic [AW-1:0] a);
    if (!c.en) return 1'b0;
    case (c.kind)
      WP_FETCH: return iv && p == wa;
      WP_READ:  return r && a == wa;
      WP_WRITE: return w && a == wa;
      default:  return (r || w) && a == wa;
    endcase
  endfunction

  int nhits = 0;
  initial begin
    logic exp_hit, exp_brk;
    logic [AW-1:0] exp_addr;
    wp_addr = 32'h100; wp_ctrl = '0; if_valid = 0; re = 0; we = 0; pc = 0; maddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 500 == 0) begin
        wp_ctrl = wp_ctrl_t'($urandom_range(0, 15));
        wp_ctrl.en = ($urandom_range(0, 4) != 0);
      end
      if_valid = $urandom_range(0, 1);
      pc       = 32'h100 + 4 * $urandom_range(0, 3);
      re       = $urandom_range(0, 1);
      we       = !re && $urandom_range(0, 1);
      maddr    = 32'h100 + 4 * $urandom_range(0, 3);
      exp_hit  = model(wp_ctrl, wp_addr, if_valid, pc, re, we, maddr);
      exp_brk  = exp_hit && wp_ctrl.brk;
      exp_addr = (wp_ctrl.kind == WP_FETCH) ? pc : maddr;
      @(posedge clk); #1;
      checks++;
      if (hit !== exp_hit || brk_hit !== exp_brk) begin
        failures++;
        if (failures < 5) $display("mismatch cycle %0d: hit %b/%b brk %b/%b", i, hit, exp_hit, brk_hit, exp_brk);
      end
      if (exp_hit) begin
        nhits++;
        checks++;
        if (hit_addr !== exp_addr) failures++;
      end
    end
    checks++;
    if (nhits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
