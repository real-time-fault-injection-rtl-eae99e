// tb_fi_module: Basic and Plus FI modules side by side, each driving its own
// model memory / register file.  For every mode the test arms the module,
// raises the trigger and checks: the faulty value written, the cycle of the
// write (2 cycles after the triggering bus cycle for a preset value, 4 for
// read-modify-write), the resume pulse for register targets (3 or 5 halted
// cycles), the done report, disarming after one injection and disarming by
// rewriting the control word.
module tb_fi_module;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [AW-1:0] fi_addr;
  logic [DW-1:0] fi_data;
  fi_ctrl_t      fi_ctrl;
  logic          ctrl_wr [2];
  logic          wp_hit, brk_hit;
  acc_req_t      acc [2];
  logic [DW-1:0] rdata [2];
  logic          own [2], resume [2], armed [2], done [2];
  logic [DW-1:0] done_value [2];

  fi_module #(.PLUS(1'b0)) u_basic (.clk, .rst_n, .fi_addr, .fi_data, .fi_ctrl, .ctrl_wr(ctrl_wr[0]),
    .wp_hit, .brk_hit, .acc(acc[0]), .acc_rdata(rdata[0]), .own(own[0]), .resume(resume[0]),
    .armed(armed[0]), .done(done[0]), .done_value(done_value[0]));
  fi_module #(.PLUS(1'b1)) u_plus (.clk, .rst_n, .fi_addr, .fi_data, .fi_ctrl, .ctrl_wr(ctrl_wr[1]),
    .wp_hit, .brk_hit, .acc(acc[1]), .acc_rdata(rdata[1]), .own(own[1]), .resume(resume[1]),
    .armed(armed[1]), .done(done[1]), .done_value(done_value[1]));

  // model target: 16 memory words and 16 registers per instance, read data next cycle
  logic [DW-1:0] mem [2][16];
  logic [DW-1:0] rf  [2][16];
  int            wr_cyc [2], res_cyc [2], wr_cnt [2];
  logic [DW-1:0] wr_val [2];
  for (genvar k = 0; k < 2; k++) begin : g_model
    always @(posedge clk) if (rst_n) begin
      if (acc[k].req) begin
        if (acc[k].we) begin
          if (acc[k].space) rf[k][acc[k].addr[3:0]] <= acc[k].wdata;
          else              mem[k][acc[k].addr[5:2]] <= acc[k].wdata;
          wr_cyc[k] <= cyc; wr_val[k] <= acc[k].wdata; wr_cnt[k] <= wr_cnt[k] + 1;
        end
        rdata[k] <= acc[k].space ? rf[k][acc[k].addr[3:0]] : mem[k][acc[k].addr[5:2]];
      end
      if (resume[k]) res_cyc[k] <= cyc;
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // arm instance k, trigger, check
  task automatic run(int k, bit space, bit rmw, logic [DW-1:0] data, int exp_wr, int exp_res);
    int tcyc, w0;
    logic [DW-1:0] old, expv;
    fi_addr = space ? 32'd7 : 32'h14; fi_data = data;
    old  = space ? rf[k][7] : mem[k][5];
    expv = (k == 1 && rmw) ? (old ^ data) : data;
    @(negedge clk); fi_ctrl = '{rmw: rmw, space: space, arm: 1'b1}; ctrl_wr[k] = 1;
    @(negedge clk); ctrl_wr[k] = 0;
    check(armed[k], "armed after ctrl write");
    w0 = wr_cnt[k];
    // trigger: the triggering bus cycle is tcyc, the registered hit arrives at tcyc+1
    repeat (3) @(negedge clk);
    tcyc = cyc;
    @(negedge clk); if (space) brk_hit = 1; else wp_hit = 1;
    @(negedge clk); brk_hit = 0; wp_hit = 0;
    repeat (8) @(negedge clk);
    check(wr_cnt[k] == w0 + 1, "exactly one write");
    check(wr_cyc[k] - tcyc == exp_wr, $sformatf("write delay %0d expected %0d", wr_cyc[k] - tcyc, exp_wr));
    check(wr_val[k] == expv, "faulty value");
    check((space ? rf[k][7] : mem[k][5]) == expv, "target holds faulty value");
    if (space) check(res_cyc[k] - tcyc == exp_res, $sformatf("resume at %0d expected %0d", res_cyc[k] - tcyc, exp_res));
    check(done_value[k] == expv, "done value");
    check(!armed[k], "disarmed after injection");
    // a second trigger must do nothing
    w0 = wr_cnt[k];
    @(negedge clk); wp_hit = 1; brk_hit = 1;
    @(negedge clk); wp_hit = 0; brk_hit = 0;
    repeat (6) @(negedge clk);
    check(wr_cnt[k] == w0, "no write when disarmed");
  endtask

  int ndone = 0;
  always @(posedge clk) if (rst_n && (done[0] || done[1])) ndone <= ndone + 1;

  initial begin
    wp_hit = 0; brk_hit = 0; ctrl_wr[0] = 0; ctrl_wr[1] = 0; fi_ctrl = '0; fi_addr = 0; fi_data = 0;
    wr_cnt[0] = 0; wr_cnt[1] = 0; res_cyc[0] = 0; res_cyc[1] = 0;
    for (int k = 0; k < 2; k++) for (int i = 0; i < 16; i++) begin mem[k][i] = 32'hA5A5_0000 + i; rf[k][i] = 32'h1000 + i; end
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 0, 0, 32'hDEAD_BEEF, 2, 0);     // Basic, memory
    run(0, 0, 1, 32'h0000_0010, 2, 0);     // Basic ignores rmw
    run(0, 1, 0, 32'h0BAD_F00D, 2, 3);     // Basic, register
    run(1, 0, 1, 32'h0000_0100, 4, 0);     // Plus, memory bit flip
    run(1, 0, 0, 32'h1234_5678, 2, 0);     // Plus with predetermined value
    run(1, 1, 1, 32'h8000_0000, 4, 5);     // Plus, register bit flip
    // arm then disarm by writing the control word again
    @(negedge clk); fi_ctrl = '{rmw: 1'b0, space: 1'b0, arm: 1'b1}; ctrl_wr[1] = 1;
    @(negedge clk); fi_ctrl = '0;
    @(negedge clk); ctrl_wr[1] = 0;
    check(!armed[1], "disarm by control write");
    check(ndone == 6, "six done reports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
