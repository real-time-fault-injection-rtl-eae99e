// tb_configs: the timing comparison across OCD configurations.  Four
// complete systems run side by side, one per configuration: MDI 2 or 8
// bits, each with the Basic and with the Plus FI module.  Each system has
// its own behavioural CPU and runs the same short campaign:
//   set the watchpoint (set-up), debugger preset write, debugger read / XOR
//   mask / write, FI injection into memory (Basic: preset value, Plus:
//   read-modify-write), FI injection into a register through a breakpoint.
// For every configuration the test measures the set-up time, the
// trigger-to-insertion delay of each path and the time the CPU is halted
// for the register injection, prints them as a table, and checks them
// against values worked out from the message length: a command is
// B = 72 / MDI_W beats, so
//   first configuration message decoded  B + 4 cycles after start,
//   each further one                      B cycles later,
//   debugger preset write                 B + 6 cycles after the trigger,
//   debugger read / mask / write          2B + 19 cycles after the trigger,
// while the FI module takes 2 (Basic) or 4 (Plus) cycles and halts the CPU
// for 3 or 5 cycles whatever the MDI width.  The injected values are
// checked as well.  Watchpoint and branch messages are switched off so that
// the flip's read answer does not queue behind them on MDO (with them on it
// can wait up to one 5-beat message longer).
module tb_configs;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  function automatic script_t ent(dop_e d, cmd_e op, logic [AW-1:0] a, logic [DW-1:0] dat);
    script_t e;
    e.dop = d; e.msg.op = op; e.msg.addr = a; e.msg.data = dat;
    return e;
  endfunction
  function automatic logic [DW-1:0] wpc(logic brk, logic en);
    wp_ctrl_t c;
    c.brk = brk; c.kind = WP_FETCH; c.en = en;
    return DW'(c);
  endfunction
  function automatic logic [DW-1:0] fic(logic rmw, logic space);
    fi_ctrl_t c;
    c.rmw = rmw; c.space = space; c.arm = 1'b1;
    return DW'(c);
  endfunction

  localparam int NCFG = 4;
  localparam int CFG_MDI [NCFG]  = '{2, 2, 8, 8};
  localparam bit CFG_PLUS [NCFG] = '{1'b0, 1'b1, 1'b0, 1'b1};
  localparam logic [AW-1:0] W1 = 32'h400, W2 = 32'h404, W3 = 32'h408;
  localparam int            FREG = 7;
  localparam logic [DW-1:0] INIT = 32'hC0DE_0000;

  bit finished [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned MDI = CFG_MDI[g];
    localparam bit          PLUS = CFG_PLUS[g];
    localparam int          B = 72 / MDI;

    logic          hs_we = 0, start = 0;
    logic [5:0]    hs_addr = '0;
    script_t       hs_wdata = '0;
    logic [7:0]    ht_addr = '0;
    logic          busy, done, fi_armed;
    out_msg_t      ht_rdata;
    logic [8:0]    trace_count;
    logic          if_valid = 0, re = 0, we = 0, br_valid = 0;
    logic          halt, reg_en, reg_we;
    logic [AW-1:0] pc = '0, maddr = '0, br_target = '0;
    logic [DW-1:0] wdata = '0, rdata, reg_wdata;
    logic [DW-1:0] reg_rdata = '0;
    logic [RW-1:0] reg_addr;
    logic [15:0]   lost;

    fi_system #(.MDI_W(MDI), .FI_PLUS(PLUS)) dut (
      .clk, .rst_n, .hs_we, .hs_addr, .hs_wdata, .ht_addr, .ht_rdata, .trace_count,
      .start, .busy, .done, .ext_trig(1'b0),
      .cpu_if_valid(if_valid), .cpu_pc(pc), .cpu_mem_re(re), .cpu_mem_we(we), .cpu_mem_addr(maddr),
      .cpu_mem_wdata(wdata), .cpu_mem_rdata(rdata), .cpu_br_valid(br_valid), .cpu_br_target(br_target),
      .cpu_halt(halt), .cpu_reg_en(reg_en), .cpu_reg_we(reg_we), .cpu_reg_addr(reg_addr),
      .cpu_reg_wdata(reg_wdata), .cpu_reg_rdata(reg_rdata), .fi_armed, .trace_lost(lost));

    // behavioural CPU: a 16-instruction loop at 0x100 with one taken branch,
    // stalled while cpu_halt is high, and a register file on the debug port
    logic [DW-1:0] rf [32];
    int            k = 0;
    bit            run = 0;
    always @(posedge clk) if (rst_n && reg_en) begin
      if (reg_we) rf[reg_addr] <= reg_wdata;
      reg_rdata <= rf[reg_addr];
    end
    always @(negedge clk) begin
      if_valid = 0; re = 0; we = 0; br_valid = 0;
      if (run && !halt) begin
        if_valid = 1;
        pc       = 32'h100 + 32'(4 * k);
        if (k % 4 == 1) begin re = 1; maddr = 32'h200 + 32'(4 * (k / 4)); end
        if (k == 15) begin br_valid = 1; br_target = 32'h100; end
        k = (k == 15) ? 0 : k + 1;
      end
    end

    // probes: trigger instants, debug-port writes, halted episodes, set-up
    int last_trig = 0, dbg_trig = 0, start_cyc = 0, hrun = 0;
    int port_delay [$], halt_runs [$], cfg_cyc [$];
    always @(posedge clk) if (rst_n) begin
      if (dut.evto && 4'(dut.u_dbg.state) == 4'd4) dbg_trig = cyc - 1;
      if (if_valid && pc == dut.u_ocd.wp_addr && dut.u_ocd.wp_ctrl.en) last_trig = cyc;
      if (dut.u_mem.b_en && dut.u_mem.b_we)
        port_delay.push_back(cyc - (dut.u_ocd.u_fi.own ? last_trig : dbg_trig));
      if (halt) hrun++;
      else if (hrun != 0) begin halt_runs.push_back(hrun); hrun = 0; end
      if (start) start_cyc = cyc;
      if (dut.u_ocd.cmd_valid && dut.u_ocd.cmd.op == CMD_WR_CFG) cfg_cyc.push_back(cyc);
    end

    initial begin
      script_t prog [$];
      int t0;
      string nm;
      nm = $sformatf("MDI%0d%s", MDI, PLUS ? "_FI+" : "_FI ");
      for (int i = 0; i < 32; i++) rf[i] = 32'h5000 + i;
      for (int i = 0; i < 1024; i++) dut.u_mem.mem[i] = 32'(i);
      dut.u_mem.mem[W1 >> 2] = INIT;
      dut.u_mem.mem[W2 >> 2] = INIT + 1;
      dut.u_mem.mem[W3 >> 2] = INIT + 2;
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_ADDR, 32'h120));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, wpc(0, 1)));
      // watchpoint and branch messages off: the read answer of the flip then
      // never waits behind a trace message on MDO, and the delays are exact
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_MSG_EN, 32'h0));
      // a send step ends once the message is handed to the serializer; the
      // pauses let it finish so that each trigger finds the MDI bus idle
      prog.push_back(ent(D_DELAY, CMD_NOP, 32'd100, 0));
      prog.push_back(ent(D_WAIT_WP, CMD_NOP, 0, 0));
      prog.push_back(ent(D_SEND, CMD_MEM_WR, W1, 32'hFA17_0001));
      prog.push_back(ent(D_DELAY, CMD_NOP, 32'd100, 0));
      prog.push_back(ent(D_WAIT_WP, CMD_NOP, 0, 0));
      prog.push_back(ent(D_FLIP, CMD_NOP, W2, 32'h0000_0100));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_ADDR, W3));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_DATA, PLUS ? 32'h0001_0000 : 32'hFA17_0003));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_CTRL, fic(PLUS, 0)));
      prog.push_back(ent(D_WAIT_FI, CMD_NOP, 0, 0));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_ADDR, 32'(FREG)));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_DATA, PLUS ? 32'h0000_0002 : 32'hFA17_0007));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_CTRL, fic(PLUS, 1)));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, wpc(1, 1)));
      prog.push_back(ent(D_WAIT_FI, CMD_NOP, 0, 0));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, 32'h0));
      prog.push_back(ent(D_END, CMD_NOP, 0, 0));
      wait (rst_n);
      foreach (prog[i]) begin
        @(negedge clk); hs_we = 1; hs_addr = 6'(i); hs_wdata = prog[i];
      end
      @(negedge clk); hs_we = 0; run = 1;
      repeat (5) @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = 0;
      while (!done && t0 < 20000) begin @(negedge clk); t0++; end
      check(done, {nm, ": campaign finished"});
      repeat (5) @(negedge clk);
      run = 0;

      check(dut.u_mem.mem[W1 >> 2] == 32'hFA17_0001, {nm, ": debugger preset value"});
      check(dut.u_mem.mem[W2 >> 2] == ((INIT + 1) ^ 32'h100), {nm, ": debugger bit flip"});
      check(dut.u_mem.mem[W3 >> 2] == (PLUS ? ((INIT + 2) ^ 32'h0001_0000) : 32'hFA17_0003), {nm, ": FI memory value"});
      check(rf[FREG] == (PLUS ? ((32'h5000 + FREG) ^ 32'h2) : 32'hFA17_0007), {nm, ": FI register value"});
      check(port_delay.size() == 3 && halt_runs.size() == 1 && cfg_cyc.size() >= 2, {nm, ": events seen"});
      if (port_delay.size() == 3 && halt_runs.size() == 1 && cfg_cyc.size() >= 2) begin
        $display("%s  set-up %3d + %2d per register   debugger preset %3d   debugger flip %3d   FI %0d   FI register halt %0d",
                 nm, cfg_cyc[0] - start_cyc, cfg_cyc[1] - cfg_cyc[0], port_delay[0], port_delay[1],
                 port_delay[2], halt_runs[0]);
        check(cfg_cyc[0] - start_cyc == B + 4 && cfg_cyc[1] - cfg_cyc[0] == B, {nm, ": set-up timing"});
        check(port_delay[0] == B + 6, $sformatf("%s: debugger preset delay %0d, expected %0d", nm, port_delay[0], B + 6));
        check(port_delay[1] == 2 * B + 19, $sformatf("%s: debugger flip delay %0d, expected %0d", nm, port_delay[1], 2 * B + 19));
        check(port_delay[2] == (PLUS ? 4 : 2), $sformatf("%s: FI delay %0d", nm, port_delay[2]));
        check(halt_runs[0] == (PLUS ? 5 : 3), $sformatf("%s: FI register halt %0d", nm, halt_runs[0]));
      end
      check(lost == 0, {nm, ": no trace message lost"});
      finished[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
