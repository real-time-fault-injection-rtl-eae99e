// tb_fi_system: end-to-end fault-injection campaign on the full system at
// its default configuration (MDI 8 bits, MDO 8 bits, Plus FI module).
//
// A behavioural CPU runs a small loop (16 instructions at 0x100..0x13C, one
// taken branch per pass, reads and writes of a data array) and stalls while
// cpu_halt is high; it exposes a 32-entry register file to the OCD's debug
// register port.  The host loads a campaign script into the debugger and
// starts it.  The campaign runs eight experiments, one per injection method:
//   1 debugger, preset value written after a watchpoint event     (step 3A)
//   2 debugger, read / XOR mask / write after a watchpoint event  (step 3B)
//   3 FI module, preset value                                     (Plus, rmw=0)
//   4 FI module, read-modify-write                                (Plus, rmw=1)
//   5 FI module into a CPU register through a breakpoint, auto resume
//   6 debugger, preset value into a CPU register: breakpoint, register
//     write, resume command
//   7 debugger, register read / XOR mask / write: breakpoint, flip, resume
//   8 external trigger, delay, real-time read of an injected word
// The test then checks every injected word and register, the set-up time
// (configuration messages every 9 cycles), the
// trigger-to-insertion delays of the FI module (2 and 4 cycles), the
// halted time of each register injection (5 cycles with the FI module; 22
// and 44 cycles through the debugger: 12 cycles from the halt to the decode
// of the first command, 9 more per further command, and 11 for the read
// answer of the flip to come back over the 5-beat MDO), that trace messages of
// each kind reached the debugger's output bank, and counts each mechanism.
module tb_fi_system;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          hs_we, start, busy, done, ext_trig, fi_armed;
  logic [5:0]    hs_addr;
  script_t       hs_wdata;
  logic [7:0]    ht_addr;
  out_msg_t      ht_rdata;
  logic [8:0]    trace_count;
  logic          if_valid, re, we, br_valid, halt, reg_en, reg_we;
  logic [AW-1:0] pc, maddr, br_target;
  logic [DW-1:0] wdata, rdata, reg_wdata, reg_rdata;
  logic [RW-1:0] reg_addr;
  logic [15:0]   lost;

  fi_system dut (
    .clk, .rst_n, .hs_we, .hs_addr, .hs_wdata, .ht_addr, .ht_rdata, .trace_count,
    .start, .busy, .done, .ext_trig,
    .cpu_if_valid(if_valid), .cpu_pc(pc), .cpu_mem_re(re), .cpu_mem_we(we), .cpu_mem_addr(maddr),
    .cpu_mem_wdata(wdata), .cpu_mem_rdata(rdata), .cpu_br_valid(br_valid), .cpu_br_target(br_target),
    .cpu_halt(halt), .cpu_reg_en(reg_en), .cpu_reg_we(reg_we), .cpu_reg_addr(reg_addr),
    .cpu_reg_wdata(reg_wdata), .cpu_reg_rdata(reg_rdata), .fi_armed, .trace_lost(lost));

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------- behavioural CPU ----------------
  logic [DW-1:0] rf [32];
  int            k = 0;          // instruction index in the loop
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
      // instructions 1, 5, 9, 13 read the array at 0x200; 3, 7, 11 write 0x280
      if (k % 4 == 1) begin re = 1; maddr = 32'h200 + 32'(4 * (k / 4)); end
      if (k % 4 == 3 && k != 15) begin we = 1; maddr = 32'h280 + 32'(4 * (k / 4)); wdata = 32'(cyc); end
      if (k == 15) begin br_valid = 1; br_target = 32'h100; end
      k = (k == 15) ? 0 : k + 1;
    end
  end

  // ---------------- mechanism counters and timing probes ----------------
  int hrun = 0, halt_runs [$];
  int start_cyc = 0, cfg_cyc [$];
  int n_evto = 0, n_halt = 0, n_fi_done = 0, n_wr_b = 0, n_ext = 0;
  int last_trig = 0, dbg_trig = 0, fi_delay [$], port_delay [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.evto) n_evto++;
    if (halt) n_halt++;
    if (halt) hrun++;
    else if (hrun != 0) begin halt_runs.push_back(hrun); hrun = 0; end
    if (dut.u_ocd.u_fi.done) n_fi_done++;
    // the debugger consumes a watchpoint event (state 4 = waiting for it) one cycle after the bus cycle
    if (dut.evto && 4'(dut.u_dbg.state) == 4'd4) dbg_trig = cyc - 1;
    if (dut.u_mem.b_en && dut.u_mem.b_we) begin
      n_wr_b++;
      port_delay.push_back(cyc - (dut.u_ocd.u_fi.own ? last_trig : dbg_trig));
    end
    if (ext_trig) n_ext++;
    if (start) start_cyc = cyc;
    if (dut.u_ocd.cmd_valid && dut.u_ocd.cmd.op == CMD_WR_CFG) cfg_cyc.push_back(cyc);
    // trigger = the bus cycle the watchpoint matched; FI write delay measured from it
    if (if_valid && pc == dut.u_ocd.wp_addr && dut.u_ocd.wp_ctrl.en) last_trig = cyc;
    if (dut.u_ocd.u_fi.acc.req && dut.u_ocd.u_fi.acc.we) fi_delay.push_back(cyc - last_trig);
  end

  function automatic script_t ent(dop_e d, cmd_e op, logic [AW-1:0] a, logic [DW-1:0] dat);
    script_t e;
    e.dop = d; e.msg.op = op; e.msg.addr = a; e.msg.data = dat;
    return e;
  endfunction
  function automatic logic [DW-1:0] wpc(logic brk, wp_type_e kind);
    wp_ctrl_t c;
    c.brk = brk; c.kind = kind; c.en = 1'b1;
    return DW'(c);
  endfunction
  function automatic logic [DW-1:0] fic(logic rmw, logic space);
    fi_ctrl_t c;
    c.rmw = rmw; c.space = space; c.arm = 1'b1;
    return DW'(c);
  endfunction

  localparam logic [AW-1:0] W1 = 32'h400, W2 = 32'h404, W3 = 32'h408, W4 = 32'h40C;
  localparam int            FREG = 7, DREG = 9;

  initial begin
    script_t prog [$];
    int n, t0, nbr, nrd, nfd, nwp;
    logic [DW-1:0] init [4];
    hs_we = 0; hs_addr = 0; hs_wdata = '0; ht_addr = 0; start = 0; ext_trig = 0;
    if_valid = 0; re = 0; we = 0; br_valid = 0; pc = 0; maddr = 0; wdata = 0; br_target = 0;
    for (int i = 0; i < 32; i++) rf[i] = 32'h5000 + i;
    for (int i = 0; i < 4; i++) init[i] = 32'hC0DE_0000 + 32'(i * 16);
    // set-up: preload target memory (the application's data)
    for (int i = 0; i < 1024; i++) dut.u_mem.mem[i] = 32'(i);
    for (int i = 0; i < 4; i++) dut.u_mem.mem[256 + i] = init[i];
    // campaign script
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_ADDR, 32'h120));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, wpc(0, WP_FETCH)));
    // exp 1: debugger, preset value
    prog.push_back(ent(D_WAIT_WP, CMD_NOP, 0, 0));
    prog.push_back(ent(D_SEND, CMD_MEM_WR, W1, 32'hFA17_0001));
    // exp 2: debugger, read-modify-write
    prog.push_back(ent(D_WAIT_WP, CMD_NOP, 0, 0));
    prog.push_back(ent(D_FLIP, CMD_NOP, W2, 32'h0000_0100));
    // exp 3: FI module, preset value
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_ADDR, W3));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_DATA, 32'hFA17_0003));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_CTRL, fic(0, 0)));
    prog.push_back(ent(D_WAIT_FI, CMD_NOP, 0, 0));
    // exp 4: FI module, read-modify-write
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_ADDR, W4));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_DATA, 32'h8000_0000));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_CTRL, fic(1, 0)));
    prog.push_back(ent(D_WAIT_FI, CMD_NOP, 0, 0));
    // exp 5: FI module into a register via a breakpoint
    // (arm first: a breakpoint with nothing armed would leave the CPU halted)
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_ADDR, 32'(FREG)));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_DATA, 32'h0000_0002));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_CTRL, fic(1, 1)));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, wpc(1, WP_FETCH)));
    prog.push_back(ent(D_WAIT_FI, CMD_NOP, 0, 0));
    // exp 6: debugger, preset value into a register (the resume consumes the breakpoint);
    // the watchpoint is switched off first so that WAIT_WP cannot take a hit
    // that happened before the breakpoint bit was set
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, 32'h0));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, wpc(1, WP_FETCH)));
    prog.push_back(ent(D_WAIT_WP, CMD_NOP, 0, 0));
    prog.push_back(ent(D_SEND, CMD_REG_WR, 32'(DREG), 32'hFA17_0006));
    prog.push_back(ent(D_SEND, CMD_RESUME, 0, 0));
    // exp 7: debugger, register bit flip
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, 32'h0));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, wpc(1, WP_FETCH)));
    prog.push_back(ent(D_WAIT_WP, CMD_NOP, 0, 0));
    prog.push_back(ent(D_FLIP, CMD_REG_WR, 32'(DREG + 1), 32'h0000_0004));
    prog.push_back(ent(D_SEND, CMD_RESUME, 0, 0));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, 32'h0));
    // exp 8: external trigger, delay, read back an injected word
    prog.push_back(ent(D_WAIT_EX, CMD_NOP, 0, 0));
    prog.push_back(ent(D_DELAY, CMD_NOP, 32'd30, 0));
    prog.push_back(ent(D_SEND, CMD_MEM_RD, W4, 0));
    prog.push_back(ent(D_DELAY, CMD_NOP, 32'd20, 0));
    prog.push_back(ent(D_END, CMD_NOP, 0, 0));

    repeat (3) @(posedge clk); rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); hs_we = 1; hs_addr = 6'(i); hs_wdata = prog[i];
    end
    @(negedge clk); hs_we = 0; run = 1;
    repeat (5) @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // external trigger once the register experiment is over
    t0 = 0;
    while (halt_runs.size() < 3 && t0 < 8000) begin @(negedge clk); t0++; end
    repeat (150) @(negedge clk);
    ext_trig = 1; @(negedge clk); ext_trig = 0;
    t0 = 0;
    while (busy && t0 < 5000) begin @(negedge clk); t0++; end
    check(!busy, "campaign finished");
    run = 0;

    // injected values
    check(dut.u_mem.mem[256] == 32'hFA17_0001, "exp1 debugger preset value");
    check(dut.u_mem.mem[257] == (init[1] ^ 32'h100), "exp2 debugger bit flip");
    check(dut.u_mem.mem[258] == 32'hFA17_0003, "exp3 FI preset value");
    check(dut.u_mem.mem[259] == (init[3] ^ 32'h8000_0000), "exp4 FI bit flip");
    check(rf[FREG] == ((32'h5000 + FREG) ^ 32'h2), $sformatf("exp5 FI register bit flip %h", rf[FREG]));
    check(rf[DREG] == 32'hFA17_0006, $sformatf("exp6 debugger register preset %h", rf[DREG]));
    check(rf[DREG + 1] == ((32'h5000 + DREG + 1) ^ 32'h4), $sformatf("exp7 debugger register bit flip %h", rf[DREG + 1]));
    check(rf[DREG + 2] == 32'h5000 + DREG + 2, "untouched register");
    check(dut.u_mem.mem[1] == 32'd1, "untouched word");
    // FI timing: preset 2 cycles, read-modify-write 4 cycles (memory and register)
    check(fi_delay.size() == 3, "three FI writes");
    if (fi_delay.size() == 3) begin
      check(fi_delay[0] == 2, $sformatf("FI preset delay %0d", fi_delay[0]));
      check(fi_delay[1] == 4, $sformatf("FI rmw delay %0d", fi_delay[1]));
      check(fi_delay[2] == 4, $sformatf("FI register delay %0d", fi_delay[2]));
    end
    // debugger-driven injections: trigger to write on the memory port
    if (port_delay.size() == 4)
      $display("trigger-to-insertion: debugger preset %0d, debugger flip %0d, FI preset %0d, FI flip %0d cycles",
               port_delay[0], port_delay[1], port_delay[2], port_delay[3]);
    check(port_delay.size() == 4 && port_delay[0] == 15 && port_delay[1] == 37, "debugger injection delays");
    // set-up: configuration messages sent back to back are decoded every 9
    // cycles (one 72-bit message on the 8-bit MDI); the first one is decoded
    // 13 cycles after the start pulse (script read 2, serializer register 1,
    // 9 beats, deserializer output 1)
    check(cfg_cyc.size() >= 5, "configuration writes seen");
    if (cfg_cyc.size() >= 5) begin
      $display("set-up: watchpoint set %0d cycles after start; FI preload (3 messages) %0d cycles",
               cfg_cyc[1] - start_cyc, cfg_cyc[4] - cfg_cyc[2] + 9);
      check(cfg_cyc[0] - start_cyc == 13 && cfg_cyc[1] - cfg_cyc[0] == 9, "watchpoint set-up timing");
      check(cfg_cyc[4] - cfg_cyc[2] == 18, "FI preload messages back to back");
    end
    check(halt_runs.size() == 3, $sformatf("%0d halt episodes, expected 3", halt_runs.size()));
    if (halt_runs.size() == 3) begin
      $display("halt time for register injection: FI module %0d, debugger preset %0d, debugger flip %0d cycles",
               halt_runs[0], halt_runs[1], halt_runs[2]);
      check(halt_runs[0] == 5, $sformatf("FI register injection halted %0d cycles, expected 5", halt_runs[0]));
      check(halt_runs[1] == 22, $sformatf("debugger register preset halted %0d cycles, expected 22", halt_runs[1]));
      check(halt_runs[2] == 44, $sformatf("debugger register flip halted %0d cycles, expected 44", halt_runs[2]));
    end
    check(!halt, "CPU running at the end");
    // output bank contents
    nbr = 0; nrd = 0; nfd = 0; nwp = 0;
    for (int i = 0; i < int'(trace_count); i++) begin
      @(negedge clk); ht_addr = 8'(i);
      @(negedge clk);
      case (ht_rdata.tcode)
        TC_BRANCH:  begin nbr++; if (ht_rdata.payload != 32'h100) check(0, "branch target"); end
        TC_WP_HIT:  nwp++;
        TC_FI_DONE: nfd++;
        TC_RD_DATA: begin nrd++; if (nrd == 3) check(ht_rdata.payload == (init[3] ^ 32'h8000_0000), "exp8 read back"); end
        default: ;
      endcase
    end
    check(lost == 0, "no trace message lost");
    $display("mechanisms: watchpoint events %0d, branch msgs %0d, wp msgs %0d, read answers %0d, FI done %0d, halted cycles %0d, debug-port writes %0d, ext triggers %0d",
             n_evto, nbr, nwp, nrd, nfd, n_halt, n_wr_b, n_ext);
    check(n_evto >= 5, "watchpoint events");
    check(nbr > 0, "program trace messages");
    check(nwp >= 5, "watchpoint messages stored");
    check(nrd == 3, "read answers (memory flip, register flip, exp8 read)");
    check(nfd == 3, "FI done messages");
    check(n_wr_b == 4, "four memory injections through the debug port");
    check(n_ext == 1, "external trigger used");
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
