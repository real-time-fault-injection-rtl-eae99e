// tb_ocd_fi: the OCD-FI unit driven over its AUX port as a debugger would,
// in the 2-bit MDI configuration with the Plus FI module.  The testbench
// serializes its own command messages, decodes the MDO stream, models the
// target memory and CPU register file behind the debug ports and plays the
// CPU bus.  Checked: configuration and real-time memory/register access
// commands, read answers, watchpoint event pin and message, program trace,
// halt/resume (a resume consumes the breakpoint), message enables, and FI
// injections into memory (4-cycle trigger-to-write delay) and into a
// register through a breakpoint (CPU halted 5 cycles).
module tb_ocd_fi;
  import ocd_pkg::*;
  localparam int MDI_W = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [MDI_W-1:0] mdi;
  logic             mdi_valid, mdo_valid, evto;
  logic [7:0]       mdo;
  logic             if_valid, re, we, br_valid, halt;
  logic [AW-1:0]    pc, maddr, br_target;
  logic             reg_en, reg_we, mem_en, mem_we, fi_armed;
  logic [RW-1:0]    reg_addr;
  logic [AW-1:0]    mem_addr;
  logic [DW-1:0]    reg_wdata, reg_rdata, mem_wdata, mem_rdata;
  logic [15:0]      lost;

  ocd_fi #(.MDI_W(MDI_W), .MDO_W(8), .FI_PLUS(1'b1)) dut (
    .clk, .rst_n, .mdi, .mdi_valid, .mdo, .mdo_valid, .evto,
    .cpu_if_valid(if_valid), .cpu_pc(pc), .cpu_mem_re(re), .cpu_mem_we(we), .cpu_mem_addr(maddr),
    .cpu_br_valid(br_valid), .cpu_br_target(br_target), .cpu_halt(halt),
    .reg_en, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .fi_armed, .trace_lost(lost));

  // target models behind the debug ports
  logic [DW-1:0] mem [64];
  logic [DW-1:0] rf [32];
  int            last_wr_cyc, halt_cycles, evto_cnt;
  always @(posedge clk) if (rst_n) begin
    if (mem_en) begin
      if (mem_we) begin mem[mem_addr[7:2]] <= mem_wdata; last_wr_cyc <= cyc; end
      mem_rdata <= mem[mem_addr[7:2]];
    end
    if (reg_en) begin
      if (reg_we) begin rf[reg_addr] <= reg_wdata; last_wr_cyc <= cyc; end
      reg_rdata <= rf[reg_addr];
    end
    if (halt) halt_cycles <= halt_cycles + 1;
    if (evto) evto_cnt <= evto_cnt + 1;
  end

  // MDO decoder
  out_msg_t rxq [$];
  logic [39:0] sh;
  int          nb = 0;
  always @(posedge clk) if (rst_n) begin
    if (mdo_valid) begin
      sh = {mdo, sh[39:8]};
      nb++;
      if (nb == 5) begin rxq.push_back(out_msg_t'(sh)); nb = 0; end
    end else nb = 0;
  end

  function automatic logic [DW-1:0] wpc(logic brk, wp_type_e kind, logic en);
    wp_ctrl_t c;
    c.brk = brk; c.kind = kind; c.en = en;
    return DW'(c);
  endfunction

  function automatic logic [DW-1:0] fic(logic rmw, logic space, logic arm);
    fi_ctrl_t c;
    c.rmw = rmw; c.space = space; c.arm = arm;
    return DW'(c);
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  task automatic send(cmd_e op, logic [AW-1:0] a, logic [DW-1:0] d);
    logic [71:0] m;
    m = {d, a, op};
    for (int i = 0; i < 72 / MDI_W; i++) begin
      @(negedge clk); mdi_valid = 1; mdi = m[i*MDI_W +: MDI_W];
    end
    @(negedge clk); mdi_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_msg(tcode_e t, logic [DW-1:0] p, string what);
    int n = 0;
    while (rxq.size() == 0 && n < 100) begin @(posedge clk); n++; end
    if (rxq.size() == 0) check(0, {what, ": no message"});
    else begin
      out_msg_t m = rxq.pop_front();
      check(m.tcode == t && m.payload == p, $sformatf("%s: got %h/%h", what, m.tcode, m.payload));
    end
  endtask

  // one CPU data access in the next cycle; returns the cycle it was on the bus
  task automatic cpu_access(bit w, logic [AW-1:0] a, output int c);
    @(negedge clk); re = !w; we = w; maddr = a; c = cyc;
    @(negedge clk); re = 0; we = 0;
  endtask

  initial begin
    int t, h0, e0;
    mdi = 0; mdi_valid = 0; if_valid = 0; re = 0; we = 0; br_valid = 0; pc = 0; maddr = 0; br_target = 0;
    last_wr_cyc = 0; halt_cycles = 0; evto_cnt = 0;
    for (int i = 0; i < 64; i++) mem[i] = 32'h3000 + i;
    for (int i = 0; i < 32; i++) rf[i] = 32'h4000 + i;
    repeat (3) @(posedge clk); rst_n = 1;

    // real-time memory access
    send(CMD_MEM_WR, 32'h20, 32'h1111_2222);
    check(mem[8] == 32'h1111_2222, "memory write command");
    send(CMD_MEM_RD, 32'h24, 0);
    expect_msg(TC_RD_DATA, 32'h3009, "memory read answer");

    // program trace
    @(negedge clk); br_valid = 1; br_target = 32'h0000_0ABC;
    @(negedge clk); br_valid = 0;
    expect_msg(TC_BRANCH, 32'h0ABC, "branch trace");

    // watchpoint on data write to 0x40: event pin and message
    send(CMD_WR_CFG, CFG_WP_ADDR, 32'h40);
    send(CMD_WR_CFG, CFG_WP_CTRL, wpc(1'b0, WP_WRITE, 1'b1));
    cpu_access(0, 32'h40, t);       // a read does not match
    cpu_access(1, 32'h40, t);
    repeat (2) @(negedge clk);
    check(evto_cnt == 1, "one watchpoint event");
    expect_msg(TC_WP_HIT, 32'h40, "watchpoint message");

    // FI Plus: flip bit 3 of word 0x40 on the watchpoint
    send(CMD_WR_CFG, CFG_FI_ADDR, 32'h40);
    send(CMD_WR_CFG, CFG_FI_DATA, 32'h8);
    send(CMD_WR_CFG, CFG_FI_CTRL, fic(1'b1, 1'b0, 1'b1));
    check(fi_armed, "FI armed");
    cpu_access(1, 32'h40, t);
    repeat (8) @(negedge clk);
    check(mem[16] == (32'h3010 ^ 32'h8), "memory bit flipped by FI");
    check(last_wr_cyc - t == 4, $sformatf("FI memory delay %0d (expect 4)", last_wr_cyc - t));
    check(!fi_armed, "FI disarmed");
    expect_msg(TC_WP_HIT, 32'h40, "watchpoint message during FI");
    expect_msg(TC_FI_DONE, 32'h3018, "FI done message");

    // FI Plus on a register via a breakpoint on instruction fetch
    send(CMD_WR_CFG, CFG_WP_ADDR, 32'h200);
    send(CMD_WR_CFG, CFG_WP_CTRL, wpc(1'b1, WP_FETCH, 1'b1));
    send(CMD_WR_CFG, CFG_FI_ADDR, 32'd5);
    send(CMD_WR_CFG, CFG_FI_DATA, 32'h1);
    send(CMD_WR_CFG, CFG_FI_CTRL, fic(1'b1, 1'b1, 1'b1));
    h0 = halt_cycles;
    @(negedge clk); if_valid = 1; pc = 32'h200; t = cyc;
    @(negedge clk); if_valid = 0;
    repeat (10) @(negedge clk);
    check(rf[5] == (32'h4005 ^ 32'h1), "register bit flipped by FI");
    check(halt_cycles - h0 == 5, $sformatf("halted %0d cycles (expect 5)", halt_cycles - h0));
    check(!halt, "CPU resumed by FI");
    expect_msg(TC_WP_HIT, 32'h200, "breakpoint message");
    expect_msg(TC_FI_DONE, 32'h4004, "FI register done message");

    // run control and register access by command
    send(CMD_WR_CFG, CFG_WP_CTRL, 32'h0);
    send(CMD_HALT, 0, 0);
    check(halt, "halt command");
    send(CMD_REG_WR, 32'd2, 32'hABCD);
    check(rf[2] == 32'hABCD, "register write command");
    send(CMD_REG_RD, 32'd2, 0);
    expect_msg(TC_RD_DATA, 32'hABCD, "register read answer");
    send(CMD_RESUME, 0, 0);
    check(!halt, "resume command");
    // a breakpoint released by the resume command is consumed: the next
    // fetch of the same address only raises the watchpoint event
    send(CMD_WR_CFG, CFG_WP_ADDR, 32'h240);
    send(CMD_WR_CFG, CFG_WP_CTRL, wpc(1'b1, WP_FETCH, 1'b1));
    @(negedge clk); if_valid = 1; pc = 32'h240;
    @(negedge clk); if_valid = 0;
    repeat (3) @(negedge clk);
    check(halt, "breakpoint halts the CPU");
    send(CMD_RESUME, 0, 0);
    check(!halt, "resume after breakpoint");
    e0 = evto_cnt;
    @(negedge clk); if_valid = 1; pc = 32'h240;
    @(negedge clk); if_valid = 0;
    repeat (3) @(negedge clk);
    check(!halt && evto_cnt == e0 + 1, "breakpoint bit cleared by resume, watchpoint still on");
    expect_msg(TC_WP_HIT, 32'h240, "breakpoint message");
    expect_msg(TC_WP_HIT, 32'h240, "watchpoint message after resume");
    // message enables: branch and watchpoint messages off, read answers still sent
    send(CMD_WR_CFG, CFG_MSG_EN, 32'h0);
    e0 = evto_cnt;
    send(CMD_WR_CFG, CFG_WP_ADDR, 32'h300);
    send(CMD_WR_CFG, CFG_WP_CTRL, wpc(1'b0, WP_FETCH, 1'b1));
    @(negedge clk); br_valid = 1; br_target = 32'h300; if_valid = 1; pc = 32'h300;
    @(negedge clk); br_valid = 0; if_valid = 0;
    send(CMD_MEM_RD, 32'h0, 0);
    expect_msg(TC_RD_DATA, 32'h3000, "only the read answer while messages are off");
    check(evto_cnt == e0 + 1, "event pin still pulses with messages off");
    send(CMD_WR_CFG, CFG_MSG_EN, 32'h3);
    @(negedge clk); br_valid = 1; br_target = 32'h0DEF;
    @(negedge clk); br_valid = 0;
    expect_msg(TC_BRANCH, 32'h0DEF, "branch trace re-enabled");
    check(lost == 0, "no trace loss");
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
