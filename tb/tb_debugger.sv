// tb_debugger: the fault-injection debugger against a testbench model of the
// OCD side of the AUX port.  The model decodes the MDI command stream,
// answers memory reads with read-data messages, raises the event pin and
// sends completion messages on MDO.  A script using every step type is
// loaded through the host port; the test checks the commands produced, the
// bit flips done by the debugger itself on a memory word and on a CPU
// register (read, XOR mask, write back), the
// reaction time to a watchpoint event, the waits on external trigger, delay
// and FI completion, the done pulse, and that the output bank holds every
// message the OCD sent.
module tb_debugger;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          hs_we, start, busy, done, ext_trig, evto, mdi_valid, mdo_valid;
  logic [5:0]    hs_addr;
  script_t       hs_wdata;
  logic [7:0]    ht_addr;
  out_msg_t      ht_rdata;
  logic [8:0]    trace_count;
  logic [7:0]    mdi, mdo;

  debugger dut (.clk, .rst_n, .hs_we, .hs_addr, .hs_wdata, .ht_addr, .ht_rdata, .trace_count,
    .start, .busy, .done, .ext_trig, .mdi, .mdi_valid, .mdo, .mdo_valid, .evto);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // ---- OCD model: MDI decode ----
  cmd_msg_t rxq [$];
  int       rx_cyc [$];
  logic [71:0] sh;
  int nb = 0;
  always @(posedge clk) if (rst_n) begin
    if (mdi_valid) begin
      sh = {mdi, sh[71:8]}; nb++;
      if (nb == 9) begin rxq.push_back(cmd_msg_t'(sh)); rx_cyc.push_back(cyc); nb = 0; end
    end else nb = 0;
  end

  // ---- OCD model: MDO encode ----
  out_msg_t sent [$];
  task automatic ocd_send(tcode_e t, logic [DW-1:0] p);
    logic [39:0] m;
    m = {p, t};
    sent.push_back(out_msg_t'(m));
    for (int i = 0; i < 5; i++) begin @(negedge clk); mdo_valid = 1; mdo = m[i*8 +: 8]; end
    @(negedge clk); mdo_valid = 0;
  endtask

  task automatic wait_cmd(output cmd_msg_t m, output int c);
    int n = 0;
    while (rxq.size() == 0 && n < 200) begin @(negedge clk); n++; end
    check(rxq.size() != 0, "command expected");
    if (rxq.size() != 0) begin m = rxq.pop_front(); c = rx_cyc.pop_front(); end
    else begin m = '0; c = 0; end
  endtask

  function automatic script_t ent(dop_e d, cmd_e op, logic [AW-1:0] a, logic [DW-1:0] dat);
    script_t e;
    e.dop = d; e.msg.op = op; e.msg.addr = a; e.msg.data = dat;
    return e;
  endfunction

  int ndone = 0;
  always @(posedge clk) if (rst_n && done) ndone <= ndone + 1;

  initial begin
    script_t prog [11];
    cmd_msg_t m;
    int c, tev, t0;
    hs_we = 0; hs_addr = 0; hs_wdata = '0; ht_addr = 0; start = 0; ext_trig = 0; evto = 0; mdo_valid = 0; mdo = 0;
    prog[0] = ent(D_SEND,    CMD_WR_CFG, CFG_WP_ADDR, 32'h80);
    prog[1] = ent(D_WAIT_WP, CMD_NOP, 0, 0);
    prog[2] = ent(D_SEND,    CMD_MEM_WR, 32'h80, 32'h0000_0004);   // step 3A: preset value
    prog[3] = ent(D_DELAY,   CMD_NOP, 32'd20, 0);
    prog[4] = ent(D_WAIT_EX, CMD_NOP, 0, 0);
    prog[5] = ent(D_FLIP,    CMD_NOP, 32'h84, 32'h0001_0000);       // step 3B: read, mask, write
    prog[6] = ent(D_SEND,    CMD_WR_CFG, CFG_FI_CTRL, 32'h1);
    prog[7] = ent(D_WAIT_FI, CMD_NOP, 0, 0);
    prog[8] = ent(D_FLIP,    CMD_REG_WR, 32'd12, 32'h8000_0001);   // register flip
    prog[9] = ent(D_SEND,    CMD_HALT, 0, 0);
    prog[10] = ent(D_END,    CMD_NOP, 0, 0);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 11; i++) begin
      @(negedge clk); hs_we = 1; hs_addr = 6'(i); hs_wdata = prog[i];
    end
    @(negedge clk); hs_we = 0; start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    wait_cmd(m, c); check(m == prog[0].msg, "first command");
    repeat (10) @(negedge clk);
    check(rxq.size() == 0, "waits for watchpoint");
    ocd_send(TC_WP_HIT, 32'h80);
    @(negedge clk); evto = 1; tev = cyc;
    @(negedge clk); evto = 0;
    wait_cmd(m, c); check(m == prog[2].msg, "preset write after watchpoint");
    // message of 9 beats starts two cycles after the event: last beat 11 cycles after it
    check(c - tev <= 12, $sformatf("reaction %0d cycles", c - tev));
    repeat (40) @(negedge clk);
    check(rxq.size() == 0, "waits for external trigger");
    @(negedge clk); ext_trig = 1;
    @(negedge clk); ext_trig = 0;
    wait_cmd(m, c); check(m.op == CMD_MEM_RD && m.addr == 32'h84, "flip: read command");
    ocd_send(TC_RD_DATA, 32'h1235_5678);
    wait_cmd(m, c); check(m.op == CMD_MEM_WR && m.addr == 32'h84 && m.data == (32'h1235_5678 ^ 32'h0001_0000), "flip: masked write");
    wait_cmd(m, c); check(m == prog[6].msg, "FI arm command");
    ocd_send(TC_BRANCH, 32'h400);               // other messages do not end the wait
    repeat (10) @(negedge clk);
    check(rxq.size() == 0 && busy, "waits for FI done");
    ocd_send(TC_FI_DONE, 32'hFFFF);
    wait_cmd(m, c); check(m.op == CMD_REG_RD && m.addr == 32'd12, "register flip: read command");
    ocd_send(TC_RD_DATA, 32'h0F0F_0F0F);
    wait_cmd(m, c); check(m.op == CMD_REG_WR && m.addr == 32'd12 && m.data == 32'h8F0F_0F0E, "register flip: masked write");
    wait_cmd(m, c); check(m == prog[9].msg, "last command");
    t0 = 0;
    while (busy && t0 < 50) begin @(negedge clk); t0++; end
    check(!busy && ndone == 1, "done once");
    // output bank
    check(int'(trace_count) == sent.size(), "trace count");
    for (int i = 0; i < sent.size(); i++) begin
      @(negedge clk); ht_addr = 8'(i);
      @(negedge clk);
      check(ht_rdata == sent[i], $sformatf("trace entry %0d", i));
    end
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
