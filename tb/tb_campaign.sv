// tb_campaign: the two fault campaigns of the evaluation - a fault-tolerant
// matrix adder and a fault-tolerant vector sorter - each of 10 single
// bit-flip experiments, on the full system at its default configuration
// (MDI 8 bits, Plus FI module in read-modify-write mode).
//
// A behavioural CPU runs the applications as sequences of bus operations,
// one per cycle, from fixed instruction addresses.  Software fault
// tolerance as described for the reference applications: every operation is
// done twice on separate copies of the data and the results are compared;
// a mismatch stops the application with an error code.
//   MatrixAddFT : C1 = A + B and C2 = A2 + B2 element by element (16 words),
//                 each pair compared right after it is computed.
//   VectorSortFT: bubble sort of V1 and of V2 (8 words each), then V1 and V2
//                 compared element by element.
// The campaign script (built here, 63 of the 64 script entries) repeats per
// experiment: wait for the testbench (external trigger) - set the watchpoint
// address - preload FI address and mask - arm - wait for FI completion.  The
// testbench restarts the application with fresh data for each experiment.
//
// Each experiment is classified: detected (error stop), masked (results
// correct), silent (wrong result, the fault landed after the last check),
// inconclusive (the CPU wrote the target word between the FI
// module's read and write, so the fault is not a clean bit flip).  Checked:
// every injection completed and wrote exactly (read value XOR mask), each
// outcome matches the class worked out by hand from the instruction timing
// (FI read 2 and write 4 cycles after the trigger fetch), the trace bank
// holds the 10 completion messages with the right values, the stored
// branch messages reproduce the CPU's taken branches in order (program
// flow reconstruction; matrix campaign only, the sort runs with trace
// messages off), and each outcome
// class occurs at least once over the two campaigns.
module tb_campaign;
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
  logic [DW-1:0] wdata, rdata, reg_wdata;
  logic [DW-1:0] reg_rdata = '0;
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

  // ---------------- behavioural CPU: one bus operation per cycle ----------------
  localparam logic [AW-1:0] CODE = 32'h1000;
  task automatic idle_bus();
    if_valid = 0; re = 0; we = 0; br_valid = 0;
  endtask
  task automatic op(int loc, bit r, bit w, logic [AW-1:0] a, logic [DW-1:0] d, bit br = 0, int br_loc = 0);
    @(negedge clk);
    idle_bus();
    while (halt) @(negedge clk);
    if_valid = 1; pc = CODE + 32'(4 * loc);
    re = r; we = w; maddr = a; wdata = d;
    br_valid = br; br_target = CODE + 32'(4 * br_loc);
  endtask
  task automatic rd(int loc, logic [AW-1:0] a, output logic [DW-1:0] d);
    op(loc, 1, 0, a, 0);
    @(posedge clk); #1 d = rdata;
  endtask
  task automatic wr(int loc, logic [AW-1:0] a, logic [DW-1:0] d);
    op(loc, 0, 1, a, d);
  endtask
  task automatic alu(int loc);
    op(loc, 0, 0, 0, 0);
  endtask
  task automatic jump(int loc, int to);
    op(loc, 0, 0, 0, 0, 1, to);
  endtask

  // data layout (byte addresses)
  localparam logic [AW-1:0] A = 32'h000, B = 32'h040, A2 = 32'h080, B2 = 32'h0C0, C1 = 32'h100, C2 = 32'h140;
  localparam logic [AW-1:0] V1 = 32'h200, V2 = 32'h240, ERR = 32'h3FC;
  localparam int NM = 16, NV = 8;

  logic [DW-1:0] ma [NM], mb [NM], vv [NV];

  function automatic logic [DW-1:0] mword(logic [AW-1:0] a);
    return dut.u_mem.mem[a[11:2]];
  endfunction

  task automatic load_matrix();
    for (int i = 0; i < NM; i++) begin
      dut.u_mem.mem[(A  >> 2) + i] = ma[i]; dut.u_mem.mem[(B  >> 2) + i] = mb[i];
      dut.u_mem.mem[(A2 >> 2) + i] = ma[i]; dut.u_mem.mem[(B2 >> 2) + i] = mb[i];
      dut.u_mem.mem[(C1 >> 2) + i] = 0;     dut.u_mem.mem[(C2 >> 2) + i] = 0;
    end
    dut.u_mem.mem[ERR >> 2] = 0;
  endtask
  task automatic load_vector();
    for (int i = 0; i < NV; i++) begin
      dut.u_mem.mem[(V1 >> 2) + i] = vv[i]; dut.u_mem.mem[(V2 >> 2) + i] = vv[i];
    end
    dut.u_mem.mem[ERR >> 2] = 0;
  endtask

  // MatrixAddFT; returns 1 when it stopped on a detected error
  task automatic matrix_add(output bit err);
    logic [DW-1:0] a, b, a2, b2, r1, r2;
    err = 0;
    for (int i = 0; i < NM && !err; i++) begin
      rd(0, A + 32'(4 * i), a);
      rd(1, B + 32'(4 * i), b);
      alu(2);
      wr(3, C1 + 32'(4 * i), a + b);
      rd(4, A2 + 32'(4 * i), a2);
      rd(5, B2 + 32'(4 * i), b2);
      alu(6);
      wr(7, C2 + 32'(4 * i), a2 + b2);
      rd(8, C1 + 32'(4 * i), r1);
      rd(9, C2 + 32'(4 * i), r2);
      alu(10);
      if (r1 != r2) begin wr(11, ERR, 32'hE001); err = 1; end
      else jump(12, 0);
    end
    @(negedge clk); idle_bus();
  endtask

  task automatic bubble(logic [AW-1:0] base);
    logic [DW-1:0] x, y;
    for (int p = 0; p < NV - 1; p++)
      for (int j = 0; j < NV - 1 - p; j++) begin
        rd(20, base + 32'(4 * j), x);
        rd(21, base + 32'(4 * (j + 1)), y);
        alu(22);
        if (x > y) begin
          wr(23, base + 32'(4 * j), y);
          wr(24, base + 32'(4 * (j + 1)), x);
        end
        jump(25, 20);
      end
  endtask

  task automatic vector_sort(output bit err);
    logic [DW-1:0] x, y;
    err = 0;
    bubble(V1);
    bubble(V2);
    for (int k = 0; k < NV && !err; k++) begin
      rd(30, V1 + 32'(4 * k), x);
      rd(31, V2 + 32'(4 * k), y);
      alu(32);
      if (x != y) begin wr(33, ERR, 32'hE002); err = 1; end
      else jump(34, 30);
    end
    @(negedge clk); idle_bus();
  endtask

  // ---------------- probes on the FI module's access port ----------------
  int            fi_rd_cyc, fi_wr_cyc, n_fi_wr = 0;
  logic [DW-1:0] fi_rd_val, fi_wr_val;
  logic [AW-1:0] fi_tgt;
  bit            fi_read_seen = 0;
  int            cpu_wr_cyc [$];
  logic [AW-1:0] cpu_br [$];      // every taken branch, for program-flow reconstruction
  logic [AW-1:0] cpu_wr_addr [$];
  always @(posedge clk) if (rst_n) begin
    if (fi_read_seen) begin fi_rd_val <= dut.u_mem.b_rdata; fi_read_seen <= 0; end
    if (dut.u_ocd.u_fi.acc.req && !dut.u_ocd.u_fi.acc.we) begin fi_rd_cyc <= cyc; fi_read_seen <= 1; fi_tgt <= dut.u_ocd.u_fi.acc.addr; end
    if (dut.u_ocd.u_fi.acc.req &&  dut.u_ocd.u_fi.acc.we) begin fi_wr_cyc <= cyc; fi_wr_val <= dut.u_ocd.u_fi.acc.wdata; n_fi_wr <= n_fi_wr + 1; end
    if (we) begin cpu_wr_cyc.push_back(cyc); cpu_wr_addr.push_back(maddr); end
    if (br_valid) cpu_br.push_back(br_target);
  end

  function automatic script_t ent(dop_e d, cmd_e opc, logic [AW-1:0] a, logic [DW-1:0] dat);
    script_t e;
    e.dop = d; e.msg.op = opc; e.msg.addr = a; e.msg.data = dat;
    return e;
  endfunction

  // outcome classes; SDC = silent data corruption (fault landed after the last check)
  typedef enum int {DET, MASK, SDC, INC} cls_e;
  typedef struct { int loc; logic [AW-1:0] tgt; logic [DW-1:0] mask; cls_e cls; } exp_t;

  int n_cls [4];
  int tot_cls [4] = '{0, 0, 0, 0};

  // one campaign: app 0 = MatrixAddFT, app 1 = VectorSortFT
  task automatic campaign(int app, bit trace_on, exp_t ex [10]);
    script_t prog [$];
    logic [DW-1:0] done_vals [$];
    bit err, wrote_between, ok;
    cls_e c;
    int t0, n0, nfd, nbr;
    bit flow_ok;
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_MSG_EN, trace_on ? 32'h3 : 32'h0));
    prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_CTRL, 32'h1));   // enabled, fetch, no break
    foreach (ex[e]) begin
      prog.push_back(ent(D_WAIT_EX, CMD_NOP, 0, 0));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_WP_ADDR, CODE + 32'(4 * ex[e].loc)));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_ADDR, ex[e].tgt));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_DATA, ex[e].mask));
      prog.push_back(ent(D_SEND, CMD_WR_CFG, CFG_FI_CTRL, 32'h5));  // rmw, memory, arm
      prog.push_back(ent(D_WAIT_FI, CMD_NOP, 0, 0));
    end
    prog.push_back(ent(D_END, CMD_NOP, 0, 0));
    check(prog.size() <= 64, "campaign fits the script bank");
    cpu_br.delete();
    foreach (prog[i]) begin @(negedge clk); hs_we = 1; hs_addr = 6'(i); hs_wdata = prog[i]; end
    @(negedge clk); hs_we = 0; start = 1;
    @(negedge clk); start = 0;
    n_cls = '{0, 0, 0, 0};
    foreach (ex[e]) begin
      if (app == 0) load_matrix(); else load_vector();
      // the trigger is held until the debugger has armed the FI module
      @(negedge clk); ext_trig = 1;
      t0 = 0;
      while (!fi_armed && t0 < 500) begin @(negedge clk); t0++; end
      ext_trig = 0;
      check(fi_armed, $sformatf("app %0d exp %0d armed", app, e));
      n0 = n_fi_wr;
      cpu_wr_cyc.delete(); cpu_wr_addr.delete();
      if (app == 0) matrix_add(err); else vector_sort(err);
      repeat (6) @(negedge clk);
      check(n_fi_wr == n0 + 1, $sformatf("app %0d exp %0d: one injection", app, e));
      check(fi_tgt == ex[e].tgt && fi_wr_val == (fi_rd_val ^ ex[e].mask),
            $sformatf("app %0d exp %0d: wrote read value XOR mask", app, e));
      done_vals.push_back(fi_wr_val);
      wrote_between = 0;
      foreach (cpu_wr_cyc[k])
        if (cpu_wr_addr[k] == ex[e].tgt && cpu_wr_cyc[k] >= fi_rd_cyc && cpu_wr_cyc[k] < fi_wr_cyc) wrote_between = 1;
      ok = 1;
      if (app == 0) begin
        for (int i = 0; i < NM; i++) if (mword(C1 + 32'(4 * i)) != ma[i] + mb[i]) ok = 0;
      end else begin
        logic [DW-1:0] srt [NV];
        srt = vv; srt.sort();
        for (int i = 0; i < NV; i++) if (mword(V1 + 32'(4 * i)) != srt[i]) ok = 0;
      end
      c = wrote_between ? INC : err ? DET : ok ? MASK : SDC;
      check(c == ex[e].cls, $sformatf("app %0d exp %0d: outcome %s, expected %s", app, e, c.name(), ex[e].cls.name()));
      n_cls[c]++;
    end
    t0 = 0;
    while (busy && t0 < 500) begin @(negedge clk); t0++; end
    check(!busy, "campaign script finished");
    nfd = 0; nbr = 0; flow_ok = 1;
    for (int i = 0; i < int'(trace_count); i++) begin
      @(negedge clk); ht_addr = 8'(i);
      @(negedge clk);
      if (ht_rdata.tcode == TC_BRANCH) begin
        if (nbr >= cpu_br.size() || ht_rdata.payload != cpu_br[nbr]) flow_ok = 0;
        nbr++;
      end
      if (ht_rdata.tcode == TC_FI_DONE) begin
        if (nfd < 10) check(ht_rdata.payload == done_vals[nfd], "FI done message value");
        nfd++;
      end
    end
    check(nfd == 10, $sformatf("app %0d: %0d FI done messages stored", app, nfd));
    // program flow: with trace on, the stored branch messages are exactly the
    // CPU's taken branches, in order; with it off there are none
    if (trace_on) check(flow_ok && nbr == cpu_br.size() && nbr > 0,
                        $sformatf("app %0d: %0d branch messages for %0d taken branches", app, nbr, cpu_br.size()));
    else          check(nbr == 0, $sformatf("app %0d: no branch messages with trace off", app));
    $display("%s: 10 experiments, detected %0d, masked %0d, silent %0d, inconclusive %0d; trace messages %0d",
             app == 0 ? "MatrixAddFT " : "VectorSortFT", n_cls[DET], n_cls[MASK], n_cls[SDC], n_cls[INC], trace_count);
    for (int i = 0; i < 4; i++) tot_cls[i] += n_cls[i];
  endtask

  initial begin
    exp_t mx [10], vx [10];
    hs_we = 0; hs_addr = 0; hs_wdata = '0; ht_addr = 0; start = 0; ext_trig = 0;
    idle_bus(); pc = 0; maddr = 0; wdata = 0; br_target = 0;
    for (int i = 0; i < NM; i++) begin ma[i] = 32'(100 + 7 * i); mb[i] = 32'(3000 + 11 * i); end
    vv = '{32'd50, 32'd7, 32'd93, 32'd12, 32'd71, 32'd3, 32'd88, 32'd40};
    // MatrixAddFT experiments: {trigger instruction, target word, bit mask, expected outcome}
    // (instruction t = first fetch of the trigger location; FI reads at t+2, writes at t+4)
    mx[0] = '{0,  A  + 32'd20, 32'h1,         DET};   // A[5], read later: C1[5] != C2[5]
    mx[1] = '{0,  A  + 32'd0,  32'h2,         MASK};  // A[0] was read at t
    mx[2] = '{4,  B2 + 32'd12, 32'h10,        DET};   // B2[3], read later
    mx[3] = '{1,  C1 + 32'd0,  32'h4,         INC};   // CPU writes C1[0] at t+2, then FI overwrites it
    mx[4] = '{8,  C2 + 32'd0,  32'h100,       MASK};  // C2[0] compared at t+1; C1 is the result
    mx[5] = '{3,  C1 + 32'd0,  32'h8,         DET};   // C1[0] written at t, flipped at t+4, compared at t+5
    mx[6] = '{9,  A  + 32'd60, 32'h8000_0000, DET};   // A[15], read later
    mx[7] = '{12, B  + 32'd0,  32'h20,        MASK};  // B[0] already used
    mx[8] = '{5,  A2 + 32'd4,  32'h40,        DET};   // A2[1], read later
    mx[9] = '{5,  C2 + 32'd0,  32'h1,         INC};   // CPU writes C2[0] at t+2
    // VectorSortFT experiments (V1 = 50 7 93 12 71 3 88 40 before sorting)
    vx[0] = '{20, V1 + 32'd8,  32'h1,         DET};   // V1[2] changed before it is sorted
    vx[1] = '{20, V2 + 32'd28, 32'h400,       DET};   // V2[7] changed: copies differ
    vx[2] = '{30, V1 + 32'd0,  32'h2,         SDC};   // V1[0] flipped after its compare
    vx[3] = '{21, V1 + 32'd0,  32'h1,         INC};   // swap writes V1[0] at t+2
    vx[4] = '{22, V1 + 32'd4,  32'h80,        INC};   // swap writes V1[1] at t+2
    vx[5] = '{25, V2 + 32'd0,  32'h8,         DET};   // V2[0] changed before V2 is sorted
    vx[6] = '{31, V1 + 32'd28, 32'h10,        DET};   // V1[7] changed before its compare
    vx[7] = '{23, V1 + 32'd12, 32'h4,         DET};   // V1[3] changed before it is sorted
    vx[8] = '{34, V2 + 32'd0,  32'h1,         MASK};  // V2[0] flipped after its compare
    vx[9] = '{20, V1 + 32'd16, 32'h8000_0000, DET};   // V1[4] changed before it is sorted
    repeat (3) @(posedge clk); rst_n = 1;
    campaign(0, 1, mx);
    campaign(1, 0, vx);
    check(tot_cls[DET] > 0,  "detected outcomes occur");
    check(tot_cls[MASK] > 0, "masked outcomes occur");
    check(tot_cls[SDC] > 0,  "silent outcomes occur");
    check(tot_cls[INC] > 0,  "inconclusive outcomes occur");
    check(lost == 0, "no trace message lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
