// tb_rt_access: debugger and FI-module accesses through the shared real-time
// access port, into a model memory and a model register file.  Checks the
// routing by address space, the read data returned to each requester, that
// a debugger request is held while the FI module owns the port and then
// issued, and that the FI module is never delayed.
module tb_rt_access;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  acc_req_t      fi_req, dbg_req;
  logic          fi_own, dbg_busy, dbg_rvalid;
  logic [DW-1:0] fi_rdata, dbg_rdata;
  logic          mem_en, mem_we, reg_en, reg_we;
  logic [AW-1:0] mem_addr;
  logic [RW-1:0] reg_addr;
  logic [DW-1:0] mem_wdata, mem_rdata, reg_wdata, reg_rdata;

  rt_access dut (.clk, .rst_n, .fi_req, .fi_own, .fi_rdata, .dbg_req, .dbg_busy, .dbg_rvalid, .dbg_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .reg_en, .reg_we, .reg_addr, .reg_wdata, .reg_rdata);

  logic [DW-1:0] mem [16];
  logic [DW-1:0] rf [32];
  always @(posedge clk) if (rst_n) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr[5:2]] <= mem_wdata;
      mem_rdata <= mem[mem_addr[5:2]];
    end
    if (reg_en) begin
      if (reg_we) rf[reg_addr] <= reg_wdata;
      reg_rdata <= rf[reg_addr];
    end
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic acc_req_t mk(bit we, bit space, logic [AW-1:0] a, logic [DW-1:0] d);
    return '{req: 1'b1, we: we, space: space, addr: a, wdata: d};
  endfunction

  // debugger access: pulse a request, wait for the read answer
  task automatic dbg(bit we, bit space, logic [AW-1:0] a, logic [DW-1:0] d, output logic [DW-1:0] r);
    int n = 0;
    @(negedge clk); dbg_req = mk(we, space, a, d);
    @(negedge clk); dbg_req = '0;
    if (!we) begin
      while (!dbg_rvalid && n < 20) begin @(posedge clk); #1; n++; end
      check(dbg_rvalid, "debugger read answered");
      r = dbg_rdata;
    end else begin
      repeat (2) @(negedge clk);
      r = '0;
    end
  endtask

  int held = 0;
  initial begin
    logic [DW-1:0] r;
    fi_req = '0; dbg_req = '0; fi_own = 0;
    for (int i = 0; i < 16; i++) mem[i] = 32'h100 + i;
    for (int i = 0; i < 32; i++) rf[i] = 32'h200 + i;
    repeat (2) @(posedge clk); rst_n = 1;
    // plain debugger memory and register accesses
    dbg(0, 0, 32'h8, 0, r);           check(r == 32'h102, "dbg mem read");
    dbg(1, 0, 32'h8, 32'hCAFE, r);    check(mem[2] == 32'hCAFE, "dbg mem write");
    dbg(0, 0, 32'h8, 0, r);           check(r == 32'hCAFE, "dbg mem read back");
    dbg(0, 1, 32'd9, 0, r);           check(r == 32'h209, "dbg reg read");
    dbg(1, 1, 32'd9, 32'h77, r);      check(rf[9] == 32'h77, "dbg reg write");
    check(mem[9] == 32'h109, "reg write leaves memory");
    // FI read-modify-write sequence with a debugger write arriving meanwhile
    @(negedge clk); fi_own = 1; fi_req = mk(0, 0, 32'h10, 0);
    dbg_req = mk(1, 0, 32'h10, 32'h5555);
    @(posedge clk); #1; check(fi_rdata == 32'h104, "FI read data next cycle");
    @(negedge clk); fi_req = '0; dbg_req = '0;
    check(dbg_busy, "debugger request held while FI owns port");
    @(negedge clk); fi_req = mk(1, 0, 32'h10, 32'h104 ^ 32'h1);
    check(dbg_busy, "still held during FI write");
    @(negedge clk); fi_req = '0;
    check(mem[4] == 32'h105, "FI write landed");
    @(negedge clk); fi_own = 0;
    repeat (2) @(negedge clk);
    check(!dbg_busy, "held request issued after FI released port");
    check(mem[4] == 32'h5555, "held debugger write landed after FI write");
    // FI register access
    @(negedge clk); fi_own = 1; fi_req = mk(0, 1, 32'd3, 0);
    @(posedge clk); #1; check(fi_rdata == 32'h203, "FI reg read");
    @(negedge clk); fi_req = '0; fi_own = 0;
    check(!dbg_rvalid, "FI read not reported to debugger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
