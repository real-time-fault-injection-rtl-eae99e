// tb_target_mem: random traffic on both ports of the dual-port target memory
// against an array model; read data is checked one cycle after the access,
// and same-word write collisions must leave the OCD port's value.
module tb_target_mem;
  import ocd_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int WORDS = 64;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [DW-1:0] model [WORDS];

  target_mem #(.WORDS(WORDS)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  int collisions = 0;
  initial begin
    logic [DW-1:0] ea, eb;
    logic          ca, cb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port B
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 4 * i; b_wdata = $urandom; model[i] = b_wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1);
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_addr = 4 * $urandom_range(0, 7); b_addr = 4 * $urandom_range(0, 7);
      a_wdata = $urandom; b_wdata = $urandom;
      ca = a_en && !a_we; cb = b_en && !b_we;
      ea = model[a_addr[7:2]]; eb = model[b_addr[7:2]];
      if (a_en && a_we) model[a_addr[7:2]] = a_wdata;
      if (b_en && b_we) model[b_addr[7:2]] = b_wdata;
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) collisions++;
      @(posedge clk); #1;
      if (ca) begin checks++; if (a_rdata !== ea) failures++; end
      if (cb) begin checks++; if (b_rdata !== eb) failures++; end
    end
    @(negedge clk); a_en = 0; b_en = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 4 * i;
      @(posedge clk); #1; checks++;
      if (a_rdata !== model[i]) failures++;
    end
    checks++;
    if (collisions == 0) failures++;
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
