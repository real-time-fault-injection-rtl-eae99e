// watchpoint_unit: watchpoint / breakpoint comparator of the OCD.
//
// Compares the configured address with the CPU's instruction fetch address
// or data bus address, as selected by wp_ctrl.kind, and raises `hit` for one
// cycle in the cycle after a matching bus cycle (registered compare).  When
// wp_ctrl.brk is set the hit is a breakpoint: `brk_hit` is raised with it and
// the OCD halts the CPU.  The watchpoint is the fault trigger: it is reported
// to the debugger (event pin and message) and, with the FI module armed,
// starts the injection.  One comparator, exact word address match; the
// number of watchpoints and the match rule are this design's choices.
//
// Timing: CPU access in cycle t -> hit/brk_hit/hit_addr valid in cycle t+1.
module watchpoint_unit
  import ocd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] wp_addr,
  input  wp_ctrl_t      wp_ctrl,
  // CPU buses observed
  input  logic          cpu_if_valid,
  input  logic [AW-1:0] cpu_pc,
  input  logic          cpu_mem_re,
  input  logic          cpu_mem_we,
  input  logic [AW-1:0] cpu_mem_addr,
  // results
  output logic          hit,
  output logic          brk_hit,
  output logic [AW-1:0] hit_addr
);
  logic          match;
  logic [AW-1:0] match_addr;

  always_comb begin
    match      = 1'b0;
    match_addr = cpu_mem_addr;
    unique case (wp_ctrl.kind)
      WP_FETCH: begin
        match      = cpu_if_valid && (cpu_pc == wp_addr);
        match_addr = cpu_pc;
      end
      WP_READ:  match = cpu_mem_re && (cpu_mem_addr == wp_addr);
      WP_WRITE: match = cpu_mem_we && (cpu_mem_addr == wp_addr);
      WP_RW:    match = (cpu_mem_re || cpu_mem_we) && (cpu_mem_addr == wp_addr);
    endcase
    match = match && wp_ctrl.en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit      <= 1'b0;
      brk_hit  <= 1'b0;
      hit_addr <= '0;
    end else begin
      hit     <= match;
      brk_hit <= match && wp_ctrl.brk;
      if (match) hit_addr <= match_addr;
    end
  end
endmodule
