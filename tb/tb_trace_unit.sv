// tb_trace_unit: random events from the four sources with a randomly
// stalling consumer.  Each source's payloads are unique and increasing, so
// the test can check that every message delivered was generated, that each
// source's messages stay in order, that what is missing equals what the unit
// reports lost (overrun messages and lost_total), and that with a fast
// consumer and sparse events nothing is lost at all.
module tb_trace_unit;
  import ocd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          fi_done, wp_hit, rd_valid, br_valid;
  logic [DW-1:0] fi_value, wp_addr, rd_data, br_target;
  out_msg_t      msg;
  logic          msg_valid, msg_ready;
  logic [15:0]   lost_total;

  trace_unit #(.DEPTH(4)) dut (.clk, .rst_n, .fi_done, .fi_value, .wp_hit, .wp_addr, .rd_valid, .rd_data,
    .br_valid, .br_target, .msg, .msg_valid, .msg_ready, .lost_total);

  logic [DW-1:0] q [4][$];
  int            skipped = 0, ovr_sum = 0, delivered = 0, n_ovr = 0;
  int            ev_prob = 10, rdy_prob = 100, ncyc = 0;
  bit            sparse = 0;
  logic [DW-1:0] ctr [4];

  function automatic int src_of(tcode_e t);
    case (t)
      TC_FI_DONE: return 0;
      TC_WP_HIT:  return 1;
      TC_RD_DATA: return 2;
      TC_BRANCH:  return 3;
      default:    return -1;
    endcase
  endfunction

  // consumer / checker
  always @(posedge clk) if (rst_n && msg_valid && msg_ready) begin
    int s;
    delivered++;
    if (msg.tcode == TC_OVERRUN) begin
      ovr_sum += int'(msg.payload); n_ovr++;
    end else begin
      s = src_of(msg.tcode);
      checks++;
      if (s < 0) failures++;
      else begin
        while (q[s].size() > 0 && q[s][0] != msg.payload) begin void'(q[s].pop_front()); skipped++; end
        if (q[s].size() == 0) begin failures++; $display("FAIL: unexpected payload %h src %0d", msg.payload, s); end
        else void'(q[s].pop_front());
      end
    end
  end

  // producer
  always @(negedge clk) begin
    logic [3:0] e;
    for (int i = 0; i < 4; i++) e[i] = rst_n && ($urandom_range(0, 99) < ev_prob);
    // sparse phase: at most one event every fourth cycle, so nothing may be lost
    if (sparse) begin
      e = '0;
      if (rst_n && (ncyc % 4 == 0) && $urandom_range(0, 1)) e[$urandom_range(0, 3)] = 1'b1;
    end
    ncyc++;
    {br_valid, rd_valid, wp_hit, fi_done} = e;
    for (int i = 0; i < 4; i++) if (e[i]) begin ctr[i] = ctr[i] + 1; q[i].push_back(ctr[i] | (i << 28)); end
    fi_value = ctr[0] | (0 << 28); wp_addr = ctr[1] | (1 << 28); rd_data = ctr[2] | (2 << 28); br_target = ctr[3] | (3 << 28);
    msg_ready = ($urandom_range(0, 99) < rdy_prob);
  end

  initial begin
    for (int i = 0; i < 4; i++) ctr[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // phase 1: sparse events, fast consumer: nothing lost
    sparse = 1; rdy_prob = 100;
    repeat (2000) @(posedge clk);
    sparse = 0; ev_prob = 0; repeat (50) @(posedge clk);
    checks++; if (lost_total != 0 || skipped != 0) begin failures++; $display("FAIL: loss in sparse phase"); end
    for (int i = 0; i < 4; i++) begin checks++; if (q[i].size() != 0) failures++; end
    // phase 2: heavy events, slow consumer: overruns
    ev_prob = 60; rdy_prob = 20;
    repeat (3000) @(posedge clk);
    ev_prob = 0; rdy_prob = 100;
    repeat (200) @(posedge clk);
    for (int i = 0; i < 4; i++) begin skipped += q[i].size(); q[i].delete(); end
    checks++; if (lost_total == 0) begin failures++; $display("FAIL: no overrun seen"); end
    checks++; if (skipped != int'(lost_total)) begin failures++; $display("FAIL: missing %0d lost_total %0d", skipped, lost_total); end
    checks++; if (ovr_sum != int'(lost_total)) begin failures++; $display("FAIL: overrun sum %0d lost %0d", ovr_sum, lost_total); end
    $display("delivered=%0d lost=%0d overrun_msgs=%0d", delivered, lost_total, n_ovr);
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
