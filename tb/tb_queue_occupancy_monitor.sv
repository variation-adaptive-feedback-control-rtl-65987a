// tb_queue_occupancy_monitor: self-checking test of the occupancy monitor.
//
// Binary write and read counts are driven, as Gray codes, from two other
// clocks; the counts are then held still and, after the synchronizer delay
// (three monitor cycles, checked exactly), occ must equal writes - reads
// modulo twice the depth. Covers empty, full (difference = DEPTH) and
// pointer wrap-around.
`timescale 1ns/1ps
module tb_queue_occupancy_monitor;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk, rst_n, wclk, rclk;
  logic [AW:0] wptr_gray, rptr_gray, occ;
  logic [AW:0] wcnt, rcnt;
  int checks, failures;

  queue_occupancy_monitor #(.DEPTH(DEPTH)) dut (.*);

  initial begin clk = 0;  forever #5   clk  = ~clk;  end
  initial begin wclk = 0; forever #3.3 wclk = ~wclk; end
  initial begin rclk = 0; forever #7.1 rclk = ~rclk; end

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // move the counts to a target value one step per own-clock cycle
  task automatic move_to(input logic [AW:0] wt, input logic [AW:0] rt);
    fork
      while (wcnt != wt) begin @(posedge wclk); wcnt = wcnt + 1'b1; wptr_gray = b2g(wcnt); end
      while (rcnt != rt) begin @(posedge rclk); rcnt = rcnt + 1'b1; rptr_gray = b2g(rcnt); end
    join
  endtask

  task automatic settle_and_check(input int exp);
    logic [AW:0] e;
    e = (AW+1)'(exp);
    // the pointers have stopped: the value is out after three edges
    repeat (4) @(posedge clk);
    #1;
    check(occ == e, $sformatf("occ=%0d expected %0d", occ, exp));
  endtask

  initial begin
    checks = 0; failures = 0;
    wcnt = '0; rcnt = '0; wptr_gray = '0; rptr_gray = '0;
    rst_n = 0;
    #20 rst_n = 1;
    settle_and_check(0);
    move_to(100, 0);            settle_and_check(100);
    move_to(400, 90);           settle_and_check(310);
    move_to(602, 90);           settle_and_check(512);   // full
    move_to(602, 602);          settle_and_check(0);     // empty
    move_to(1023, 700);         settle_and_check(323);
    move_to(1, 1000);           settle_and_check(25);    // write pointer wrapped
    move_to(5, 5);              settle_and_check(0);     // both wrapped
    for (int t = 0; t < 30; t++) begin
      int d;
      d = $urandom_range(0, DEPTH);
      move_to((AW+1)'(int'(rcnt) + d), rcnt);
      settle_and_check(d);
      move_to(wcnt, (AW+1)'(int'(rcnt) + $urandom_range(0, d)));
      settle_and_check(int'(wcnt - rcnt));
    end
    // exact latency: a single write becomes visible on the third edge
    move_to(wcnt, wcnt);
    repeat (4) @(posedge clk);
    @(negedge clk);
    wcnt = wcnt + 1'b1; wptr_gray = b2g(wcnt);
    @(posedge clk); #1 check(occ == 0, "not visible after 1 edge");
    @(posedge clk); #1 check(occ == 0, "not visible after 2 edges");
    @(posedge clk); #1 check(occ == 1, "visible after 3 edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
