// tb_mixed_clock_fifo: self-checking test of the mixed-clock interface queue.
//
// Two unrelated clocks, whose periods change during the run as island
// clocks do, drive the two sides. Phases: (1) with reads stopped, write
// until full and check that exactly DEPTH entries were accepted; (2) drain
// and check order, data and that empty rises after DEPTH reads; (3) random
// concurrent traffic against a reference queue. Every write-clock cycle
// checks that the Gray write pointer moves by at most one bit. Stimulus is
// applied on falling edges so that status flags are read when stable.
`timescale 1ns/1ps
module tb_mixed_clock_fifo;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic rst_n, wclk, rclk;
  logic wr_en, rd_en, full, empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [AW:0] wptr_gray, rptr_gray, wg_prev;

  int checks, failures;
  real wper, rper;
  logic [WIDTH-1:0] sb[$];
  int n_wr, n_rd;
  bit do_random, rd_allow, wr_allow;

  mixed_clock_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin wclk = 0; forever #(wper/2) wclk = ~wclk; end
  initial begin rclk = 0; forever #(rper/2) rclk = ~rclk; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // write side
  always @(negedge wclk) begin
    if (rst_n) begin
      wr_en <= 1'b0;
      // full is stable until the next rising edge, so a write set up now
      // while not full is accepted there
      if (wr_allow && !full && (!do_random || ($urandom_range(0, 2) != 0))) begin
        logic [WIDTH-1:0] d;
        d = WIDTH'($urandom);
        wr_en   <= 1'b1;
        wr_data <= d;
        sb.push_back(d);
        n_wr++;
      end
    end
  end

  // read side
  always @(negedge rclk) begin
    if (rst_n) begin
      rd_en <= 1'b0;
      if (rd_allow && !empty && (!do_random || ($urandom_range(0, 2) != 0))) begin
        check(sb.size() > 0, "read side sees data the reference does not hold");
        if (sb.size() > 0) begin
          check(rd_data == sb[0], $sformatf("data %h expected %h", rd_data, sb[0]));
          void'(sb.pop_front());
        end
        rd_en <= 1'b1;
        n_rd++;
      end
    end
  end

  // Gray pointer property
  always @(posedge wclk) begin
    if (rst_n) begin
      check($countones(wptr_gray ^ wg_prev) <= 1, "write pointer changed more than one bit");
    end
    wg_prev <= wptr_gray;
  end

  initial begin
    checks = 0; failures = 0; n_wr = 0; n_rd = 0;
    wper = 7.0; rper = 5.0;
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = '0; wg_prev = '0;
    do_random = 0; rd_allow = 0; wr_allow = 0;
    #50 rst_n = 1;
    check(empty == 1'b1, "empty after reset");
    check(full == 1'b0, "not full after reset");

    // (1) fill
    wr_allow = 1;
    repeat (3 * DEPTH) @(posedge wclk);
    wr_allow = 0;
    repeat (4) @(posedge wclk);
    check(full == 1'b1, "full after DEPTH writes");
    check(n_wr == DEPTH, $sformatf("accepted %0d writes, expected %0d", n_wr, DEPTH));
    check(empty == 1'b0, "not empty when full");

    // (2) drain with a faster write clock and slower read clock
    wper = 3.0; rper = 11.0;
    rd_allow = 1;
    repeat (3 * DEPTH) @(posedge rclk);
    repeat (4) @(posedge rclk);
    check(n_rd == DEPTH, $sformatf("read %0d entries, expected %0d", n_rd, DEPTH));
    check(empty == 1'b1, "empty after draining");
    repeat (4) @(posedge wclk);
    check(full == 1'b0, "not full after draining");

    // (3) random concurrent traffic, clocks changing
    do_random = 1; wr_allow = 1;
    repeat (1500) @(posedge wclk);
    wper = 13.0; rper = 4.0;
    repeat (1500) @(posedge wclk);
    wper = 4.0; rper = 9.0;
    repeat (1500) @(posedge wclk);
    wr_allow = 0;
    repeat (200) @(posedge rclk);
    check(sb.size() == 0, $sformatf("%0d entries left unread", sb.size()));
    check(n_wr == n_rd, "writes and reads balance");
    check(n_wr > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
