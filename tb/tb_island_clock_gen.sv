// tb_island_clock_gen: self-checking test of the island clock synthesizer.
//
// A 400 MHz reference drives the generator; new frequency words are offered
// from a 32 MHz controller clock with a toggle. For each word the test
// checks that the word is taken within four reference cycles of the
// toggle reaching the reference domain, counts rising edges of clk_out over
// 20 us and compares with f * 20 us (to within two edges), and checks that
// no high or low phase is shorter than the reference period allows.
// Words above half the reference are limited; zero stops the clock.
`timescale 1ns/1ps
module tb_island_clock_gen;
  import dvfs_pkg::*;
  logic ref_clk, cclk, rst_n, f_upd, clk_out;
  freq_t f_khz, f_applied;
  int checks, failures;
  longint edges;
  realtime last_edge, min_half;

  island_clock_gen dut (.*);

  initial begin ref_clk = 0; forever #1.25 ref_clk = ~ref_clk; end
  initial begin cclk = 0; forever #15.625 cclk = ~cclk; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk_out) edges++;
  always @(clk_out) begin
    if ($realtime - last_edge < min_half) min_half = $realtime - last_edge;
    last_edge = $realtime;
  end

  task automatic set_freq(input int f);
    int expf;
    longint e0;
    @(posedge cclk);
    f_khz <= FREQ_W'(f);
    f_upd <= ~f_upd;
    // two synchronizer stages plus the capture register
    repeat (4) @(posedge ref_clk);
    #0.1 check(int'(f_applied) == f, $sformatf("word %0d taken (%0d)", f, f_applied));
    repeat (10) @(posedge ref_clk);
    expf = (f > 200000) ? 200000 : f;
    min_half = 1.0e9;
    e0 = edges;
    #20us;
    check((edges - e0) - longint'(expf / 50) inside {[-2:2]},
          $sformatf("f=%0d kHz: %0d edges in 20 us, expected %0d", f, edges - e0, expf / 50));
    if (expf > 0)
      check(min_half >= 2.49, $sformatf("phase of %0f ns shorter than a reference period", min_half));
  endtask

  initial begin
    checks = 0; failures = 0; edges = 0; last_edge = 0;
    rst_n = 0; f_upd = 0; f_khz = FREQ_W'(100000);
    #20 rst_n = 1;
    repeat (3) @(posedge ref_clk);
    #0.1 check(f_applied == 100000, "word present at reset release is taken");
    set_freq(100000);
    set_freq(32000);
    set_freq(50000);
    set_freq(123456);
    set_freq(250000);
    set_freq(0);
    set_freq(75000);
    for (int t = 0; t < 5; t++) set_freq($urandom_range(1000, 190000));
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
