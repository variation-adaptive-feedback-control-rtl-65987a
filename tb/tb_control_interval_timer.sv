// tb_control_interval_timer: self-checking test of the control-interval
// timer at its default length (2**12 cycles). Checks that nothing ticks
// while disabled, that the first tick comes exactly 2**12 cycles after en
// rises, that ticks are one cycle wide and exactly 2**12 cycles apart, that
// k counts them, and that dropping en freezes the count.
`timescale 1ns/1ps
module tb_control_interval_timer;
  localparam int unsigned L = 12;
  logic clk, rst_n, en, tick;
  logic [15:0] k;
  int checks, failures;
  longint cyc, last_tick, n_ticks;

  control_interval_timer dut (.*);

  initial begin clk = 0; forever #15.625 clk = ~clk; end   // 32 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick) begin
      n_ticks <= n_ticks + 1;
      if (last_tick >= 0)
        check(cyc - last_tick == (1 << L), $sformatf("tick spacing %0d", cyc - last_tick));
      last_tick <= cyc;
    end
  end

  initial begin
    checks = 0; failures = 0; cyc = 0; last_tick = -1; n_ticks = 0;
    rst_n = 0; en = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5000) @(posedge clk);
    check(n_ticks == 0, "no tick while disabled");
    check(k == 0, "k is 0 while disabled");
    en <= 1;
    // en is seen on the next edge; the counter reaches all-ones 2**L - 1
    // edges later and tick is registered on the edge after that
    repeat ((1 << L) - 1) @(posedge clk);
    #1 check(tick == 0, "no tick one cycle early");
    @(posedge clk); #1 check(tick == 1, "first tick after 2**L cycles");
    check(k == 1, "k = 1 after first tick");
    @(posedge clk); #1 check(tick == 0, "tick lasts one cycle");
    repeat (5 * (1 << L)) @(posedge clk);
    #1 check(k == 6, $sformatf("k = %0d after six intervals", k));
    check(n_ticks == 6, "six ticks");
    en <= 0;
    repeat (3 * (1 << L)) @(posedge clk);
    check(k == 6, "k frozen while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
