// tb_dvfs_sequencer: self-checking test of the voltage/frequency ordering.
//
// Issues speed-up, slow-down and equal requests and checks, cycle by cycle:
// on a speed-up the voltage target rises at once and the frequency follows
// exactly V_SETTLE cycles later; on a slow-down the frequency drops at once
// and the voltage follows F_SETTLE cycles later; the frequency is never
// above what the present voltage supports; f_upd toggles once per
// frequency change; the voltage word matches the linear map computed here.
`timescale 1ns/1ps
module tb_dvfs_sequencer;
  import dvfs_pkg::*;
  localparam int unsigned VSET = 20, FSET = 4;
  logic clk, rst_n, f_req_valid, f_upd, busy, ev_volt_first, ev_freq_first;
  freq_t f_req, f_out;
  volt_t v_out;
  int checks, failures, n_vf, n_fv;

  dvfs_sequencer #(.V_SETTLE(VSET), .F_SETTLE(FSET)) dut (.*);

  initial begin clk = 0; forever #15.625 clk = ~clk; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference voltage map: 800 mV + f * 400 / 200000, to 1 mV, capped
  function automatic int vref(input int f_khz);
    int v;
    v = 800 + (f_khz * 2) / 1000;
    return (v > 1200) ? 1200 : v;
  endfunction

  always @(posedge clk) begin
    if (ev_volt_first) n_vf++;
    if (ev_freq_first) n_fv++;
    if (rst_n) check(vref(int'(f_out)) <= int'(v_out) + 1, "frequency above voltage");
  end

  task automatic request(input int f);
    freq_t f_old; volt_t v_old; logic u_old;
    @(negedge clk);
    f_old = f_out; v_old = v_out; u_old = f_upd;
    f_req = FREQ_W'(f); f_req_valid = 1;
    @(negedge clk);
    f_req_valid = 0;
    if (f > int'(f_old)) begin
      check(int'(v_out) - vref(f) inside {[-1:1]}, $sformatf("speed-up: v %0d expected %0d", v_out, vref(f)));
      check(f_out == f_old, "speed-up: frequency unchanged at first");
      repeat (VSET - 1) begin
        @(negedge clk);
        check(f_out == f_old, "speed-up: frequency waits for the voltage");
      end
      @(negedge clk);
      check(int'(f_out) == f, "speed-up: frequency applied after V_SETTLE");
      check(f_upd != u_old, "speed-up: f_upd toggled");
    end else if (f < int'(f_old)) begin
      check(int'(f_out) == f, "slow-down: frequency applied at once");
      check(f_upd != u_old, "slow-down: f_upd toggled");
      check(v_out == v_old, "slow-down: voltage unchanged at first");
      repeat (FSET - 1) begin
        @(negedge clk);
        check(v_out == v_old, "slow-down: voltage waits");
      end
      @(negedge clk);
      check(int'(v_out) - vref(f) inside {[-1:1]}, $sformatf("slow-down: v %0d expected %0d", v_out, vref(f)));
    end else begin
      check(f_out == f_old && f_upd == u_old, "equal request changes no frequency");
    end
    @(negedge clk);
    check(!busy, "idle after the sequence");
  endtask

  initial begin
    checks = 0; failures = 0; n_vf = 0; n_fv = 0;
    rst_n = 0; f_req = '0; f_req_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(f_out == 100000, "reset frequency 100 MHz");
    check(int'(v_out) - vref(100000) inside {[-1:1]}, "reset voltage");
    request(120000);
    request(80000);
    request(80000);
    request(250000);   // voltage capped
    request(32000);
    request(0);
    for (int t = 0; t < 40; t++) request($urandom_range(0, 220000));
    check(n_vf >= 3 && n_fv >= 3, "both orderings exercised");
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
