// tb_state_feedback_controller: self-checking test of the control laws.
//
// A reference model written here evaluates, with plain integer arithmetic,
//   regulation: f = f_nom + floor((K0*R - K*Q) / 2**GAIN_FRAC)
//   tracking:   X += R - Q;  f = floor((K1*X - K*Q) / 2**GAIN_FRAC),
//               or d_ext for independent islands,
// each limited to [f_min, f_max], and compares every output after every
// interval tick. Gains, references, occupancies, limits and the
// independent-island mask are random; some steps are chosen to hit the
// limits. It also checks that f_valid comes exactly NI*NQ + 2 cycles after
// the tick, that the integrator is cleared in regulation mode and by
// integ_clr, and that a tick during an update is ignored.
`timescale 1ns/1ps
module tb_state_feedback_controller;
  import dvfs_pkg::*;
  localparam int unsigned NI = 3, NQ = 2, QW = 10;
  localparam int LAT = NI * NQ + 2;

  logic clk, rst_n, tick, integ_clr, f_valid, busy;
  ctrl_mode_e mode;
  logic [QW-1:0] q [NQ], r [NQ];
  gain_t k0 [NI][NQ], kfb [NI][NQ], k1 [NI][NQ];
  freq_t f_nom [NI], d_ext [NI], f_min [NI], f_max [NI], f_cmd [NI];
  logic [NI-1:0] indep, clamp_hi, clamp_lo;
  integ_t integ [NQ];

  int checks, failures, n_hi, n_lo;
  longint xm [NQ];

  state_feedback_controller #(.NI(NI), .NQ(NQ), .QW(QW)) dut (.*);

  initial begin clk = 0; forever #15.625 clk = ~clk; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint sgn_rand(input int mag);
    return longint'($urandom_range(0, 2 * mag)) - mag;
  endfunction

  task automatic randomize_config(input bit wide);
    for (int j = 0; j < NI; j++) begin
      for (int i = 0; i < NQ; i++) begin
        k0[j][i]  = GAIN_W'(sgn_rand(wide ? 4000000 : 300000));
        kfb[j][i] = GAIN_W'(sgn_rand(wide ? 4000000 : 300000));
        k1[j][i]  = GAIN_W'(sgn_rand(wide ? 4000000 : 300000));
      end
      f_nom[j] = FREQ_W'($urandom_range(20000, 150000));
      d_ext[j] = FREQ_W'($urandom_range(20000, 150000));
      f_min[j] = FREQ_W'($urandom_range(1000, 10000));
      f_max[j] = FREQ_W'($urandom_range(150000, 300000));
    end
    for (int i = 0; i < NQ; i++) begin
      r[i] = QW'($urandom_range(0, 40));
      q[i] = QW'($urandom_range(0, 80));
    end
    indep = NI'($urandom);
  endtask

  // one control interval: tick, wait for f_valid, compare
  task automatic step();
    longint acc, f, expf;
    int lat;
    // model
    if (mode == MODE_TRACK)
      for (int i = 0; i < NQ; i++) begin
        xm[i] = xm[i] + longint'(r[i]) - longint'(q[i]);
        if (xm[i] >  (2**(INTEG_W-1) - 1)) xm[i] =  2**(INTEG_W-1) - 1;
        if (xm[i] < -(2**(INTEG_W-1)))     xm[i] = -(2**(INTEG_W-1));
      end
    @(negedge clk);
    tick = 1;
    @(negedge clk);
    tick = 0;
    lat = 0;     // cycles counted from the edge that sampled the tick
    // a second tick while busy must be ignored
    tick = 1;
    @(negedge clk);
    tick = 0;
    lat++;
    while (!f_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    check(lat == LAT, $sformatf("f_valid after %0d cycles, expected %0d", lat, LAT));
    for (int j = 0; j < NI; j++) begin
      acc = 0;
      for (int i = 0; i < NQ; i++) begin
        if (mode == MODE_TRACK) acc += longint'(k1[j][i]) * xm[i];
        else                    acc += longint'(k0[j][i]) * longint'(r[i]);
        acc -= longint'(kfb[j][i]) * longint'(q[i]);
      end
      f = acc >>> GAIN_FRAC;
      if (mode == MODE_REGULATE) f = f + longint'(f_nom[j]);
      else if (indep[j])         f = longint'(d_ext[j]);
      expf = f;
      if (f > longint'(f_max[j])) expf = longint'(f_max[j]);
      if (f < longint'(f_min[j])) expf = longint'(f_min[j]);
      check(longint'(f_cmd[j]) == expf,
            $sformatf("mode %0d island %0d: f=%0d expected %0d", mode, j, f_cmd[j], expf));
      check(clamp_hi[j] == (f > longint'(f_max[j])), "clamp_hi flag");
      check(clamp_lo[j] == (f < longint'(f_min[j])), "clamp_lo flag");
      if (clamp_hi[j]) n_hi++;
      if (clamp_lo[j]) n_lo++;
    end
    for (int i = 0; i < NQ; i++)
      check(longint'(integ[i]) == xm[i], $sformatf("integrator %0d = %0d expected %0d", i, integ[i], xm[i]));
    check(f_valid == 1'b1, "f_valid pulse");
    @(negedge clk);
    check(f_valid == 1'b0, "f_valid is one cycle");
  endtask

  initial begin
    checks = 0; failures = 0; n_hi = 0; n_lo = 0;
    rst_n = 0; tick = 0; integ_clr = 0; mode = MODE_REGULATE;
    for (int i = 0; i < NQ; i++) xm[i] = 0;
    randomize_config(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      randomize_config(t % 7 == 3);
      step();
    end
    // tracking: keep the gains, vary q and r, let the integrator run
    @(negedge clk) mode = MODE_TRACK;
    for (int t = 0; t < 300; t++) begin
      if (t % 50 == 0) randomize_config(0);
      for (int i = 0; i < NQ; i++) q[i] = QW'($urandom_range(0, 80));
      step();
    end
    // integ_clr
    @(negedge clk) integ_clr = 1;
    @(negedge clk) integ_clr = 0;
    for (int i = 0; i < NQ; i++) xm[i] = 0;
    for (int i = 0; i < NQ; i++) check(integ[i] == 0, "integ_clr clears");
    for (int t = 0; t < 20; t++) step();
    // integrator saturation: a large constant error for a long time
    for (int i = 0; i < NQ; i++) begin r[i] = '0; q[i] = QW'(1023); end
    repeat (8300) begin
      for (int i = 0; i < NQ; i++) begin
        xm[i] = xm[i] - 1023;
        if (xm[i] < -(2**(INTEG_W-1))) xm[i] = -(2**(INTEG_W-1));
      end
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      repeat (LAT + 1) @(negedge clk);
    end
    step();
    for (int i = 0; i < NQ; i++)
      check(integ[i] == {1'b1, {(INTEG_W-1){1'b0}}}, "integrator saturates");
    // back to regulation: the integrator is cleared
    @(negedge clk) mode = MODE_REGULATE;
    @(negedge clk);
    for (int i = 0; i < NQ; i++) begin
      check(integ[i] == 0, "regulation mode clears the integrator");
      xm[i] = 0;
    end
    for (int t = 0; t < 20; t++) begin randomize_config(1); step(); end
    check(n_hi > 5 && n_lo > 5, $sformatf("limits exercised (%0d high, %0d low)", n_hi, n_lo));
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
