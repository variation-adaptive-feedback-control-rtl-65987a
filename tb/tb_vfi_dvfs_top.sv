// tb_vfi_dvfs_top: end-to-end test of the three-island DVFS system at its
// default parameters (512-entry queues, 2**12-cycle control interval at a
// 32 MHz controller clock = 128 us, 400 MHz reference).
//
// Behavioural models of the encoder stages run in the island clocks:
//   island 0 (input buffer)  writes queue 0 at 1/64 words per cycle;
//   island 1 (ME/MC/DCT)     reads an item from queue 0, works on it for a
//                            random time around a mean W1 (the workload),
//                            then writes it to queue 1;
//   island 2 (VLC)           reads queue 1, 41 +/- 8 cycles per item.
// Items carry sequence numbers, checked for order at both readers.
//
// Phases:
//   open loop   the controller is off, every island runs at 100 MHz: queue 0
//               fills (writer stalls on full), queue 1 runs dry;
//   regulation  all three islands controlled around nominal frequencies
//               (50, 100, 32 MHz) with gains placing both closed-loop
//               poles at 0.5; a burst is written into queue 0 and later a
//               burst is read out of it; both queues must return to their
//               references (10 and 8 entries);
//   tracking    island 0 is independent at 50 MHz (D), islands 1 and 2
//               follow through the integrator controller (poles at 0.3);
//               the mean work per item changes 128 -> 96 -> 160 cycles and
//               island 1's frequency must follow 781.25 kHz * W1
//               (100, 75, 125 MHz) while island 2 stays near 32 MHz; for
//               two intervals island 1's maximum frequency is cut to
//               90 MHz (a temperature limit) and the loop must recover.
// Throughout: voltage never below what the frequency in force needs, and
// the island 1 clock, counted over whole intervals with a constant word,
// matches the word. Every mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_vfi_dvfs_top;
  import dvfs_pkg::*;
  localparam int NI = 3, NQ = 2, QW = 10, WIDTH = 32;
  localparam int IVL = 4096;

  logic ref_clk, ctrl_clk, rst_n, en, integ_clr, tick, f_valid;
  ctrl_mode_e mode;
  logic [QW-1:0] r [NQ], q_occ [NQ];
  gain_t k0 [NI][NQ], kfb [NI][NQ], k1 [NI][NQ];
  freq_t f_nom [NI], d_ext [NI], f_min [NI], f_max [NI], f_set [NI];
  volt_t v_set [NI];
  logic [NI-1:0] indep, isl_clk, f_at_max, f_at_min;
  logic [NQ-1:0] wr_en = '0, rd_en = '0;   // quiet before the first island edge
  logic [NQ-1:0] full, empty;
  logic [WIDTH-1:0] wr_data [NQ], rd_data [NQ];
  logic [15:0] k;

  vfi_dvfs_top dut (.*);

  initial begin ref_clk = 0;  forever #1.25   ref_clk  = ~ref_clk;  end
  initial begin ctrl_clk = 0; forever #15.625 ctrl_clk = ~ctrl_clk; end

  int checks, failures;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_tick, n_update, n_vfirst, n_ffirst, n_hi, n_lo, n_full_stall,
      n_empty_stall, n_burst_wr, n_burst_rd, n_mode_sw, n_indep, n_integ,
      n_drop;

  // ---------------- island 0: input buffer ----------------
  // island state starts at its reset value: the island clocks are still
  // while reset is held, so the reset branches below may never run
  logic [15:0] acc0 = '0;
  int pending0 = 0, burst_wr = 0;
  logic [31:0] seq0 = 1;
  always @(negedge isl_clk[0] or negedge rst_n) begin
    if (!rst_n) begin
      acc0 <= '0; pending0 <= 0; seq0 <= 1; wr_en[0] <= 0; wr_data[0] <= '0;
    end else begin
      logic [16:0] s;
      int p;
      s = {1'b0, acc0} + 17'd1024;      // 1/64 words per cycle
      acc0 <= s[15:0];
      p = pending0 + int'(s[16]);
      if (burst_wr > 0) begin p += burst_wr; burst_wr = 0; end
      if (p > 64 && !(burst_wr > 0)) begin n_drop += p - 64; p = 64; end
      wr_en[0] <= 1'b0;
      if (p > 0) begin
        if (!full[0]) begin
          wr_en[0]   <= 1'b1;
          wr_data[0] <= seq0;
          seq0       <= seq0 + 1;
          p--;
        end else n_full_stall++;
      end
      pending0 <= p;
    end
  end

  // ---------------- island 1: ME / DCT stage ----------------
  int busy1 = 0, w1_mean = 128, burst_rd = 0;
  bit has1 = 0;
  logic [31:0] item1 = '0, last1 = '0;
  always @(negedge isl_clk[1] or negedge rst_n) begin
    if (!rst_n) begin
      busy1 <= 0; has1 <= 0; item1 <= '0; last1 <= '0;
      rd_en[0] <= 0; wr_en[1] <= 0; wr_data[1] <= '0;
    end else begin
      rd_en[0] <= 1'b0;
      wr_en[1] <= 1'b0;
      if (burst_rd > 0) begin
        if (!empty[0]) begin
          rd_en[0] <= 1'b1;
          last1    <= rd_data[0];
          burst_rd--;
        end else burst_rd = 0;
      end else if (busy1 > 0) begin
        busy1 <= busy1 - 1;
      end else if (has1) begin
        if (!full[1]) begin
          wr_en[1]   <= 1'b1;
          wr_data[1] <= item1;
          has1       <= 1'b0;
        end else n_full_stall++;
      end else if (!empty[0]) begin
        rd_en[0] <= 1'b1;
        check(rd_data[0] > last1, $sformatf("queue 0 order %0d after %0d", rd_data[0], last1));
        last1 <= rd_data[0];
        item1 <= rd_data[0];
        has1  <= 1'b1;
        // an item costs a read cycle, busy1 cycles and a write cycle
        busy1 <= w1_mean - 2 - 32 + $urandom_range(0, 64);
      end else n_empty_stall++;
    end
  end

  // ---------------- island 2: VLC stage ----------------
  int busy2 = 0;
  logic [31:0] last2 = '0;
  always @(negedge isl_clk[2] or negedge rst_n) begin
    if (!rst_n) begin
      busy2 <= 0; last2 <= '0; rd_en[1] <= 0;
    end else begin
      rd_en[1] <= 1'b0;
      if (busy2 > 0) busy2 <= busy2 - 1;
      else if (!empty[1]) begin
        rd_en[1] <= 1'b1;
        check(rd_data[1] > last2, "queue 1 order");
        last2 <= rd_data[1];
        busy2 <= 32 + $urandom_range(0, 16);   // plus the read cycle: 41 on average
      end else n_empty_stall++;
    end
  end

  // ---------------- per-interval observation ----------------
  longint edges1, edges1_at_tick;
  freq_t  f1_prev, f1_prev2;
  int     iv;                  // intervals since the start of the run
  int     q0_hist [200], q1_hist [200];
  int     f_hist [200][NI];
  always @(posedge isl_clk[1]) edges1++;

  always @(posedge ctrl_clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.f_valid) n_update++;
      for (int m = 0; m < NI; m++) begin
        if (dut.ev_vf[m]) n_vfirst++;
        if (dut.ev_fv[m]) n_ffirst++;
        check(int'(v_set[m]) + 1 >= 800 + (int'(f_set[m]) * 2) / 1000,
              $sformatf("island %0d: %0d kHz needs more than %0d mV", m, f_set[m], v_set[m]));
      end
      if (f_valid) begin
        n_hi += $countones(f_at_max);
        n_lo += $countones(f_at_min);
        if (mode == MODE_TRACK && f_set[0] == d_ext[0]) n_indep++;
        if (dut.u_ctrl.integ[0] != 0) n_integ++;
      end
      if (tick) n_tick++;
    end
  end

  // called at each tick by the main sequence
  task automatic observe();
    longint e;
    e = edges1 - edges1_at_tick;
    edges1_at_tick = edges1;
    // a clock word constant since before the previous tick: whole interval
    if (iv > 1 && f_set[1] == f1_prev && f1_prev == f1_prev2) begin
      longint expe;
      expe = longint'(f_set[1]) * 128 / 1000;
      check(e - expe inside {[-3:3]}, $sformatf("island 1: %0d edges in an interval at %0d kHz", e, f_set[1]));
    end
    f1_prev2 = f1_prev;
    f1_prev  = f_set[1];
    q0_hist[iv] = int'(q_occ[0]);
    q1_hist[iv] = int'(q_occ[1]);
    for (int m = 0; m < NI; m++) f_hist[iv][m] = int'(f_set[m]);
    $display("iv %3d mode %0d q0 %3d q1 %3d  f0 %6d f1 %6d f2 %6d kHz  v %4d %4d %4d mV",
             iv, mode, q_occ[0], q_occ[1], f_set[0], f_set[1], f_set[2], v_set[0], v_set[1], v_set[2]);
    iv++;
  endtask

  task automatic wait_intervals(input int n);
    repeat (n) begin
      @(posedge ctrl_clk iff tick);
      observe();
    end
  endtask

  function automatic real avg_f(input int from, input int to, input int m);
    real s = 0;
    for (int t = from; t <= to; t++) s += f_hist[t][m];
    return s / (to - from + 1);
  endfunction

  function automatic real avg_q(input int from, input int to, input int n);
    real s = 0;
    for (int t = from; t <= to; t++) s += (n == 0) ? q0_hist[t] : q1_hist[t];
    return s / (to - from + 1);
  endfunction

  task automatic set_gains_regulation();
    // K placing the eigenvalues of I - T*B*K at 0.5 (kHz/entry, x 256)
    int g [NI][NQ] = '{'{52171, 4855}, '{-23658, 9709}, '{-7578, -37890}};
    for (int j = 0; j < NI; j++)
      for (int i = 0; i < NQ; i++) begin
        k0[j][i]  = GAIN_W'(g[j][i]);
        kfb[j][i] = GAIN_W'(g[j][i]);
      end
  endtask

  task automatic set_gains_tracking();
    // islands 1 and 2 controlled, augmented-system poles at 0.3; island 2
    // sees only queue 1 (B is lower triangular, so the poles stay at 0.3)
    int gk  [NI][NQ] = '{'{0, 0}, '{-232960, 0}, '{0, -74620}};
    int gk1 [NI][NQ] = '{'{0, 0}, '{-125440, 0}, '{0, -40180}};
    for (int j = 0; j < NI; j++)
      for (int i = 0; i < NQ; i++) begin
        kfb[j][i] = GAIN_W'(gk[j][i]);
        k1[j][i]  = GAIN_W'(gk1[j][i]);
      end
  endtask

  initial begin
    int base;
    checks = 0; failures = 0;
    n_tick = 0; n_update = 0; n_vfirst = 0; n_ffirst = 0; n_hi = 0; n_lo = 0;
    n_full_stall = 0; n_empty_stall = 0; n_burst_wr = 0; n_burst_rd = 0;
    n_mode_sw = 0; n_indep = 0; n_integ = 0; n_drop = 0;
    burst_wr = 0; burst_rd = 0; w1_mean = 128; iv = 0;
    edges1 = 0; edges1_at_tick = 0; f1_prev = '0; f1_prev2 = '0;
    // reset is given a falling edge: the island-clocked registers reset
    // asynchronously, and their clocks stand still during reset
    rst_n = 1; en = 0; integ_clr = 0; mode = MODE_REGULATE;
    #5 rst_n = 0;
    r[0] = 10; r[1] = 8;
    for (int j = 0; j < NI; j++) begin
      for (int i = 0; i < NQ; i++) begin k0[j][i] = '0; kfb[j][i] = '0; k1[j][i] = '0; end
      f_min[j] = 5000; f_max[j] = 200000; d_ext[j] = 50000;
    end
    f_nom[0] = 50000; f_nom[1] = 100000; f_nom[2] = 32030;
    indep = 3'b001;
    set_gains_regulation();
    #100 rst_n = 1;

    // ---- open loop: 6 intervals at 100 MHz everywhere ----
    repeat (6 * IVL) @(posedge ctrl_clk);
    check(full[0] == 1'b1 || q_occ[0] > 500, $sformatf("open loop fills queue 0 (%0d)", q_occ[0]));
    check(q_occ[1] < 3, "open loop drains queue 1");
    check(f_set[1] == 100000, "reset operating point");

    // ---- regulation ----
    en = 1;
    wait_intervals(14);
    check(avg_q(iv - 4, iv - 1, 0) > 6.0 && avg_q(iv - 4, iv - 1, 0) < 15.0,
          $sformatf("regulated q0 averages %0f, reference 10", avg_q(iv - 4, iv - 1, 0)));
    check(avg_q(iv - 4, iv - 1, 1) > 3.0 && avg_q(iv - 4, iv - 1, 1) < 13.0,
          $sformatf("regulated q1 averages %0f, reference 8", avg_q(iv - 4, iv - 1, 1)));
    for (int m = 0; m < NI; m++)
      check(f_set[m] > f_nom[m] * 9 / 10 && f_set[m] < f_nom[m] * 11 / 10,
            $sformatf("island %0d near nominal (%0d kHz)", m, f_set[m]));
    // bursty write (40 items) into queue 0
    burst_wr = 40; n_burst_wr++;
    wait_intervals(1);
    check(q_occ[0] > 30, $sformatf("burst visible in q0 (%0d)", q_occ[0]));
    wait_intervals(7);
    check(avg_q(iv - 3, iv - 1, 0) > 6.0 && avg_q(iv - 3, iv - 1, 0) < 15.0,
          $sformatf("q0 back to reference after burst write (%0f)", avg_q(iv - 3, iv - 1, 0)));
    // bursty read: empty queue 0
    burst_rd = 1000; n_burst_rd++;
    wait_intervals(1);
    wait_intervals(7);
    check(avg_q(iv - 3, iv - 1, 0) > 6.0 && avg_q(iv - 3, iv - 1, 0) < 15.0,
          $sformatf("q0 back to reference after burst read (%0f)", avg_q(iv - 3, iv - 1, 0)));
    check(avg_q(iv - 3, iv - 1, 1) > 3.0 && avg_q(iv - 3, iv - 1, 1) < 13.0,
          $sformatf("q1 at reference (%0f)", avg_q(iv - 3, iv - 1, 1)));

    // ---- tracking ----
    @(negedge ctrl_clk);
    mode = MODE_TRACK; n_mode_sw++;
    set_gains_tracking();
    base = iv;
    wait_intervals(15);
    check(avg_f(base + 10, base + 14, 1) > 92000.0 && avg_f(base + 10, base + 14, 1) < 108000.0,
          $sformatf("W1=128: island 1 at %0f kHz, expected 100000", avg_f(base + 10, base + 14, 1)));
    check(avg_f(base + 10, base + 14, 2) > 29000.0 && avg_f(base + 10, base + 14, 2) < 35500.0,
          $sformatf("island 2 at %0f kHz, expected 32000", avg_f(base + 10, base + 14, 2)));
    check(f_set[0] == 50000, "independent island at D");
    // temperature limit on island 1 for two intervals, 10% below its need
    @(negedge ctrl_clk) f_max[1] = 90000;
    wait_intervals(2);
    check(f_set[1] <= 90000, "limit respected");
    @(negedge ctrl_clk) f_max[1] = 200000;
    wait_intervals(8);
    check(avg_q(iv - 3, iv - 1, 0) > 5.0 && avg_q(iv - 3, iv - 1, 0) < 15.0,
          $sformatf("q0 recovered after the limit (%0f)", avg_q(iv - 3, iv - 1, 0)));
    w1_mean = 96;
    base = iv;
    wait_intervals(12);
    check(avg_f(base + 7, base + 11, 1) > 69000.0 && avg_f(base + 7, base + 11, 1) < 81000.0,
          $sformatf("W1=96: island 1 at %0f kHz, expected 75000", avg_f(base + 7, base + 11, 1)));
    check(avg_q(iv - 3, iv - 1, 0) > 5.0 && avg_q(iv - 3, iv - 1, 0) < 15.0,
          $sformatf("tracked q0 averages %0f", avg_q(iv - 3, iv - 1, 0)));
    w1_mean = 160;
    base = iv;
    wait_intervals(14);
    check(avg_f(base + 9, base + 13, 1) > 115000.0 && avg_f(base + 9, base + 13, 1) < 135000.0,
          $sformatf("W1=160: island 1 at %0f kHz, expected 125000", avg_f(base + 9, base + 13, 1)));
    check(avg_f(base + 9, base + 13, 2) > 29000.0 && avg_f(base + 9, base + 13, 2) < 35500.0,
          $sformatf("island 2 at %0f kHz, expected 32000", avg_f(base + 9, base + 13, 2)));
    check(avg_q(base + 9, base + 13, 0) > 6.0 && avg_q(base + 9, base + 13, 0) < 14.0,
          $sformatf("tracked q0 averages %0f, reference 10", avg_q(base + 9, base + 13, 0)));
    check(avg_q(base + 9, base + 13, 1) > 3.0 && avg_q(base + 9, base + 13, 1) < 13.0,
          $sformatf("tracked q1 averages %0f, reference 8", avg_q(base + 9, base + 13, 1)));

    // ---- every mechanism must have happened ----
    $display("ticks %0d updates %0d volt-first %0d freq-first %0d at-max %0d at-min %0d",
             n_tick, n_update, n_vfirst, n_ffirst, n_hi, n_lo);
    $display("full-stalls %0d empty-stalls %0d burst-wr %0d burst-rd %0d mode-switch %0d indep %0d integ %0d drops %0d",
             n_full_stall, n_empty_stall, n_burst_wr, n_burst_rd, n_mode_sw, n_indep, n_integ, n_drop);
    check(n_tick > 60 && n_update > 60, "intervals and controller updates");
    check(n_vfirst > 0, "speed-up sequence (voltage first)");
    check(n_ffirst > 0, "slow-down sequence (frequency first)");
    check(n_hi > 0, "upper frequency limit");
    check(n_lo > 0, "lower frequency limit");
    check(n_full_stall > 0, "queue full stall");
    check(n_empty_stall > 0, "queue empty stall");
    check(n_burst_wr > 0 && n_burst_rd > 0, "bursts");
    check(n_mode_sw > 0, "mode switch");
    check(n_indep > 0, "independent island");
    check(n_integ > 0, "integrator in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #15ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
