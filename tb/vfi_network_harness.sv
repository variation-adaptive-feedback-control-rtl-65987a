// vfi_network_harness: a vfi_dvfs_top in regulation mode with behavioural
// endpoints on every queue, for the regulator-network workloads.
//
// Queue n is written from island Q_SRC[n] at W_RATE[n]/65536 words per
// island cycle and read from island Q_DST[n] at rd_rate[n]/65536 words per
// cycle (initially R_RATE[n]). Writers stall on full; a reader that finds
// its queue empty loses that read. Words carry a per-queue sequence number
// that the reader checks.
//
// The tasks are called from the testbench:
//   run_ring    preloads every queue, closes the loop, checks that the
//               queues settle where the linear queue model says (at R when
//               the preload matches R), then writes a burst into queue 0 and
//               checks the new settling point, then reads a burst out of
//               queue 0 and checks the settling point once more;
//   run_single  closes the loop and steps the reader's service rate through
//               a list of values, checking each settling point against the
//               model and that the step response overshoots when the
//               model's pole is negative.
// The linear model is Q(k) = Q(k-1) + T*B*F(k-1), F = F_NOM + K*(R - Q),
// with B built from the endpoint rates and T = 0.128 cycles per kHz.
`timescale 1ns/1ps
module vfi_network_harness
  import dvfs_pkg::*;
#(
  parameter int unsigned NI        = 2,
  parameter int unsigned NQ        = 2,
  parameter int unsigned Q_SRC [NQ] = '{0, 1},
  parameter int unsigned Q_DST [NQ] = '{1, 0},
  parameter int          W_RATE [NQ] = '{512, 512},
  parameter int          R_RATE [NQ] = '{512, 512},
  parameter int          KG [NI][NQ] = '{'{0, 0}, '{0, 0}},   // gain * 256
  parameter int          F_NOM [NI] = '{100000, 100000},
  parameter int          R_REF [NQ] = '{20, 20},
  parameter string       NAME       = "net"
) (
  input logic ref_clk,
  input logic ctrl_clk,
  input logic rst_n
);
  localparam int QW = 10, WIDTH = 32, DEPTH = 512;
  localparam real TK = 0.128;           // cycles per kHz in one interval
  localparam int F_LO = 10000, F_HI = 200000;

  logic en = 0, tick, f_valid;
  ctrl_mode_e mode = MODE_REGULATE;
  logic integ_clr = 0;
  logic [QW-1:0] r [NQ], q_occ [NQ];
  gain_t k0 [NI][NQ], kfb [NI][NQ], k1 [NI][NQ];
  freq_t f_nom [NI], d_ext [NI], f_min [NI], f_max [NI], f_set [NI];
  volt_t v_set [NI];
  logic [NI-1:0] indep = '0, isl_clk, f_at_max, f_at_min;
  logic [NQ-1:0] wr_en = '0, rd_en = '0, full, empty;
  logic [WIDTH-1:0] wr_data [NQ], rd_data [NQ];
  logic [15:0] k;

  vfi_dvfs_top #(.NI(NI), .NQ(NQ), .Q_SRC(Q_SRC), .Q_DST(Q_DST)) dut (.*);

  initial begin
    for (int n = 0; n < NQ; n++) r[n] = QW'(R_REF[n]);
    for (int j = 0; j < NI; j++) begin
      f_nom[j] = freq_t'(F_NOM[j]);
      d_ext[j] = '0;
      f_min[j] = freq_t'(F_LO);
      f_max[j] = freq_t'(F_HI);
      for (int n = 0; n < NQ; n++) begin
        k0[j][n]  = gain_t'(KG[j][n]);
        kfb[j][n] = gain_t'(KG[j][n]);
        k1[j][n]  = '0;
      end
    end
  end

  int checks, failures;
  int n_ticks, n_bursts, n_steps, n_overshoot, n_settled, n_full_stall,
      n_empty_miss, n_words, n_ejected;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t: %s", NAME, $time, msg); end
  endtask

  always @(posedge ctrl_clk) if (tick) n_ticks++;

  // ---------------- endpoints ----------------
  int rd_rate [NQ];
  int burst [NQ], eject [NQ];
  initial for (int n = 0; n < NQ; n++) begin
    rd_rate[n] = R_RATE[n]; burst[n] = 0; eject[n] = 0;
  end

  for (genvar n = 0; n < NQ; n++) begin : g_ep
    logic [15:0] wacc = '0, racc = '0;
    int pend = 0;
    bit tok = 0;
    logic [31:0] wseq = 1, rseq = 1;

    always @(negedge isl_clk[Q_SRC[n]]) begin
      logic [16:0] s;
      int p;
      s = {1'b0, wacc} + 17'(W_RATE[n]);
      wacc <= s[15:0];
      p = pend + int'(s[16]);
      if (burst[n] > 0) begin p += burst[n]; burst[n] = 0; end
      wr_en[n] <= 1'b0;
      if (p > 0) begin
        if (!full[n]) begin
          wr_en[n]   <= 1'b1;
          wr_data[n] <= wseq;
          wseq       <= wseq + 1;
          p--;
        end else n_full_stall++;
      end
      pend <= p;
    end

    always @(negedge isl_clk[Q_DST[n]]) begin
      logic [16:0] s;
      bit t;
      s = {1'b0, racc} + 17'(rd_rate[n]);
      racc <= s[15:0];
      t = tok | s[16] | (eject[n] > 0);
      rd_en[n] <= 1'b0;
      if (eject[n] > 0 && empty[n]) eject[n] = 0;
      else if (eject[n] > 0) begin eject[n]--; n_ejected++; end
      if (t) begin
        if (!empty[n]) begin
          rd_en[n] <= 1'b1;
          if (rd_data[n] != rseq) begin
            failures++;
            $display("FAIL %s: queue %0d word %0d, expected %0d", NAME, n, rd_data[n], rseq);
          end
          rseq <= rseq + 1;
          n_words++;
          t = 0;
        end else begin
          n_empty_miss++;
          t = 0;
        end
      end
      tok <= t;
    end
  end

  // ---------------- helpers ----------------
  task automatic wait_ticks(input int n);
    repeat (n) begin
      @(posedge ctrl_clk);
      while (!tick) @(posedge ctrl_clk);
    end
  endtask

  // average occupancy and frequency over n intervals, sampled at each tick
  task automatic sample(input int n, output real qa [NQ], output real fa [NI]);
    for (int i = 0; i < NQ; i++) qa[i] = 0.0;
    for (int j = 0; j < NI; j++) fa[j] = 0.0;
    repeat (n) begin
      wait_ticks(1);
      for (int i = 0; i < NQ; i++) qa[i] += real'(q_occ[i]) / n;
      for (int j = 0; j < NI; j++) fa[j] += real'(f_set[j]) / n;
    end
  endtask

  function automatic real clampr(input real x, input real lo, input real hi);
    return x < lo ? lo : (x > hi ? hi : x);
  endfunction

  // frequencies the controller computes from occupancies q
  function automatic void law(input real q [NQ], output real f [NI]);
    for (int j = 0; j < NI; j++) begin
      real a = F_NOM[j];
      for (int n = 0; n < NQ; n++) a += KG[j][n] / 256.0 * (R_REF[n] - q[n]);
      f[j] = clampr(a, F_LO, F_HI);
    end
  endfunction

  // iterate the linear model from q for 200 intervals
  task automatic predict(input real q0 [NQ], output real q [NQ], output real f [NI]);
    q = q0;
    repeat (200) begin
      real nq [NQ];
      law(q, f);
      for (int n = 0; n < NQ; n++)
        nq[n] = clampr(q[n] + TK * (W_RATE[n] / 65536.0 * f[Q_SRC[n]]
                                    - rd_rate[n] / 65536.0 * f[Q_DST[n]]), 0.0, DEPTH);
      q = nq;
    end
    law(q, f);
  endtask

  task automatic compare(input string what, input real qm [NQ], input real fm [NI],
                         input real qa [NQ], input real fa [NI], input real tol);
    bit ok = 1;
    for (int n = 0; n < NQ; n++) begin
      check(qa[n] > qm[n] - tol && qa[n] < qm[n] + tol,
            $sformatf("%s: queue %0d settles at %0.1f, model %0.1f", what, n, qa[n], qm[n]));
      ok &= qa[n] > qm[n] - tol && qa[n] < qm[n] + tol;
    end
    for (int j = 0; j < NI; j++) begin
      check(fa[j] > fm[j] * 0.98 && fa[j] < fm[j] * 1.02,
            $sformatf("%s: island %0d at %0.0f kHz, model %0.0f", what, j, fa[j], fm[j]));
      ok &= fa[j] > fm[j] * 0.98 && fa[j] < fm[j] * 1.02;
    end
    if (ok) n_settled++;
    $write("%s %s: q", NAME, what);
    for (int n = 0; n < NQ; n++) $write(" %0.1f(%0.1f)", qa[n], qm[n]);
    $write("  f");
    for (int j = 0; j < NI; j++) $write(" %0.0f", fa[j]);
    $display("");
  endtask

  // ---------------- scenarios ----------------
  task automatic run_ring(input int preload, input int burst_n);
    real q0 [NQ], qm [NQ], qa [NQ], fm [NI], fa [NI];
    // preload while every island runs at the reset frequency
    for (int n = 0; n < NQ; n++) burst[n] = preload;
    #(300us);
    en = 1;
    sample(1, q0, fa);
    predict(q0, qm, fm);
    wait_ticks(10);
    sample(4, qa, fa);
    compare("regulated", qm, fm, qa, fa, 3.0);
    for (int n = 0; n < NQ; n++)
      check(qa[n] > R_REF[n] - 3.0 && qa[n] < R_REF[n] + 3.0,
            $sformatf("queue %0d at %0.1f, reference %0d", n, qa[n], R_REF[n]));
    // a burst adds words that no frequency change can remove from the ring
    burst[0] = burst_n;
    n_bursts++;
    wait_ticks(1);
    sample(1, q0, fa);
    predict(q0, qm, fm);
    wait_ticks(10);
    sample(4, qa, fa);
    compare("after burst", qm, fm, qa, fa, 3.0);
    for (int n = 0; n < NQ; n++)
      check(qa[n] - R_REF[n] > real'(burst_n) / NQ - 3.0 &&
            qa[n] - R_REF[n] < real'(burst_n) / NQ + 3.0,
            $sformatf("queue %0d shifted by %0.1f, expected %0.1f", n,
                      qa[n] - R_REF[n], real'(burst_n) / NQ));
    // a burst read out of queue 0 (it stops if the queue runs empty)
    // removes words from the ring again
    n_ejected = 0;
    eject[0] = burst_n;
    n_bursts++;
    wait_ticks(1);
    sample(1, q0, fa);
    predict(q0, qm, fm);
    wait_ticks(10);
    sample(4, qa, fa);
    compare("after eject", qm, fm, qa, fa, 3.0);
    for (int n = 0; n < NQ; n++)
      check(qa[n] - R_REF[n] > real'(burst_n - n_ejected) / NQ - 3.0 &&
            qa[n] - R_REF[n] < real'(burst_n - n_ejected) / NQ + 3.0 && n_ejected > 0,
            $sformatf("queue %0d at %0.1f after %0d words ejected, reference %0d",
                      n, qa[n], n_ejected, R_REF[n]));
  endtask

  task automatic run_single(input int rates [], input bit oscill []);
    real q0 [NQ], qm [NQ], qa [NQ], fm [NI], fa [NI];
    en = 1;
    foreach (rates[s]) begin
      real d1, d2;
      rd_rate[0] = rates[s];
      n_steps++;
      wait_ticks(1);
      sample(1, q0, fa);
      predict(q0, qm, fm);
      sample(1, qa, fa);
      d1 = q0[0] - qm[0];
      d2 = qa[0] - qm[0];
      if (oscill[s]) begin
        // pole below zero: the response crosses the settling point
        check(d1 * d2 < 0.0 && (d1 > 6.0 || d1 < -6.0),
              $sformatf("rate %0d: no overshoot (%0.1f, %0.1f)", rates[s], d1, d2));
        if (d1 * d2 < 0.0) n_overshoot++;
      end
      wait_ticks(12);
      sample(4, qa, fa);
      compare($sformatf("service rate %0d/65536", rates[s]), qm, fm, qa, fa, 3.0);
    end
  endtask
endmodule
