// tb_regulator_networks: the regulator workloads, run on vfi_dvfs_top with
// the island/queue structure set by parameters (default queue size,
// control interval and clocks).
//
//   ring2  two islands, queue 0 from island 0 to 1, queue 1 back;
//   ring3  three islands, queues 0->1, 2->0 and 1->2;
//   ring4  four islands, queues 0->1, 2->0, 1->3 and 3->2.
// Every queue carries 1/128 word per cycle at both ends and every island
// is nominally at 100 MHz. In a ring, B has rank NQ-1: the total of the
// occupancies cannot be changed by any choice of frequencies. The gains
// (pseudo-inverse of B, scaled) put all the other modes at 0.5. The test
// preloads 20 words per queue, with references summing to the same total,
// and checks that every queue reaches its own reference; a later burst
// written into queue 0 must end up spread evenly over the ring, and a burst
// read out of queue 0 must take the words out of the ring again.
//
//   single  two islands and one queue (the first-order example): island 0
//           fixed at 50 MHz writing 1/64 word per cycle, island 1 reading
//           at a service rate that steps from 1/128 word per cycle to
//           +80 %, +200 % and -40 %. The gain puts the nominal pole at 0.5,
//           so the loop stays stable up to +300 %; at +200 % the pole is
//           -0.5 and the response must overshoot.
// Each settling point is checked against the linear queue model.
// The network shapes, the burst write then read on the first queue, and the
// first-order loop with its stability bound follow the published regulator
// experiments. The rates, references, burst sizes, the direction of the one
// queue per ring drawn without an arrow (1->2 in ring3, 1->3 in ring4), and
// the model comparison are this test's own.
`timescale 1ns/1ps
module tb_regulator_networks;
  logic ref_clk, ctrl_clk, rst_n;
  initial begin ref_clk = 0;  forever #1.25   ref_clk  = ~ref_clk;  end
  initial begin ctrl_clk = 0; forever #15.625 ctrl_clk = ~ctrl_clk; end

  // network descriptions (named constants: each array's size comes from
  // the instance's NI and NQ)
  localparam int unsigned R2_SRC [2] = '{0, 1}, R2_DST [2] = '{1, 0};
  localparam int R2_RATE [2] = '{512, 512}, R2_REF [2] = '{10, 30};
  localparam int R2_F [2] = '{100000, 100000};
  localparam int R2_K [2][2] = '{'{32000, -32000}, '{-32000, 32000}};

  localparam int unsigned R3_SRC [3] = '{0, 2, 1}, R3_DST [3] = '{1, 0, 2};
  localparam int R3_RATE [3] = '{512, 512, 512}, R3_REF [3] = '{15, 25, 20};
  localparam int R3_F [3] = '{100000, 100000, 100000};
  localparam int R3_K [3][3] = '{'{42667, -42667, 0}, '{-42667, 0, 42667},
                                 '{0, 42667, -42667}};

  localparam int unsigned R4_SRC [4] = '{0, 2, 1, 3}, R4_DST [4] = '{1, 0, 3, 2};
  localparam int R4_RATE [4] = '{512, 512, 512, 512}, R4_REF [4] = '{10, 30, 15, 25};
  localparam int R4_F [4] = '{100000, 100000, 100000, 100000};
  localparam int R4_K [4][4] = '{'{48000, -48000, 16000, -16000},
                                 '{-48000, -16000, 48000, 16000},
                                 '{16000, 48000, -16000, -48000},
                                 '{-16000, 16000, -48000, 48000}};

  localparam int unsigned S_SRC [1] = '{0}, S_DST [1] = '{1};
  localparam int S_WR [1] = '{1024}, S_RD [1] = '{512}, S_REF [1] = '{250};
  localparam int S_F [2] = '{50000, 100000};
  localparam int S_K [2][1] = '{'{0}, '{-128000}};

  vfi_network_harness #(.NI(2), .NQ(2), .Q_SRC(R2_SRC), .Q_DST(R2_DST),
    .W_RATE(R2_RATE), .R_RATE(R2_RATE), .KG(R2_K), .F_NOM(R2_F), .R_REF(R2_REF),
    .NAME("ring2")) ring2 (.*);

  vfi_network_harness #(.NI(3), .NQ(3), .Q_SRC(R3_SRC), .Q_DST(R3_DST),
    .W_RATE(R3_RATE), .R_RATE(R3_RATE), .KG(R3_K), .F_NOM(R3_F), .R_REF(R3_REF),
    .NAME("ring3")) ring3 (.*);

  vfi_network_harness #(.NI(4), .NQ(4), .Q_SRC(R4_SRC), .Q_DST(R4_DST),
    .W_RATE(R4_RATE), .R_RATE(R4_RATE), .KG(R4_K), .F_NOM(R4_F), .R_REF(R4_REF),
    .NAME("ring4")) ring4 (.*);

  vfi_network_harness #(.NI(2), .NQ(1), .Q_SRC(S_SRC), .Q_DST(S_DST),
    .W_RATE(S_WR), .R_RATE(S_RD), .KG(S_K), .F_NOM(S_F), .R_REF(S_REF),
    .NAME("single")) single (.*);

  int checks, failures;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #(60ms);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1;
    #5 rst_n = 0;
    #100 rst_n = 1;
    fork
      ring2.run_ring(20, 30);
      ring3.run_ring(20, 30);
      ring4.run_ring(20, 40);
      single.run_single('{512, 922, 1536, 307}, '{0, 0, 1, 0});
    join
    // every mechanism must have happened
    check(ring2.n_settled == 3 && ring3.n_settled == 3 && ring4.n_settled == 3,
          "a ring did not settle where the model says");
    check(single.n_settled == 4, "the single queue did not settle at every rate");
    check(single.n_overshoot == 1, "no overshoot with the negative pole");
    check(ring2.n_bursts + ring3.n_bursts + ring4.n_bursts == 6, "bursts");
    check(ring2.n_words > 0 && ring3.n_words > 0 && ring4.n_words > 0 && single.n_words > 0,
          "data through every network");
    check(ring2.n_ticks > 20 && single.n_ticks > 60, "control intervals");
    $display("words: ring2 %0d ring3 %0d ring4 %0d single %0d; empty misses %0d",
             ring2.n_words, ring3.n_words, ring4.n_words, single.n_words,
             ring2.n_empty_miss + ring3.n_empty_miss + ring4.n_empty_miss + single.n_empty_miss);
    checks += ring2.checks + ring3.checks + ring4.checks + single.checks;
    failures += ring2.failures + ring3.failures + ring4.failures + single.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
