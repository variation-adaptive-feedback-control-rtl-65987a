// vfi_dvfs_top: a network of voltage-frequency islands whose clock
// frequencies and supply voltages are set by queue-utilization feedback.
//
// Each island is a synchronous region with its own clock (made here by an
// island_clock_gen from the common reference clock) and its own supply
// (an external regulator that follows v_set). Data crosses from one island
// to another only through mixed-clock interface queues. Once per control
// interval (2**INTERVAL_LOG2 ctrl_clk cycles) the clock control logic
// reads the occupancy of every queue, the state_feedback_controller turns
// the occupancies into new island frequencies (regulation or tracking),
// and a dvfs_sequencer per island applies each one in the safe order.
//
// The default configuration is the three-island partition of an MPEG-2
// encoder: island 0 (input buffer) writes queue 0, island 1 (motion
// estimation and compensation, DCT, quantization) reads queue 0 and writes
// queue 1, island 2 (variable-length coding) reads queue 1. Q_SRC/Q_DST
// give, for each queue, the island that writes and the island that reads
// it. The processing cores are outside this module: each one connects to
// the queue ports of its island and is clocked by isl_clk of its island.
//
// Interface summary:
//   ref_clk   common reference for the island clock synthesizers
//   ctrl_clk  fixed clock of the controller, timer and sequencers
//   en        starts the control intervals
//   mode, integ_clr, r, k0, kfb, k1, f_nom, indep, d_ext, f_min, f_max:
//             controller configuration (see state_feedback_controller);
//             all are static or change slowly, read in ctrl_clk
//   wr_* / full   write port of queue n, in isl_clk[Q_SRC[n]]
//   rd_* / empty  read port of queue n, in isl_clk[Q_DST[n]]
//   isl_clk   island clocks; f_set, v_set: operating point in force
//             (ctrl_clk); q_occ: measured occupancies; tick, k: interval
//             marker and count; f_valid: a new set of frequencies;
//             f_at_max/f_at_min: an island's request was limited
// rst_n is asynchronous and common to all domains.
//
// The island/queue structure, the control laws and the ordering of voltage
// and frequency changes follow the source. The clock synthesis, number
// formats, queue size and reset operating point (every island at 100 MHz,
// the single-clock baseline's frequency) are this design's choices.
module vfi_dvfs_top
  import dvfs_pkg::*;
#(
  parameter int unsigned NI            = 3,
  parameter int unsigned NQ            = 2,
  parameter int unsigned Q_SRC [NQ]    = '{0, 1},
  parameter int unsigned Q_DST [NQ]    = '{1, 2},
  parameter int unsigned DEPTH         = 512,
  parameter int unsigned WIDTH         = 32,
  parameter int unsigned INTERVAL_LOG2 = 12,
  parameter int unsigned REF_KHZ       = 400000,
  parameter int unsigned V_SETTLE      = 320,
  parameter int unsigned F_RESET_KHZ   = 100000,
  localparam int unsigned QW           = $clog2(DEPTH) + 1
) (
  input  logic             ref_clk,
  input  logic             ctrl_clk,
  input  logic             rst_n,
  input  logic             en,
  // controller configuration
  input  ctrl_mode_e       mode,
  input  logic             integ_clr,
  input  logic [QW-1:0]    r      [NQ],
  input  gain_t            k0     [NI][NQ],
  input  gain_t            kfb    [NI][NQ],
  input  gain_t            k1     [NI][NQ],
  input  freq_t            f_nom  [NI],
  input  logic [NI-1:0]    indep,
  input  freq_t            d_ext  [NI],
  input  freq_t            f_min  [NI],
  input  freq_t            f_max  [NI],
  // interface queues
  input  logic [NQ-1:0]    wr_en,
  input  logic [WIDTH-1:0] wr_data [NQ],
  output logic [NQ-1:0]    full,
  input  logic [NQ-1:0]    rd_en,
  output logic [WIDTH-1:0] rd_data [NQ],
  output logic [NQ-1:0]    empty,
  // island clocks and status
  output logic [NI-1:0]    isl_clk,
  output freq_t            f_set  [NI],
  output volt_t            v_set  [NI],
  output logic [QW-1:0]    q_occ  [NQ],
  output logic             tick,
  output logic [15:0]      k,
  output logic             f_valid,
  output logic [NI-1:0]    f_at_max,
  output logic [NI-1:0]    f_at_min
);
  freq_t         f_cmd [NI];
  logic [NI-1:0] f_upd, seq_busy, ev_vf, ev_fv;
  freq_t         f_applied [NI];
  integ_t        integ [NQ];
  logic          ctrl_busy;

  // ---------------- islands: clock and operating-point sequencing --------
  for (genvar m = 0; m < NI; m++) begin : g_island
    dvfs_sequencer #(
      .V_SETTLE   (V_SETTLE),
      .F_RESET_KHZ(F_RESET_KHZ)
    ) u_seq (
      .clk          (ctrl_clk),
      .rst_n        (rst_n),
      .f_req        (f_cmd[m]),
      .f_req_valid  (f_valid),
      .f_out        (f_set[m]),
      .f_upd        (f_upd[m]),
      .v_out        (v_set[m]),
      .busy         (seq_busy[m]),
      .ev_volt_first(ev_vf[m]),
      .ev_freq_first(ev_fv[m])
    );

    island_clock_gen #(.REF_KHZ(REF_KHZ)) u_clk (
      .ref_clk  (ref_clk),
      .rst_n    (rst_n),
      .f_khz    (f_set[m]),
      .f_upd    (f_upd[m]),
      .f_applied(f_applied[m]),
      .clk_out  (isl_clk[m])
    );
  end

  // ---------------- interface queues and their occupancy -----------------
  for (genvar n = 0; n < NQ; n++) begin : g_queue
    logic [QW-1:0] wg, rg;

    mixed_clock_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_fifo (
      .rst_n    (rst_n),
      .wclk     (isl_clk[Q_SRC[n]]),
      .wr_en    (wr_en[n]),
      .wr_data  (wr_data[n]),
      .full     (full[n]),
      .rclk     (isl_clk[Q_DST[n]]),
      .rd_en    (rd_en[n]),
      .rd_data  (rd_data[n]),
      .empty    (empty[n]),
      .wptr_gray(wg),
      .rptr_gray(rg)
    );

    queue_occupancy_monitor #(.DEPTH(DEPTH)) u_mon (
      .clk      (ctrl_clk),
      .rst_n    (rst_n),
      .wptr_gray(wg),
      .rptr_gray(rg),
      .occ      (q_occ[n])
    );
  end

  // ---------------- clock control: interval timer and controller ---------
  control_interval_timer #(.INTERVAL_LOG2(INTERVAL_LOG2)) u_timer (
    .clk  (ctrl_clk),
    .rst_n(rst_n),
    .en   (en),
    .tick (tick),
    .k    (k)
  );

  state_feedback_controller #(.NI(NI), .NQ(NQ), .QW(QW)) u_ctrl (
    .clk      (ctrl_clk),
    .rst_n    (rst_n),
    .mode     (mode),
    .tick     (tick),
    .integ_clr(integ_clr),
    .q        (q_occ),
    .r        (r),
    .k0       (k0),
    .kfb      (kfb),
    .k1       (k1),
    .f_nom    (f_nom),
    .indep    (indep),
    .d_ext    (d_ext),
    .f_min    (f_min),
    .f_max    (f_max),
    .f_cmd    (f_cmd),
    .f_valid  (f_valid),
    .busy     (ctrl_busy),
    .clamp_hi (f_at_max),
    .clamp_lo (f_at_min),
    .integ    (integ)
  );

endmodule
