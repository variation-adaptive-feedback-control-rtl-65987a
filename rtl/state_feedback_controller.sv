// state_feedback_controller: computes the clock frequency of every
// voltage-frequency island once per control interval from the measured
// utilization of the interface queues.
//
// The queues evolve as Q(k) = Q(k-1) + T*B*F(k-1) (+ T*C*D(k-1)), so the
// vector of queue occupancies Q is the state and the vector of island
// frequencies F is the control input. Two control laws are provided,
// selected by `mode`:
//
//   MODE_REGULATE  F(k) = Fnom + K0*R(k) - K*Q(k)
//       Frequencies are held around nominal values Fnom chosen off-line;
//       with K0 = K the queues settle at the reference occupancies R.
//   MODE_TRACK     X(k) = X(k-1) + R(k) - Q(k)
//                  F(k) = K1*X(k) - K*Q(k)
//       An integrator stage removes the steady-state error that
//       independently set frequencies D(k) would otherwise cause. Islands
//       flagged in `indep` are not controlled: their frequency is D(k).
//
// Every frequency is then limited to [f_min, f_max]; f_max is where a
// temperature-dependent maximum safe frequency enters. The gain matrices
// K0, K, K1 (NI rows, NQ columns) are computed off-line and supplied as
// inputs, as signed fixed point with GAIN_FRAC fractional bits in kHz per
// queue entry; products are summed exactly and the sum is shifted right
// (rounding toward minus infinity) before the clamp.
//
// Timing: a tick starts an update while the block is idle (ticks that
// arrive while busy are ignored). The cycle after the tick captures Q,
// and in tracking mode updates X; then one cycle per matrix entry
// (NI*NQ cycles, one multiply pair per cycle) accumulates the rows; f_cmd
// changes and f_valid pulses for one cycle LATENCY = NI*NQ + 2 cycles
// after the tick. The integrator is saturating and is cleared while in
// regulation mode and by integ_clr.
//
// The two control laws, the integrator and the frequency limit follow the
// source. The sequential one-multiply-pair datapath, the number formats,
// saturation and the clearing of the integrator are this design's choices.
module state_feedback_controller
  import dvfs_pkg::*;
#(
  parameter int unsigned NI = 3,   // voltage-frequency islands
  parameter int unsigned NQ = 2,   // controlled interface queues
  parameter int unsigned QW = 10   // occupancy width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_mode_e      mode,
  input  logic            tick,
  input  logic            integ_clr,
  input  logic [QW-1:0]   q      [NQ],
  input  logic [QW-1:0]   r      [NQ],
  input  gain_t           k0     [NI][NQ],
  input  gain_t           kfb    [NI][NQ],
  input  gain_t           k1     [NI][NQ],
  input  freq_t           f_nom  [NI],
  input  logic [NI-1:0]   indep,
  input  freq_t           d_ext  [NI],
  input  freq_t           f_min  [NI],
  input  freq_t           f_max  [NI],
  output freq_t           f_cmd  [NI],
  output logic            f_valid,
  output logic            busy,
  output logic [NI-1:0]   clamp_hi,
  output logic [NI-1:0]   clamp_lo,
  output integ_t          integ  [NQ]
);
  localparam int ACC_W = GAIN_W + INTEG_W + 2 + $clog2(NQ + 1);
  localparam int JW    = (NI > 1) ? $clog2(NI) : 1;
  localparam int IW    = (NQ > 1) ? $clog2(NQ) : 1;

  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_MAC, S_DONE} state_e;
  state_e state;

  logic [QW-1:0]           qs [NQ];
  logic [JW-1:0]           j;
  logic [IW-1:0]           i;
  logic signed [ACC_W-1:0] acc;
  freq_t                   f_next [NI];
  ctrl_mode_e              mode_s;

  // ---- one matrix entry per cycle ----
  gain_t                   a_gain, k_gain;
  logic signed [ACC_W-1:0] a_val, q_val, term, row_sum, shifted, fval;

  always_comb begin
    a_gain = (mode_s == MODE_TRACK) ? k1[j][i] : k0[j][i];
    k_gain = kfb[j][i];
    a_val  = (mode_s == MODE_TRACK) ? ACC_W'(integ[i]) : ACC_W'($signed({1'b0, r[i]}));
    q_val  = ACC_W'($signed({1'b0, qs[i]}));
    term   = ACC_W'(a_gain) * a_val - ACC_W'(k_gain) * q_val;
    row_sum = acc + term;
    shifted = row_sum >>> GAIN_FRAC;
    if (mode_s == MODE_REGULATE) fval = shifted + ACC_W'(f_nom[j]);
    else if (indep[j])           fval = ACC_W'(d_ext[j]);
    else                         fval = shifted;
  end

  function automatic integ_t sat_add(input integ_t x, input logic [QW-1:0] ref_v,
                                     input logic [QW-1:0] meas);
    logic signed [INTEG_W+1:0] s;
    s = (INTEG_W+2)'(x) + (INTEG_W+2)'($signed({1'b0, ref_v}))
        - (INTEG_W+2)'($signed({1'b0, meas}));
    if (s > $signed({3'b000, {(INTEG_W-1){1'b1}}}))      return {1'b0, {(INTEG_W-1){1'b1}}};
    else if (s < -$signed({3'b001, {(INTEG_W-1){1'b0}}})) return {1'b1, {(INTEG_W-1){1'b0}}};
    else                                                  return s[INTEG_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      j        <= '0;
      i        <= '0;
      acc      <= '0;
      f_valid  <= 1'b0;
      mode_s   <= MODE_REGULATE;
      clamp_hi <= '0;
      clamp_lo <= '0;
      for (int n = 0; n < int'(NQ); n++) begin
        qs[n]    <= '0;
        integ[n] <= '0;
      end
      for (int m = 0; m < int'(NI); m++) begin
        f_cmd[m]  <= '0;
        f_next[m] <= '0;
      end
    end else begin
      f_valid <= 1'b0;
      if (integ_clr || mode == MODE_REGULATE)
        for (int n = 0; n < int'(NQ); n++) integ[n] <= '0;
      unique case (state)
        S_IDLE: if (tick) begin
          state  <= S_CAPTURE;
          mode_s <= mode;
        end
        S_CAPTURE: begin
          for (int n = 0; n < int'(NQ); n++) begin
            qs[n] <= q[n];
            if (mode_s == MODE_TRACK && !integ_clr)
              integ[n] <= sat_add(integ[n], r[n], q[n]);
          end
          j     <= '0;
          i     <= '0;
          acc   <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          if (i == IW'(NQ - 1)) begin
            acc <= '0;
            i   <= '0;
            if (fval > ACC_W'($signed({1'b0, f_max[j]}))) begin
              f_next[j]   <= f_max[j];
              clamp_hi[j] <= 1'b1;
              clamp_lo[j] <= 1'b0;
            end else if (fval < ACC_W'($signed({1'b0, f_min[j]}))) begin
              f_next[j]   <= f_min[j];
              clamp_hi[j] <= 1'b0;
              clamp_lo[j] <= 1'b1;
            end else begin
              f_next[j]   <= fval[FREQ_W-1:0];
              clamp_hi[j] <= 1'b0;
              clamp_lo[j] <= 1'b0;
            end
            if (j == JW'(NI - 1)) state <= S_DONE;
            else                  j     <= j + 1'b1;
          end else begin
            acc <= row_sum;
            i   <= i + 1'b1;
          end
        end
        S_DONE: begin
          for (int m = 0; m < int'(NI); m++) f_cmd[m] <= f_next[m];
          f_valid <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
