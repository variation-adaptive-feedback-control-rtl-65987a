// dvfs_sequencer: applies a new operating point to one island so that the
// island never runs faster than its supply voltage allows.
//
// When a new frequency request is lower than the one in force, the clock is
// slowed first and the voltage is lowered F_SETTLE cycles later (once the
// clock generator has taken the new word). When it is higher, the voltage is
// raised first and the new frequency is applied only after V_SETTLE cycles,
// the time allowed for the regulator to ramp. An equal request only
// refreshes the voltage target.
//
// Voltage follows frequency through a linear map:
//   v = V_MIN_MV + f * (V_MAX_MV - V_MIN_MV) / F_VMAX_KHZ, limited to V_MAX_MV,
// evaluated to the nearest mV with a 24-bit fixed-point slope computed at
// elaboration.
//
// Interface (all in clk): f_req/f_req_valid from the controller (a request
// that arrives while busy is dropped; the controller issues one per control
// interval, far longer than V_SETTLE); f_out, the frequency word for the
// island clock generator, with f_upd toggling each time f_out changes so
// that the generator can take the word across its clock boundary; v_out,
// the target voltage for the island's regulator; ev_volt_first and
// ev_freq_first pulse when a speed-up or a slow-down sequence completes.
// After reset f_out = F_RESET_KHZ and v_out is its voltage.
//
// The ordering rule follows the source; the linear voltage map, the settle
// times (10 us at a 32 MHz controller clock for the voltage ramp) and the
// reset point are this design's choices.
module dvfs_sequencer
  import dvfs_pkg::*;
#(
  parameter int unsigned V_MIN_MV    = 800,
  parameter int unsigned V_MAX_MV    = 1200,
  parameter int unsigned F_VMAX_KHZ  = 200000,
  parameter int unsigned V_SETTLE    = 320,
  parameter int unsigned F_SETTLE    = 4,
  parameter int unsigned F_RESET_KHZ = 100000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  freq_t f_req,
  input  logic  f_req_valid,
  output freq_t f_out,
  output logic  f_upd,
  output volt_t v_out,
  output logic  busy,
  output logic  ev_volt_first,
  output logic  ev_freq_first
);
  localparam int unsigned     SH    = 24;
  localparam longint unsigned SLOPE =
      ((longint'(V_MAX_MV) - longint'(V_MIN_MV)) << SH) / longint'(F_VMAX_KHZ);
  localparam int CW = $clog2(((V_SETTLE > F_SETTLE) ? V_SETTLE : F_SETTLE) + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_V, S_WAIT_F} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  freq_t         f_pend;
  volt_t         v_pend, v_req;

  function automatic volt_t volt_of(input freq_t f);
    logic [63:0] v;
    v = 64'(V_MIN_MV) + ((64'(f) * SLOPE + (64'(1) << (SH - 1))) >> SH);
    if (v > 64'(V_MAX_MV)) v = 64'(V_MAX_MV);
    return VOLT_W'(v);
  endfunction

  assign v_req = volt_of(f_req);
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cnt           <= '0;
      f_out         <= FREQ_W'(F_RESET_KHZ);
      f_upd         <= 1'b0;
      v_out         <= volt_of(FREQ_W'(F_RESET_KHZ));
      f_pend        <= '0;
      v_pend        <= '0;
      ev_volt_first <= 1'b0;
      ev_freq_first <= 1'b0;
    end else begin
      ev_volt_first <= 1'b0;
      ev_freq_first <= 1'b0;
      unique case (state)
        S_IDLE: if (f_req_valid) begin
          if (f_req > f_out) begin          // speed up: voltage first
            v_out  <= v_req;
            f_pend <= f_req;
            cnt    <= CW'(V_SETTLE);
            state  <= S_WAIT_V;
          end else if (f_req < f_out) begin // slow down: frequency first
            f_out  <= f_req;
            f_upd  <= ~f_upd;
            v_pend <= v_req;
            cnt    <= CW'(F_SETTLE);
            state  <= S_WAIT_F;
          end else begin
            v_out  <= v_req;
          end
        end
        S_WAIT_V: begin
          if (cnt <= CW'(1)) begin
            f_out         <= f_pend;
            f_upd         <= ~f_upd;
            ev_volt_first <= 1'b1;
            state         <= S_IDLE;
          end
          cnt <= cnt - 1'b1;
        end
        S_WAIT_F: begin
          if (cnt <= CW'(1)) begin
            v_out         <= v_pend;
            ev_freq_first <= 1'b1;
            state         <= S_IDLE;
          end
          cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The frequency in force must never need more than the voltage in force.
  a_volt_covers_freq: assert property (@(posedge clk) disable iff (!rst_n)
                                       volt_of(f_out) <= v_out)
    else $error("dvfs_sequencer: frequency above what the voltage supports");

endmodule
