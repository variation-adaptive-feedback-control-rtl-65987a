// island_clock_gen: produces one island's clock at a programmable frequency
// from the common reference clock shared by all islands.
//
// A numerically controlled oscillator: every reference cycle a phase
// accumulator of ACC_W bits advances by
//     inc = f_khz * 2**ACC_W / REF_KHZ
// and the island clock is the accumulator's top bit, so its average
// frequency is f_khz to within 2**-ACC_W of the reference and each edge is
// placed to within one reference period. The division is done by a
// reciprocal constant computed at elaboration. Frequencies above half the
// reference are limited to half the reference; zero stops the clock.
//
// Interface: f_khz and f_upd come from the controller clock domain. f_upd
// toggles when a new word is offered; the toggle is synchronized into
// ref_clk and the word, stable by then, is taken two to three reference
// cycles later. The word present when reset ends is taken on the first
// cycle. f_applied shows the word in force (ref_clk domain); clk_out is
// the island clock.
//
// The source has each island derive its clock from a common PLL (on its
// FPGA prototype, from four DLL-generated base clocks). The accumulator
// synthesizer and its word hand-off are this design's choices; the PLL
// itself is analog and supplies ref_clk from outside.
module island_clock_gen
  import dvfs_pkg::*;
#(
  parameter int unsigned REF_KHZ = 400000,
  parameter int unsigned ACC_W   = 32
) (
  input  logic  ref_clk,
  input  logic  rst_n,
  input  freq_t f_khz,
  input  logic  f_upd,
  output freq_t f_applied,
  output logic  clk_out
);
  localparam int unsigned SH = 16;
  localparam longint unsigned RECIP =
      ((longint'(1) << (ACC_W + SH)) + longint'(REF_KHZ) / 2) / longint'(REF_KHZ);
  localparam longint unsigned F_LIM = longint'(REF_KHZ) / 2;

  logic             upd_s, upd_seen, loaded;
  logic [ACC_W-1:0] acc, inc;
  logic [63:0]      prod;
  freq_t            f_lim;

  sync_2ff #(.W(1)) u_sync_upd (.clk(ref_clk), .rst_n(rst_n), .d(f_upd), .q(upd_s));

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded    <= 1'b0;
      upd_seen  <= 1'b0;
      f_applied <= '0;
    end else begin
      loaded <= 1'b1;
      if (!loaded || (upd_s != upd_seen)) begin
        f_applied <= f_khz;
        upd_seen  <= upd_s;
      end
    end
  end

  assign f_lim = (64'(f_applied) > F_LIM) ? FREQ_W'(F_LIM) : f_applied;
  assign prod  = 64'(f_lim) * RECIP;
  assign inc   = ACC_W'(prod >> SH);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + inc;
  end

  assign clk_out = acc[ACC_W-1];

endmodule
