// queue_occupancy_monitor: measures an interface queue's utilization q_i in
// the controller's clock.
//
// The queue's Gray-coded write and read pointers come from two other clock
// domains. Each is passed through a two-flop synchronizer (safe, since a
// Gray pointer changes one bit per step), converted back to binary, and the
// difference of the two (modulo twice the depth) is the number of entries.
// The result is registered, so occ lags the pointers by three clk cycles;
// an in-flight write or read may be seen a few cycles late, which is
// negligible against a control interval of thousands of cycles.
//
// Interface: wptr_gray, rptr_gray (asynchronous), occ (clk domain,
// 0..DEPTH). rst_n is asynchronous.
//
// The source defines the quantity measured (queue utilization as the state
// of the controlled system); the pointer-difference circuit is this
// design's choice.
module queue_occupancy_monitor #(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [AW:0] wptr_gray,
  input  logic [AW:0] rptr_gray,
  output logic [AW:0] occ
);
  logic [AW:0] wg_s, rg_s;
  logic [AW:0] wbin, rbin;

  sync_2ff #(.W(AW+1)) u_sync_w (.clk(clk), .rst_n(rst_n), .d(wptr_gray), .q(wg_s));
  sync_2ff #(.W(AW+1)) u_sync_r (.clk(clk), .rst_n(rst_n), .d(rptr_gray), .q(rg_s));

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign wbin = gray2bin(wg_s);
  assign rbin = gray2bin(rg_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) occ <= '0;
    else        occ <= wbin - rbin;
  end
endmodule
