// mixed_clock_fifo: interface queue between two voltage-frequency islands.
//
// The producer island writes in its own clock (wclk), the consumer island
// reads in its own clock (rclk); the two clocks are unrelated and change
// frequency at run time. The storage is a DEPTH x WIDTH array written in
// wclk and read in rclk (a dual-port block RAM on an FPGA). Read and write
// pointers are kept in binary with one extra wrap bit and are passed across
// the clock boundary in Gray code through two-flop synchronizers, so each
// side sees a conservative view of the other: full may stay set, and empty
// may stay set, up to about three cycles longer than strictly needed.
//
// Interface:
//   write side (wclk): wr_en, wr_data, full. A write while full is dropped.
//   read side  (rclk): rd_en, rd_data, empty. rd_data is the head entry and
//     is valid whenever empty is low (first-word fall-through); rd_en
//     pops it. A read while empty is ignored.
//   wptr_gray / rptr_gray: the Gray-coded pointers, for the occupancy
//     monitor that measures the queue in the controller's clock.
// rst_n is asynchronous and resets both sides; it must be released
// while both clocks are quiet or synchronously to each of them.
//
// The source names the queue (a block-RAM mixed-clock FIFO from the FPGA
// vendor library) and its role; the Gray-pointer construction, the
// fall-through read port and the default 512 x 32 size (one Virtex-II
// block RAM in 512 x 36 mode) are this design's choices.
module mixed_clock_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             rst_n,
  // write side
  input  logic             wclk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  // read side
  input  logic             rclk,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  // pointers for occupancy measurement
  output logic [AW:0]      wptr_gray,
  output logic [AW:0]      rptr_gray
);
  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, rbin;
  logic [AW:0] rgray_w, wgray_r;   // other side's pointer, synchronized
  logic [AW:0] wbin_next, rbin_next;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign do_wr     = wr_en && !full;
  assign wbin_next = wbin + (AW+1)'(do_wr);

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin      <= '0;
      wptr_gray <= '0;
    end else begin
      wbin      <= wbin_next;
      wptr_gray <= bin2gray(wbin_next);
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  sync_2ff #(.W(AW+1)) u_sync_r2w (.clk(wclk), .rst_n(rst_n), .d(rptr_gray), .q(rgray_w));

  // Full when the write pointer has wrapped once more than the read pointer:
  // in Gray code, the two top bits differ and the rest are equal.
  assign full = ((wptr_gray ^ rgray_w) == {2'b11, {(AW-1){1'b0}}});

  // ---------------- read side ----------------
  assign do_rd     = rd_en && !empty;
  assign rbin_next = rbin + (AW+1)'(do_rd);

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin      <= '0;
      rptr_gray <= '0;
    end else begin
      rbin      <= rbin_next;
      rptr_gray <= bin2gray(rbin_next);
    end
  end

  sync_2ff #(.W(AW+1)) u_sync_w2r (.clk(rclk), .rst_n(rst_n), .d(wptr_gray), .q(wgray_r));

  assign empty   = (rptr_gray == wgray_r);
  assign rd_data = mem[rbin[AW-1:0]];

  // Handshake rules: the islands must honour the status flags.
  a_no_write_when_full: assert property (@(posedge wclk) disable iff (!rst_n) !(wr_en && full))
    else $error("mixed_clock_fifo: write while full");
  a_no_read_when_empty: assert property (@(posedge rclk) disable iff (!rst_n) !(rd_en && empty))
    else $error("mixed_clock_fifo: read while empty");

endmodule
