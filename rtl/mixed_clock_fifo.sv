// mixed_clock_fifo: FIFO between two islands that run on unrelated clocks.
//
// The producer island writes on wclk, the consumer island reads on rclk; each
// side sees only the flag of its own half (full on the write side, empty on
// the read side), as in a producer/consumer link between two clock domains.
// This implementation is a conventional dual-clock FIFO: a DEPTH-entry
// register array, binary read and write pointers with one extra wrap bit, and
// Gray-coded copies of each pointer passed through a two-flop synchronizer
// into the other domain.  Full and empty are therefore conservative: a write
// or read becomes visible to the other side two to three of its cycles later.
//
// Interface: write side (wclk, wrst_n, write, din, full); read side (rclk,
// rrst_n, read, dout, empty).  dout shows the oldest entry whenever empty is
// low (first-word fall-through); read pops it on the next rclk edge.  A write
// while full and a read while empty are ignored (and flagged by assertions).
// DEPTH must be a power of two.  The level conversion between the two supply
// voltages that a real mixed-voltage link needs is outside this digital model.
module mixed_clock_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             write,
  input  logic [WIDTH-1:0] din,
  output logic             full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             read,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr, wptr_gray, rptr, rptr_gray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic do_write;
  assign do_write = write && !full;

  always_ff @(posedge wclk) begin
    if (do_write) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr      <= '0;
      wptr_gray <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
    end else begin
      rgray_w1 <= rptr_gray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  // Full when the write pointer is one lap ahead of the read pointer: in Gray
  // code the two top bits differ and the rest are equal.
  assign full = (wptr_gray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---------------- read domain ----------------
  logic do_read;
  assign do_read = read && !empty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr      <= '0;
      rptr_gray <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
    end else begin
      wgray_r1 <= wptr_gray;
      wgray_r2 <= wgray_r1;
      if (do_read) begin
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  assign empty = (rptr_gray == wgray_r2);
  assign dout  = mem[rptr[AW-1:0]];

  // Handshake rules of the two halves.
  a_no_write_when_full: assert property (@(posedge wclk) disable iff (!wrst_n)
                                         write |-> !full)
    else $error("mixed_clock_fifo: write while full");
  a_no_read_when_empty: assert property (@(posedge rclk) disable iff (!rrst_n)
                                         read |-> !empty)
    else $error("mixed_clock_fifo: read while empty");

endmodule
