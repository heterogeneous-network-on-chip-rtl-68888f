// fwd_buffer: Forwarding Buffer, the bypass path of the router node.
//
// Packets that need fast delivery, or that would otherwise wait in a
// congested input buffer, are held here and handed straight to the output
// switching allocator, skipping the input allocator and the router core.
// Before taking a packet the buffer checks its destination against the
// routing-permission mask `perm` (one bit per output port) and its own
// occupancy: above THRESH packets it stops accepting, so the input side falls
// back to the normal path instead of overflowing the buffer. The packet is
// stored and forwarded unchanged: whatever obfuscation it carries is kept.
// Packets leave in arrival order, one per cycle, when the output side
// accepts (out_ready).
// The bypass role, the permission check and the occupancy threshold follow
// the design description; the FIFO organisation and the sizes are choices of
// this implementation.
//
// Timing: a packet accepted at edge t is offered on out_valid in the next
// cycle (first word fall-through).
module fwd_buffer
  import hnoc_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned THRESH = 3   // accept only while fewer than THRESH are held
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [N_PORTS-1:0]         perm,       // destinations the bypass may serve
  input  logic                       in_valid,
  input  pkt_t                       in_pkt,
  output logic                       in_ready,
  output logic                       above_thresh,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       out_valid,
  output pkt_t                       out_pkt,
  input  logic                       out_ready
);
  logic empty, full;

  assign above_thresh = (int'(count) >= THRESH);
  assign in_ready     = !full && !above_thresh && perm[in_pkt.dst];
  assign out_valid    = !empty;

  sync_fifo #(.T(pkt_t), .DEPTH(DEPTH)) u_fifo (
    .clk  (clk),
    .rst  (rst),
    .push (in_valid && in_ready),
    .din  (in_pkt),
    .pop  (out_valid && out_ready),
    .dout (out_pkt),
    .empty(empty),
    .full (full),
    .count(count)
  );

endmodule
