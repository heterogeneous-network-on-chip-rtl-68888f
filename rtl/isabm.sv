// isabm: Input Switching Allocator and Buffer (input switching allocation
// with buffer management).
//
// Entry point of the router node. It follows the stages of the design's
// input block:
//   reception      - one packet per cycle on in_valid/in_ready;
//   classification - the packet is stored in the queue of its destination
//                    port (one queue per output port, DEPTH entries each);
//   monitoring     - total occupancy is kept and `congested` is raised when it
//                    reaches CONG_THRESH;
//   admission      - a packet is rejected (in_ready low) when its queue is
//                    full, or, while congested, when it is normal priority and
//                    its queue already holds DEPTH/2 or more packets, so that
//                    room is kept for high-priority traffic;
//   requests       - every non-empty queue requests the switch;
//   arbitration    - queues whose head is high priority, or whose request has
//                    waited AGE_LIMIT cycles, win over the others; ties are
//                    broken round-robin for fairness;
//   dispatch       - the winning head goes to the router when it accepts
//                    (out_ready, the router's secure control, is low while the
//                    key is being rotated).
// Stage names, the threshold idea and the use of priority, waiting time and
// fairness follow the design description. Queue per destination, the sizes,
// the aging rule and the admission rule are choices of this implementation.
//
// Timing: a packet written at edge t can be dispatched in the cycle after t
// (out_valid combinational from the queue heads, so one cycle of buffering).
module isabm
  import hnoc_pkg::*;
#(
  parameter int unsigned DEPTH       = 4,   // per destination queue
  parameter int unsigned CONG_THRESH = 12,  // total occupancy that means congested
  parameter int unsigned AGE_LIMIT   = 8    // cycles of waiting before promotion
) (
  input  logic                                 clk,
  input  logic                                 rst,
  // reception
  input  logic                                 in_valid,
  input  pkt_t                                 in_pkt,
  output logic                                 in_ready,   // grant (1) / reject (0)
  // buffer status
  output logic                                 congested,
  output logic [$clog2(N_PORTS*DEPTH+1)-1:0]   occupancy,
  output logic [N_PORTS-1:0]                   aged,       // request promoted by waiting
  // dispatch towards the router
  output logic                                 out_valid,
  output pkt_t                                 out_pkt,
  input  logic                                 out_ready
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned OW = $clog2(N_PORTS * DEPTH + 1);
  localparam int unsigned AW = $clog2(AGE_LIMIT + 1);

  pkt_t             head  [N_PORTS];
  logic [CW-1:0]    cnt   [N_PORTS];
  logic [N_PORTS-1:0] empty, full, push, pop;
  logic [N_PORTS-1:0] req, hi_req, arb_req, grant;
  logic [AW-1:0]    wait_cnt [N_PORTS];

  // ---- admission and classification
  always_comb begin
    logic half_full;
    half_full = (int'(cnt[in_pkt.dst]) >= DEPTH / 2);
    in_ready  = !full[in_pkt.dst] && !(congested && !in_pkt.prio && half_full);
    push      = '0;
    push[in_pkt.dst] = in_valid && in_ready;
  end

  for (genvar q = 0; q < N_PORTS; q++) begin : g_voq
    sync_fifo #(.T(pkt_t), .DEPTH(DEPTH)) u_q (
      .clk  (clk),
      .rst  (rst),
      .push (push[q]),
      .din  (in_pkt),
      .pop  (pop[q]),
      .dout (head[q]),
      .empty(empty[q]),
      .full (full[q]),
      .count(cnt[q])
    );

    // waiting time of the request of queue q
    always_ff @(posedge clk or posedge rst) begin
      if (rst)                          wait_cnt[q] <= '0;
      else if (pop[q] || empty[q])      wait_cnt[q] <= '0;
      else if (int'(wait_cnt[q]) < AGE_LIMIT) wait_cnt[q] <= wait_cnt[q] + 1'b1;
    end
    assign aged[q]   = !empty[q] && (int'(wait_cnt[q]) >= AGE_LIMIT);
    assign req[q]    = !empty[q];
    assign hi_req[q] = req[q] && (head[q].prio || aged[q]);
  end

  // ---- monitoring
  always_comb begin
    occupancy = '0;
    for (int q = 0; q < N_PORTS; q++) occupancy = occupancy + OW'(cnt[q]);
  end
  assign congested = (int'(occupancy) >= CONG_THRESH);

  // ---- allocation, arbitration and dispatch
  assign arb_req = (hi_req != '0) ? hi_req : req;

  rr_arbiter #(.N(N_PORTS)) u_arb (
    .clk    (clk),
    .rst    (rst),
    .req    (arb_req),
    .advance(out_valid && out_ready),
    .grant  (grant)
  );

  always_comb begin
    out_pkt = '0;
    for (int q = 0; q < N_PORTS; q++) if (grant[q]) out_pkt = head[q];
  end
  assign out_valid = (req != '0);
  assign pop       = (out_valid && out_ready) ? grant : '0;

  a_onehot_grant: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
