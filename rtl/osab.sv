// osab: Output Switching Allocator and Buffer.
//
// Merges the two paths of the router node and delivers packets. Each output
// port has a queue (DEPTH entries) fed by two sources: the router lane of that
// port and the forwarding buffer, when the forwarded packet is addressed to
// the port. When both offer a packet to the same queue in the same cycle, a
// per-port two-way round-robin decides and the loser waits (a merge
// conflict). Queues keep arrival order, so packets of one path to one port
// leave in sequence.
// On the output side, every non-empty queue whose port is available
// (port_ready) requests; a round-robin arbiter picks one per cycle. The
// winner is shown on out_valid / out_data / out_addr (Output Data and Output
// Address) and leaves when out_ready is high; its port register port_out then
// takes the word and holds it until the next delivery to that port, with a
// one-cycle port_strobe.
// Merging both paths, output arbitration, queuing and fair sharing follow
// the design description; the queue per port, the two round-robins and the
// port registers are choices of this implementation.
//
// Timing: a packet pushed at edge t can leave in the cycle after t; port_out
// changes at the edge where it leaves.
module osab
  import hnoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4  // per output port
) (
  input  logic               clk,
  input  logic               rst,
  // router path, one lane per port
  input  logic [N_PORTS-1:0] rt_valid,
  input  pkt_t               rt_pkt   [N_PORTS],
  output logic [N_PORTS-1:0] rt_ready,
  // forwarding path
  input  logic               fw_valid,
  input  pkt_t               fw_pkt,
  output logic               fw_ready,
  // delivery
  input  logic [N_PORTS-1:0] port_ready,
  output logic               out_valid,
  output data_t              out_data,
  output addr_t              out_addr,
  input  logic               out_ready,
  output data_t              port_out    [N_PORTS],
  output logic [N_PORTS-1:0] port_strobe,
  output logic [N_PORTS-1:0] conflict      // both paths offered to the port this cycle
);
  pkt_t               head [N_PORTS];
  logic [N_PORTS-1:0] empty, full, push, pop, fw_take, rt_take;
  logic [N_PORTS-1:0] last_fw;      // per port: forwarding path won the last conflict
  logic [N_PORTS-1:0] req, grant;
  pkt_t               din  [N_PORTS];

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    logic fw_here;
    assign fw_here     = fw_valid && (fw_pkt.dst == addr_t'(p));
    assign conflict[p] = fw_here && rt_valid[p];

    always_comb begin
      rt_take[p] = 1'b0;
      fw_take[p] = 1'b0;
      if (!full[p]) begin
        if (conflict[p]) begin
          fw_take[p] = !last_fw[p];
          rt_take[p] = last_fw[p];
        end else begin
          fw_take[p] = fw_here;
          rt_take[p] = rt_valid[p];
        end
      end
    end
    assign rt_ready[p] = rt_take[p];
    assign push[p]     = rt_take[p] || fw_take[p];
    assign din[p]      = fw_take[p] ? fw_pkt : rt_pkt[p];

    always_ff @(posedge clk or posedge rst) begin
      if (rst)              last_fw[p] <= 1'b0;
      else if (conflict[p] && !full[p]) last_fw[p] <= fw_take[p];
    end

    sync_fifo #(.T(pkt_t), .DEPTH(DEPTH)) u_q (
      .clk  (clk),
      .rst  (rst),
      .push (push[p]),
      .din  (din[p]),
      .pop  (pop[p]),
      .dout (head[p]),
      .empty(empty[p]),
      .full (full[p]),
      .count()
    );

    assign req[p] = !empty[p] && port_ready[p];

    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        port_out[p]    <= '0;
        port_strobe[p] <= 1'b0;
      end else begin
        port_strobe[p] <= pop[p];
        if (pop[p]) port_out[p] <= head[p].data;
      end
    end
  end

  assign fw_ready = (fw_take != '0);

  rr_arbiter #(.N(N_PORTS)) u_arb (
    .clk    (clk),
    .rst    (rst),
    .req    (req),
    .advance(out_valid && out_ready),
    .grant  (grant)
  );

  always_comb begin
    out_data = '0;
    out_addr = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      if (grant[p]) begin
        out_data = head[p].data;
        out_addr = addr_t'(p);
      end
    end
  end
  assign out_valid = (req != '0);
  assign pop       = (out_valid && out_ready) ? grant : '0;

endmodule
