// obf_crossbar: Crossbar Switching with Obfuscation, the switch stage of the
// AKRAO router.
//
// One obfuscated packet per cycle enters with its one-hot route and its key
// epoch. It is switched onto the output lane named by the route and held there
// in a lane register, still obfuscated, so the crossbar wires and registers
// never carry clear headers or payloads (lane_obf shows them). At the lane's
// exit the packet is restored with the key of its own epoch, looked up in the
// key history, and offered on out_valid/out_pkt. Lanes drain in parallel and
// independently: a blocked output stalls only the packets routed to it.
// `epoch_busy` marks the epochs held in the lanes.
// Switching obfuscated packets through the crossbar follows the design
// description; the lane registers and the exit-side restoration are choices
// of this implementation.
//
// Timing: a packet taken at edge t appears on its output lane in the next
// cycle; in_ready is combinational from the target lane's state.
module obf_crossbar
  import hnoc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  pkt_t                in_obf,     // obfuscated packet
  input  epoch_t              in_epoch,
  input  logic [N_PORTS-1:0]  in_route,   // one-hot output lane
  output logic                in_ready,
  input  key_t                key_hist [N_KEYS],
  output logic [N_PORTS-1:0]  out_valid,
  output pkt_t                out_pkt   [N_PORTS],
  input  logic [N_PORTS-1:0]  out_ready,
  output pkt_t                lane_obf  [N_PORTS],
  output logic [N_KEYS-1:0]   epoch_busy
);
  epoch_t             lane_epoch [N_PORTS];
  logic [N_PORTS-1:0] lane_free;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_lane
    assign lane_free[p] = !out_valid[p] || out_ready[p];

    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        out_valid[p]  <= 1'b0;
        lane_obf[p]   <= '0;
        lane_epoch[p] <= '0;
      end else if (lane_free[p]) begin
        out_valid[p] <= in_valid && in_route[p];
        if (in_valid && in_route[p]) begin
          lane_obf[p]   <= in_obf;
          lane_epoch[p] <= in_epoch;
        end
      end
    end

    assign out_pkt[p] = obfuscate(lane_obf[p], key_hist[lane_epoch[p]]);
  end

  assign in_ready = ((in_route & lane_free) != '0);

  always_comb begin
    epoch_busy = '0;
    for (int p = 0; p < N_PORTS; p++) if (out_valid[p]) epoch_busy[lane_epoch[p]] = 1'b1;
  end

  a_route_onehot: assert property (@(posedge clk) disable iff (rst) in_valid |-> $onehot(in_route));

endmodule
