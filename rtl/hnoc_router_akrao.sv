// hnoc_router_akrao: Heterogeneous NoC Router with Adaptive Key Rotation
// Aware Obfuscation, the core of the router node.
//
// Two stages. At entry a packet from the input allocator is obfuscated with
// the current key (header and payload XORed with it) and registered together
// with the key's epoch number. In that register the route is computed from the
// obfuscated header: the destination is recovered with the epoch's key and
// decoded into a one-hot output lane. The packet then crosses the obfuscating
// crossbar (obf_crossbar), which restores it at the lane exit. The key
// rotation unit (akrao_key_rotation) replaces the key every ROT_INTERVAL
// cycles, after PKT_LIMIT packets, or on rekey_req; during the cycle it writes
// a new key the router accepts nothing (in_ready low: the secure control seen
// by the input allocator).
// The node is a single router whose output port is the packet's destination,
// so route computation is a decode of the destination address; multi-hop path
// selection is not part of this block. Obfuscating at entry and restoring at
// the crossbar exit is a choice of this implementation.
//
// Timing: entry register, then lane register: a packet accepted at edge t is
// on its output lane after edge t+1 when the lane is free. Throughput one
// packet per cycle except in rotation cycles.
module hnoc_router_akrao
  import hnoc_pkg::*;
#(
  parameter int unsigned ROT_INTERVAL = 64,
  parameter int unsigned PKT_LIMIT    = 16,
  parameter key_t        SEED         = 32'hACE1_2468
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  pkt_t               in_pkt,
  output logic               in_ready,
  input  logic               rekey_req,
  output logic [N_PORTS-1:0] out_valid,
  output pkt_t               out_pkt   [N_PORTS],
  input  logic [N_PORTS-1:0] out_ready,
  output pkt_t               lane_obf  [N_PORTS],  // crossbar contents (obfuscated)
  output epoch_t             key_epoch,
  output logic               rotating,
  output logic [31:0]        rotations
);
  key_t               key;
  key_t               key_hist [N_KEYS];
  logic [N_KEYS-1:0]  xbar_busy, epoch_busy;

  logic               s1_valid;
  pkt_t               s1_obf;
  epoch_t             s1_epoch;
  logic [N_PORTS-1:0] s1_route;
  addr_t              s1_dst;
  logic               s1_ready;
  logic               accept;

  // ---- entry: obfuscation with the current key
  assign in_ready = (!s1_valid || s1_ready) && !rotating;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_obf   <= '0;
      s1_epoch <= '0;
    end else begin
      if (accept) begin
        s1_valid <= 1'b1;
        s1_obf   <= obfuscate(in_pkt, key);
        s1_epoch <= key_epoch;
      end else if (s1_ready) begin
        s1_valid <= 1'b0;
      end
    end
  end

  // ---- route computation on the obfuscated header
  assign s1_dst = s1_obf.dst ^ key_hist[s1_epoch][ADDR_W-1:0];
  always_comb begin
    s1_route         = '0;
    s1_route[s1_dst] = 1'b1;
  end

  // ---- crossbar with obfuscation
  obf_crossbar u_xbar (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (s1_valid),
    .in_obf    (s1_obf),
    .in_epoch  (s1_epoch),
    .in_route  (s1_route),
    .in_ready  (s1_ready),
    .key_hist  (key_hist),
    .out_valid (out_valid),
    .out_pkt   (out_pkt),
    .out_ready (out_ready),
    .lane_obf  (lane_obf),
    .epoch_busy(xbar_busy)
  );

  // ---- adaptive key rotation
  always_comb begin
    epoch_busy = xbar_busy;
    if (s1_valid) epoch_busy[s1_epoch] = 1'b1;
  end

  akrao_key_rotation #(
    .ROT_INTERVAL(ROT_INTERVAL),
    .PKT_LIMIT   (PKT_LIMIT),
    .SEED        (SEED)
  ) u_keys (
    .clk       (clk),
    .rst       (rst),
    .pkt_fire  (accept),
    .rekey_req (rekey_req),
    .epoch_busy(epoch_busy),
    .key       (key),
    .epoch     (key_epoch),
    .key_hist  (key_hist),
    .rotating  (rotating),
    .rotations (rotations)
  );

endmodule
