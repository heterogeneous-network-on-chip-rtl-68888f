// akrao_key_rotation: Adaptive Key Rotation unit of the AKRAO router.
//
// Keeps the key used to obfuscate packets and replaces it while the network
// runs. A 32-bit maximal-length Galois LFSR (x^32 + x^22 + x^2 + x + 1) steps
// every cycle; a rotation captures its state as the next key, so the value a
// key takes depends on when rotations happen. A rotation is triggered
//   - at a predefined interval: ROT_INTERVAL cycles after the last one;
//   - by traffic: after PKT_LIMIT packets were obfuscated with the current key;
//   - on request: rekey_req (for instance from an attack monitor).
// Each key has a 3-bit epoch number. The last N_KEYS keys stay readable in
// key_hist, indexed by epoch, so a packet that was obfuscated under an older
// key can still be restored. A rotation is held back while a packet tagged
// with the epoch about to be overwritten is still inside the router
// (epoch_busy), so no packet ever loses its key.
// `rotating` is high for the one cycle in which the new key is written; the
// router accepts no packet in that cycle. The new key and epoch are valid from
// the following edge.
// Rotation at intervals or by network conditions is what the design
// describes; the LFSR, the triggers' sizes, the epoch history and the one-cycle
// hold are choices of this implementation.
module akrao_key_rotation
  import hnoc_pkg::*;
#(
  parameter int unsigned ROT_INTERVAL = 64,           // cycles
  parameter int unsigned PKT_LIMIT    = 16,           // packets per key
  parameter key_t        SEED         = 32'hACE1_2468 // key after reset, non-zero
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               pkt_fire,     // a packet was obfuscated this cycle
  input  logic               rekey_req,    // request an immediate rotation
  input  logic [N_KEYS-1:0]  epoch_busy,   // epochs still used by packets in flight
  output key_t               key,          // current key
  output epoch_t             epoch,        // its epoch number
  output key_t               key_hist [N_KEYS],
  output logic               rotating,     // new key written at the end of this cycle
  output logic [31:0]        rotations     // rotations since reset
);
  localparam key_t TAPS = 32'h8020_0003;

  key_t        lfsr;
  logic [31:0] timer;
  logic [31:0] pkts;
  logic        pending;
  epoch_t      next_epoch;

  assign next_epoch = epoch + 1'b1;
  assign key        = key_hist[epoch];

  always_comb begin
    pending  = (timer >= ROT_INTERVAL - 1) || (pkts >= PKT_LIMIT) || rekey_req;
    rotating = pending && !epoch_busy[next_epoch];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lfsr      <= SEED;
      timer     <= '0;
      pkts      <= '0;
      epoch     <= '0;
      rotations <= '0;
      for (int i = 0; i < N_KEYS; i++) key_hist[i] <= (i == 0) ? SEED : '0;
    end else begin
      lfsr <= (lfsr >> 1) ^ (lfsr[0] ? TAPS : '0);
      if (rotating) begin
        key_hist[next_epoch] <= lfsr;
        epoch                <= next_epoch;
        timer                <= '0;
        pkts                 <= '0;
        rotations            <= rotations + 1;
      end else begin
        if (timer < ROT_INTERVAL - 1) timer <= timer + 1;
        if (pkt_fire && pkts < PKT_LIMIT) pkts <= pkts + 1;
      end
    end
  end

  a_key_nonzero: assert property (@(posedge clk) disable iff (rst) key != '0);

endmodule
