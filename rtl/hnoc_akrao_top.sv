// hnoc_akrao_top: router node of a heterogeneous network-on-chip with
// adaptive key rotation aware obfuscation (AKRAO).
//
// Four 32-bit input ports (port_in[0..3] = ports A..D) and four output ports.
// In a cycle with in_valid high, the word on input port in_add is taken as a
// packet for output port out_add (Input Data and Input Address). The packet
// takes one of two paths:
//   normal path  - Input Switching Allocator and Buffer (isabm), then the AKRAO
//                  router core (hnoc_router_akrao: obfuscation with a rotating
//                  key, route computation, obfuscating crossbar);
//   bypass path  - Forwarding Buffer (fwd_buffer), straight to the output side.
// A packet is steered to the bypass when it asks for fast delivery (in_fast)
// or when the input buffer is congested, provided the forwarding buffer
// accepts it (destination permitted by fwd_perm, occupancy under its
// threshold); otherwise it goes to the input buffer, and if that rejects it
// too, in_ready is low and the source must hold it. Both paths merge in the
// Output Switching Allocator and Buffer (osab), which delivers one packet per
// cycle as Output Data and Output Address and keeps the last word delivered to
// each port on port_out.
// The four blocks and the two paths follow the design's architecture; the
// steering rule, the handshake signals and the clock are choices of this
// implementation (the reference design shows no clock port).
//
// Reset RES is asynchronous and active high. Latency through the normal path
// with no contention: 4 cycles from the in_valid edge to out_valid; through
// the bypass: 2 cycles.
module hnoc_akrao_top
  import hnoc_pkg::*;
#(
  parameter int unsigned IN_DEPTH     = 4,             // input queue per destination
  parameter int unsigned CONG_THRESH  = 12,            // congested input occupancy
  parameter int unsigned AGE_LIMIT    = 8,             // cycles before a request is promoted
  parameter int unsigned FWD_DEPTH    = 4,             // forwarding buffer entries
  parameter int unsigned FWD_THRESH   = 3,             // forwarding buffer accept threshold
  parameter int unsigned OUT_DEPTH    = 4,             // output queue per port
  parameter int unsigned ROT_INTERVAL = 64,            // cycles per key at most
  parameter int unsigned PKT_LIMIT    = 16,            // packets per key at most
  parameter key_t        SEED         = 32'hACE1_2468  // key after reset
) (
  input  logic               clk,
  input  logic               RES,
  // input ports A..D and packet injection
  input  data_t              port_in   [N_PORTS],
  input  logic               in_valid,
  input  addr_t              in_add,       // source port of the word
  input  addr_t              out_add,      // destination port
  input  logic               in_prio,      // high-priority traffic class
  input  logic               in_fast,      // ask for the forwarding path
  output logic               in_ready,
  // configuration and security control
  input  logic [N_PORTS-1:0] fwd_perm,     // destinations the bypass may serve
  input  logic               rekey_req,
  // delivery
  input  logic [N_PORTS-1:0] port_ready,
  output logic               out_valid,
  output data_t              out_data,
  output addr_t              out_addr,
  input  logic               out_ready,
  output data_t              port_out  [N_PORTS],   // ports Ao..Do
  output logic [N_PORTS-1:0] port_strobe,
  // status
  output logic               congested,
  output epoch_t             key_epoch
);
  pkt_t               pkt;
  logic               want_fwd, to_fwd, to_in;
  logic               fwd_in_ready, in_in_ready;

  logic               isa_valid, isa_ready;
  pkt_t               isa_pkt;
  logic [N_PORTS-1:0] rt_valid, rt_ready;
  pkt_t               rt_pkt   [N_PORTS];
  logic               fw_valid, fw_ready;
  pkt_t               fw_pkt;

  // ---- packet and address reception, path steering
  always_comb begin
    pkt.prio = in_prio;
    pkt.src  = in_add;
    pkt.dst  = out_add;
    pkt.data = port_in[in_add];
  end

  assign want_fwd = in_fast || congested;
  assign to_fwd   = in_valid && want_fwd && fwd_in_ready;
  assign to_in    = in_valid && !to_fwd;
  assign in_ready = (want_fwd && fwd_in_ready) || in_in_ready;

  isabm #(
    .DEPTH      (IN_DEPTH),
    .CONG_THRESH(CONG_THRESH),
    .AGE_LIMIT  (AGE_LIMIT)
  ) u_isabm (
    .clk      (clk),
    .rst      (RES),
    .in_valid (to_in),
    .in_pkt   (pkt),
    .in_ready (in_in_ready),
    .congested(congested),
    .occupancy(),
    .aged     (),
    .out_valid(isa_valid),
    .out_pkt  (isa_pkt),
    .out_ready(isa_ready)
  );

  fwd_buffer #(
    .DEPTH (FWD_DEPTH),
    .THRESH(FWD_THRESH)
  ) u_fwd (
    .clk         (clk),
    .rst         (RES),
    .perm        (fwd_perm),
    .in_valid    (to_fwd),
    .in_pkt      (pkt),
    .in_ready    (fwd_in_ready),
    .above_thresh(),
    .count       (),
    .out_valid   (fw_valid),
    .out_pkt     (fw_pkt),
    .out_ready   (fw_ready)
  );

  hnoc_router_akrao #(
    .ROT_INTERVAL(ROT_INTERVAL),
    .PKT_LIMIT   (PKT_LIMIT),
    .SEED        (SEED)
  ) u_router (
    .clk      (clk),
    .rst      (RES),
    .in_valid (isa_valid),
    .in_pkt   (isa_pkt),
    .in_ready (isa_ready),
    .rekey_req(rekey_req),
    .out_valid(rt_valid),
    .out_pkt  (rt_pkt),
    .out_ready(rt_ready),
    .lane_obf (),
    .key_epoch(key_epoch),
    .rotating (),
    .rotations()
  );

  osab #(
    .DEPTH(OUT_DEPTH)
  ) u_osab (
    .clk        (clk),
    .rst        (RES),
    .rt_valid   (rt_valid),
    .rt_pkt     (rt_pkt),
    .rt_ready   (rt_ready),
    .fw_valid   (fw_valid),
    .fw_pkt     (fw_pkt),
    .fw_ready   (fw_ready),
    .port_ready (port_ready),
    .out_valid  (out_valid),
    .out_data   (out_data),
    .out_addr   (out_addr),
    .out_ready  (out_ready),
    .port_out   (port_out),
    .port_strobe(port_strobe),
    .conflict   ()
  );

endmodule
