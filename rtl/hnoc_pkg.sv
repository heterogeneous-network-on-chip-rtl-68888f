// hnoc_pkg: widths and the packet type shared by every block of the HNoC
// router with adaptive key rotation aware obfuscation (AKRAO).
//
// The router node has four ports (A, B, C, D) carrying 32-bit words and
// 2-bit port addresses; those sizes are the ones the reference simulation of
// the design shows. The key width, the epoch (key generation) counter width
// and the priority bit are choices of this implementation.
package hnoc_pkg;

  localparam int unsigned N_PORTS = 4;   // ports A..D
  localparam int unsigned DATA_W  = 32;  // payload word
  localparam int unsigned ADDR_W  = 2;   // port address (in_add / out_add)
  localparam int unsigned KEY_W   = 32;  // obfuscation key
  localparam int unsigned EPOCH_W = 3;   // key generation tag carried by a packet
  localparam int unsigned N_KEYS  = 1 << EPOCH_W;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [EPOCH_W-1:0] epoch_t;

  // One packet: a single flit holding header and payload.
  typedef struct packed {
    logic  prio;  // 1 = high-priority traffic class
    addr_t src;   // input port the word was taken from
    addr_t dst;   // output port it is sent to
    data_t data;  // payload
  } pkt_t;

  // XOR obfuscation of header and payload with a key. The priority bit stays
  // in clear so that arbitration does not need the key. Applying it twice
  // with the same key restores the packet.
  function automatic pkt_t obfuscate(pkt_t p, key_t k);
    pkt_t o;
    o.prio = p.prio;
    o.dst  = p.dst  ^ k[ADDR_W-1:0];
    o.src  = p.src  ^ k[2*ADDR_W-1:ADDR_W];
    o.data = p.data ^ k[DATA_W-1:0];
    return o;
  endfunction

endpackage
